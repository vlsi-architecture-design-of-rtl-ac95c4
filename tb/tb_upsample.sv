// tb_upsample: loads a random threshold table, upsamples random and
// structured 4x4 and 8x8 blocks and compares the 2N x 2N result with the
// template formula evaluated directly on the edge-extended block. Checks the
// cycle counts: 140 for 4x4 -> 8x8 and 388 for 8x8 -> 16x16.
module tb_upsample;
  import shape_pkg::*;
  import shape_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, n8 = 0, th_we = 0, busy, done;
  logic [7:0][7:0] lo;
  logic [7:0] th_addr;
  logic [4:0] th_data;
  bab_t hi;
  int th[256];
  int checks = 0, failures = 0;

  upsample dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    lo = '0; th_addr = 0; th_data = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 256; c++) begin
      th[c] = 4 + $urandom % 10;
      @(negedge clk); th_we = 1; th_addr = 8'(c); th_data = 5'(th[c]);
    end
    @(negedge clk); th_we = 0;
    for (int t = 0; t < 16; t++) begin
      bab_t exp_hi;
      int n, cyc;
      n8 = t % 2; n = n8 ? 8 : 4;
      for (int y = 0; y < 8; y++)
        for (int x = 0; x < 8; x++)
          lo[y][x] = (t < 8) ? 1'($urandom % 2) : 1'(x * 3 + y * 2 > 2 * n);
      exp_hi = upsample_model(lo, n, th);
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks += 2;
      if (hi != exp_hi) begin
        failures++;
        $display("block %0d n=%0d mismatch", t, n);
        for (int y = 0; y < 2*n; y++) $display("  %b  %b", hi[y], exp_hi[y]);
      end
      if (cyc != (n8 ? 388 : 140)) begin failures++; $display("cycles %0d", cyc); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
