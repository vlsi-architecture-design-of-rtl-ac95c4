// tb_cae_ctx: streams bordered random blocks of all three sizes through the
// configurable delay-line model, with random stall cycles, and compares the
// context of every block pixel with the template evaluated directly on the
// bordered block.
module tb_cae_ctx;
  import shape_pkg::*;
  import shape_ref_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, shift = 0, pix_in = 0;
  cr_e  bsize;
  logic [9:0] ctx;
  int checks = 0, failures = 0;

  cae_ctx dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bsize = CR_1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 12; t++) begin
      bab_t b;
      int n;
      bsize = cr_e'(t % 3);
      n = blk_n(bsize);
      for (int y = 0; y < 16; y++) b[y] = 16'($urandom);
      @(negedge clk); clear = 1;
      @(negedge clk); clear = 0;
      for (int y = -2; y < n; y++)
        for (int x = -2; x < n + 2; x++) begin
          if ($urandom % 5 == 0) begin   // stall cycle
            shift = 0; pix_in = $urandom % 2;
            @(negedge clk);
          end
          pix_in = cae_pix(b, n, x, y);
          shift  = 1;
          #1;
          if (y >= 0 && x >= 0 && x < n) begin
            checks++;
            if (int'(ctx) != cae_context(b, n, x, y)) begin
              failures++;
              $display("n=%0d (%0d,%0d): ctx %h expected %h", n, x, y, ctx, cae_context(b, n, x, y));
            end
          end
          @(negedge clk);
        end
      shift = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
