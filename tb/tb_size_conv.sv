// tb_size_conv: BAB shapes from smooth (a half plane, large disc) to noisy
// are run through the conversion-ratio decision with several quality
// thresholds; CR and the reduced block are compared with the
// down/up-sampling and accepted-quality models. Each of CR = 1/4, 1/2 and 1
// must be chosen at least once, and a disabled unit must answer CR = 1.
module tb_size_conv;
  import shape_pkg::*;
  import shape_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, enable = 1, th_we = 0, busy, done;
  bab_t bab, conv;
  logic [4:0] thr;
  logic [7:0] th_addr;
  logic [4:0] th_data;
  cr_e  cr;
  int   th[256];
  int   seen[3];
  int checks = 0, failures = 0;

  size_conv dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bab = '0; thr = 0; th_addr = 0; th_data = 0;
    seen = '{0, 0, 0};
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 256; c++) begin
      th[c] = default_th(c);
      @(negedge clk); th_we = 1; th_addr = 8'(c); th_data = 5'(th[c]);
    end
    @(negedge clk); th_we = 0;
    for (int t = 0; t < 24; t++) begin
      cr_e  exp_cr;
      bab_t exp_conv;
      int   r;
      r = 4 + t % 7;
      for (int y = 0; y < 16; y++)
        for (int x = 0; x < 16; x++)
          case (t % 4)
            0: bab[y][x] = (x + y > 10 + t % 9);
            1: bab[y][x] = ((x-8)*(x-8) + (y-8)*(y-8) < r*r);
            2: bab[y][x] = $urandom % 2;
            default: bab[y][x] = (t % 8 == 3) ? (y >= 8) : ((y > 5) && (x % 5 != 0));
          endcase
      thr    = 5'(2 * ((t / 4) % 6));
      enable = (t != 23);
      if (enable) size_conv_model(bab, int'(thr), th, exp_cr, exp_conv);
      else begin exp_cr = CR_1; exp_conv = bab; end
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      while (!done) @(negedge clk);
      seen[int'(cr)]++;
      checks += 2;
      if (cr != exp_cr) begin failures++; $display("bab %0d: cr %0d expected %0d", t, cr, exp_cr); end
      if (conv != exp_conv) begin failures++; $display("bab %0d: block mismatch", t); end
    end
    $display("CR=1: %0d  CR=1/2: %0d  CR=1/4: %0d", seen[0], seen[1], seen[2]);
    for (int k = 0; k < 3; k++) begin
      checks++;
      if (seen[k] == 0) begin failures++; $display("CR code %0d never chosen", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
