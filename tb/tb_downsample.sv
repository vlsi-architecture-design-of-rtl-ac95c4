// tb_downsample: random and structured BABs reduced by 2 and by 4, compared
// with a cell-by-cell majority count (ties go to opaque).
module tb_downsample;
  import shape_pkg::*;
  import shape_ref_pkg::*;
  bab_t bab;
  logic quarter;
  logic [7:0][7:0] lo, exp_lo;
  int checks = 0, failures = 0;

  downsample dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      for (int y = 0; y < 16; y++)
        for (int x = 0; x < 16; x++)
          bab[y][x] = (t % 3 == 0) ? 1'($urandom % 2) : (t % 3 == 1) ? 1'((x + y) % 2) : 1'(x + 2*y > t % 40);
      quarter = t % 2;
      #1;
      exp_lo = downsample_model(bab, quarter ? 4 : 2);
      checks++;
      if (lo != exp_lo) begin failures++; $display("case %0d mismatch", t); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
