// tb_acq_detect: pairs of BABs that differ in a controlled number of pixels
// inside one 4x4 sub-block, or at random, checked against a per-sub-block
// error count for thresholds 0..16, including the exact boundary case.
module tb_acq_detect;
  import shape_pkg::*;
  import shape_ref_pkg::*;
  bab_t orig, recon;
  logic [4:0] thr;
  logic accept;
  int checks = 0, failures = 0;

  acq_detect dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      int sb, nerr;
      for (int y = 0; y < 16; y++) orig[y] = 16'($urandom);
      recon = orig;
      if (t % 2) begin
        sb = $urandom % 16; nerr = $urandom % 17;
        for (int k = 0; k < nerr; k++) recon[4*(sb/4) + k/4][4*(sb%4) + k%4] ^= 1'b1;
        thr = (t % 4 == 1) ? 5'(nerr) : (nerr > 0 ? 5'(nerr - 1) : 5'd0);
      end else begin
        for (int k = 0; k < 20; k++) recon[$urandom % 16][$urandom % 16] ^= 1'b1;
        thr = 5'($urandom % 5);
      end
      #1;
      checks++;
      if (accept !== acq_model(orig, recon, int'(thr))) begin
        failures++; $display("case %0d: accept=%0d", t, accept);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
