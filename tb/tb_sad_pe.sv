// tb_sad_pe: drives random 16-row candidate pairs into one SAD PE and checks
// that, one cycle after the 16th row, sad equals the total number of
// differing pixels counted here bit by bit; also checks restart by 'first'
// and that idle cycles (en=0) hold the value.
module tb_sad_pe;
  logic clk = 0, rst_n = 0, en = 0, first = 0;
  logic [15:0] cur_row, ref_row;
  logic [8:0]  sad;
  int checks = 0, failures = 0;

  sad_pe dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cur_row = '0; ref_row = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cand = 0; cand < 200; cand++) begin
      int exp_sad;
      int mode;
      exp_sad = 0;
      mode = cand % 4;
      for (int r = 0; r < 16; r++) begin
        if (cand % 7 == 3 && r == 8) begin   // idle gap inside a candidate
          @(negedge clk); en = 0;
        end
        @(negedge clk);
        en = 1; first = (r == 0);
        cur_row = 16'($urandom);
        ref_row = (mode == 0) ? cur_row : (mode == 1) ? ~cur_row : 16'($urandom);
        for (int b = 0; b < 16; b++) exp_sad += (cur_row[b] != ref_row[b]);
      end
      @(negedge clk);
      en = 0;
      checks++;
      if (sad !== 9'(exp_sad)) begin
        failures++;
        $display("candidate %0d: sad=%0d expected %0d", cand, sad, exp_sad);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
