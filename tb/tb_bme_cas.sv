// tb_bme_cas: loads back-to-back passes of 16 SADs (some with ties and
// repeated minima) and checks the selected SAD and displacement against a
// scan done here (first strict minimum wins), that 'done' rises with the 16th comparison, 16
// cycles after the last load, and that 'clear' restarts the search.
module tb_bme_cas;
  import shape_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, load = 0, last = 0, done;
  logic [15:0][SAD_W-1:0] sad_in;
  logic signed [5:0] dx0, dy, best_dx, best_dy;
  logic [SAD_W-1:0] best_sad;
  int checks = 0, failures = 0;

  bme_cas dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sad_in = '0; dx0 = 0; dy = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int search = 0; search < 20; search++) begin
      int exp_sad, exp_dx, exp_dy, npass, cyc;
      @(negedge clk); clear = 1;
      @(negedge clk); clear = 0;
      exp_sad = 1 << SAD_W; exp_dx = 0; exp_dy = 0;
      npass = 1 + search % 6;
      for (int p = 0; p < npass; p++) begin
        @(negedge clk);
        load = 1; last = (p == npass - 1);
        dx0 = (p % 2) ? 6'sd0 : -6'sd16;
        dy  = 6'(p - 16);
        for (int k = 0; k < 16; k++) begin
          sad_in[k] = (search % 3 == 0) ? 9'(40 + $urandom % 4) : 9'($urandom % 257);
          if (int'(sad_in[k]) < exp_sad) begin
            exp_sad = sad_in[k]; exp_dx = int'(dx0) + k; exp_dy = int'(dy);
          end
        end
        @(negedge clk); load = 0; last = 0;
        if (p != npass - 1) repeat (14) @(negedge clk);
      end
      cyc = 1;   // negedges after the load edge; done rises with the 16th compare
      while (!done && cyc < 40) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != 17) begin failures++; $display("done after %0d cycles", cyc); end
      checks++;
      if (int'(best_sad) != exp_sad || int'(best_dx) != exp_dx || int'(best_dy) != exp_dy) begin
        failures++;
        $display("search %0d: got sad %0d (%0d,%0d) expected %0d (%0d,%0d)", search,
                 best_sad, best_dx, best_dy, exp_sad, exp_dx, exp_dy);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
