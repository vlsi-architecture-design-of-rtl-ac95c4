// tb_sap: checks the shift-and-pack unit for every shift value against a
// pixel-by-pixel extraction of 32 consecutive pixels from a 48-pixel window.
module tb_sap;
  logic [47:0] win;
  logic [3:0]  shift;
  logic [31:0] row32, exp_row;
  int checks = 0, failures = 0;

  sap dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 400; t++) begin
      win   = {16'($urandom), 32'($urandom)};
      shift = 4'(t % 16);
      #1;
      // pixel p of the window is bit 47-p; output pixel q is bit 31-q
      for (int q = 0; q < 32; q++) exp_row[31-q] = win[47 - (q + int'(shift))];
      checks++;
      if (row32 !== exp_row) begin
        failures++;
        $display("shift %0d: got %h expected %h", shift, row32, exp_row);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
