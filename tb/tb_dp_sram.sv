// tb_dp_sram: random writes and reads on the 16x32 SR-buffer configuration,
// checked against a shadow array; checks the one-cycle read latency and that
// a read colliding with a write to the same address returns the old word.
module tb_dp_sram;
  logic clk = 0, we = 0, rd_en = 0;
  logic [3:0] waddr, raddr;
  logic [31:0] wdata, rd_data;
  logic [31:0] shadow [16];
  int checks = 0, failures = 0;

  dp_sram #(.DEPTH(16), .WIDTH(32)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    waddr = 0; raddr = 0; wdata = 0;
    for (int a = 0; a < 16; a++) begin
      @(negedge clk); we = 1; waddr = 4'(a); wdata = $urandom; shadow[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int t = 0; t < 500; t++) begin
      logic [31:0] expv;
      @(negedge clk);
      rd_en = 1; raddr = 4'($urandom);
      we = $urandom % 2; waddr = (t % 5 == 0) ? raddr : 4'($urandom); wdata = $urandom;
      expv = shadow[raddr];
      @(posedge clk);
      if (we) shadow[waddr] = wdata;
      @(negedge clk);
      rd_en = 0; we = 0;
      checks++;
      if (rd_data !== expv) begin
        failures++;
        $display("read %0d: got %h expected %h", raddr, rd_data, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
