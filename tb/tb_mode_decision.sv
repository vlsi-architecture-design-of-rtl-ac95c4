// tb_mode_decision: transparent, opaque, nearly transparent/opaque and
// random BABs in a model memory; checks the class, the collected pixels
// (leftmost pixel = memory MSB) and that done is high in the 18th cycle after the start cycle.
module tb_mode_decision;
  import shape_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, rd_en, busy, done;
  logic [3:0] rd_addr;
  logic [15:0] rd_data;
  logic [15:0] mem [16];
  bab_class_e cls;
  bab_t bab;
  int checks = 0, failures = 0;

  mode_decision dut (.*);
  always #5 clk = ~clk;
  always_ff @(posedge clk) if (rd_en) rd_data <= mem[rd_addr];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      bab_class_e exp_cls;
      int cyc, ones;
      for (int r = 0; r < 16; r++)
        case (t % 5)
          0: mem[r] = 16'h0000;
          1: mem[r] = 16'hFFFF;
          2: mem[r] = (r == t % 16) ? 16'h0100 : 16'h0000;
          3: mem[r] = (r == t % 16) ? 16'hFFFE : 16'hFFFF;
          default: mem[r] = 16'($urandom);
        endcase
      ones = 0;
      for (int r = 0; r < 16; r++) ones += $countones(mem[r]);
      exp_cls = (ones == 0) ? CLS_TRANSP : (ones == 256) ? CLS_OPAQUE : CLS_BOUNDARY;
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks += 3;
      if (cls != exp_cls) begin failures++; $display("bab %0d: class %0d", t, cls); end
      if (cyc != 18) begin failures++; $display("latency %0d", cyc); end
      for (int r = 0; r < 16; r++)
        for (int x = 0; x < 16; x++)
          if (bab[r][x] !== mem[r][15-x]) begin
            failures++; $display("bab %0d pixel (%0d,%0d)", t, x, r); r = 16; break;
          end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
