// tb_bac_encoder: codes random symbol sequences with random and skewed
// probabilities (including p0 = 0 and p0 near 1) and compares the emitted
// bits, in order, with an arithmetic-coder model; random gaps between
// symbols exercise the ready/valid handshake, and long skewed runs produce
// pending (follow) bits.
module tb_bac_encoder;
  import shape_ref_pkg::*;
  logic clk = 0, rst_n = 0, init = 0, in_valid = 0, in_bit = 0, flush = 0;
  logic [15:0] p0;
  logic ready, out_valid, out_bit, flushed;
  bit   got[$];
  int checks = 0, failures = 0;

  bac_encoder dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (out_valid) got.push_back(out_bit);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    p0 = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 30; s++) begin
      BacModel m;
      int nsym;
      m = new();
      got.delete();
      @(negedge clk); init = 1;
      @(negedge clk); init = 0;
      nsym = 50 + $urandom % 300;
      for (int i = 0; i < nsym; i++) begin
        int p;
        bit b;
        case (s % 4)
          0: p = $urandom % 65536;
          1: p = 65000 + $urandom % 536;
          2: p = $urandom % 600;
          default: p = (i % 2) ? 32768 : ($urandom % 65536);
        endcase
        if (i == 3) p = 0;
        b = (($urandom % 65536) >= p);           // mostly follows p0
        if (s % 5 == 4) b = $urandom % 2;
        m.encode(b, p);
        if ($urandom % 4 == 0) begin in_valid = 0; @(negedge clk); end
        in_valid = 1; in_bit = b; p0 = 16'(p);
        @(posedge clk);
        while (!ready) @(posedge clk);
        @(negedge clk);
        in_valid = 0;
      end
      m.flush();
      flush = 1;
      @(posedge clk);
      while (!ready) @(posedge clk);
      @(negedge clk); flush = 0;
      while (!flushed) @(negedge clk);
      @(negedge clk);
      checks++;
      if (got.size() != m.q.size()) begin
        failures++;
        $display("seq %0d: %0d bits, expected %0d", s, got.size(), m.q.size());
      end else if (got != m.q) begin
        failures++;
        $display("seq %0d: bit mismatch", s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
