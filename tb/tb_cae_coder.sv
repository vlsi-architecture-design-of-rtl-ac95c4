// tb_cae_coder: loads a probability table, codes random and structured
// blocks at all three block sizes and compares the code bits and bit count
// with the context model plus arithmetic-coder model. Also checks that a
// block takes at least (N+2)(N+4) stream cycles plus one cycle per code bit,
// since every emitted bit stalls the stream for a cycle.
module tb_cae_coder;
  import shape_pkg::*;
  import shape_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, cancel = 0, prob_we = 0;
  cr_e  bsize;
  bab_t blk;
  logic [9:0]  prob_addr;
  logic [15:0] prob_data;
  logic out_valid, out_bit, busy, done;
  logic [15:0] nbits;
  int   prob[1024];
  bit   got[$];
  int checks = 0, failures = 0;

  cae_coder dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (out_valid) got.push_back(out_bit);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bsize = CR_1; blk = '0; prob_addr = 0; prob_data = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // skewed table: contexts full of ones predict a one
    for (int c = 0; c < 1024; c++) begin
      int ones;
      ones = $countones(c);
      prob[c] = (ones >= 6) ? 3000 + $urandom % 2000 : (ones <= 3) ? 62000 + $urandom % 3000
                                                                    : $urandom % 65536;
      @(negedge clk); prob_we = 1; prob_addr = 10'(c); prob_data = 16'(prob[c]);
    end
    @(negedge clk); prob_we = 0;
    for (int t = 0; t < 15; t++) begin
      bit exp_bits[$];
      int n, cyc;
      bsize = cr_e'(t % 3);
      n = blk_n(bsize);
      for (int y = 0; y < 16; y++)
        for (int x = 0; x < 16; x++)
          case (t / 3)
            0: blk[y][x] = $urandom % 2;
            1: blk[y][x] = (x + y < n);                        // diagonal edge
            2: blk[y][x] = ((x - n/2)*(x - n/2) + (y - n/2)*(y - n/2) < n*n/5);
            3: blk[y][x] = (y >= n/2);
            default: blk[y][x] = (x > 2);
          endcase
      cae_model(blk, n, prob, exp_bits);
      got.delete();
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks += 3;
      if (got != exp_bits) begin
        failures++;
        $display("block %0d n=%0d: %0d bits, expected %0d", t, n, got.size(), exp_bits.size());
      end
      if (int'(nbits) != exp_bits.size()) begin failures++; $display("nbits %0d", nbits); end
      if (cyc < (n+2)*(n+4) + exp_bits.size()) begin failures++; $display("too fast: %0d", cyc); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
