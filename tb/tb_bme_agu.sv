// tb_bme_agu: runs the motion-estimation sequencer and keeps a model of
// which search-area row sits in each SR-buffer slot (a row lands one cycle
// after its third word is requested). Every pass read must find row
// dy+16+t of the current half in the slot it addresses. Also checks the word
// order of each fetch, the pass offsets, 1024 SR-buffer reads per search
// (2048 16-bit words), 94 fetched rows and a busy time of 1120 cycles.
module tb_bme_agu;
  logic clk = 0, rst_n = 0, start = 0;
  logic rd_en, pe_first, pe_last, final_pass, f_en, half, busy;
  logic [3:0] sr_rd_addr, cur_rd_addr;
  logic signed [5:0] pass_dx0, pass_dy;
  logic [5:0] f_row;
  logic [1:0] f_widx;
  int checks = 0, failures = 0;

  bme_agu dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string s);
    failures++;
    $display("%s", s);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int run = 0; run < 2; run++) begin
      int slot[16], pend_slot, pend_tag, reads, rows, cycles, nfinal, exp_w;
      bit pend;
      for (int s = 0; s < 16; s++) slot[s] = -1;
      pend = 0; reads = 0; rows = 0; cycles = 0; nfinal = 0; exp_w = 0;
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      while (busy) begin
        cycles++;
        if (rd_en) begin
          int want;
          want = int'(half) * 100 + int'(pass_dy) + 16 + int'(cur_rd_addr);
          reads++;
          if (slot[sr_rd_addr] != want)
            fail($sformatf("slot %0d holds %0d, pass needs %0d", sr_rd_addr, slot[sr_rd_addr], want));
          if (pass_dx0 != (half ? 6'sd0 : -6'sd16)) fail("bad dx0");
          if (pe_first != (cur_rd_addr == 0) || pe_last != (cur_rd_addr == 15)) fail("first/last");
          if (final_pass) nfinal++;
        end
        if (f_en) begin
          if (int'(f_widx) != exp_w) fail("fetch word order");
          exp_w = (exp_w + 1) % 3;
        end
        @(posedge clk);
        if (pend) slot[pend_slot] = pend_tag;
        pend = f_en && f_widx == 2;
        if (pend) begin
          pend_slot = int'(f_row) % 16; pend_tag = int'(half) * 100 + int'(f_row); rows++;
        end
        @(negedge clk);
      end
      checks += 4;
      if (reads != 1024) fail($sformatf("reads %0d", reads));
      if (rows != 94)    fail($sformatf("rows %0d", rows));
      if (cycles != 1120) fail($sformatf("cycles %0d", cycles));
      if (nfinal != 16)  fail($sformatf("final-pass reads %0d", nfinal));
      checks += 1024;   // per-read slot checks
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
