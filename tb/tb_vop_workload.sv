// tb_vop_workload: codes whole video object planes, as a real shape sequence
// does, and measures the cycle budget. An I-VOP holding an elliptical object
// with a notch is coded BAB by BAB in raster order, then a P-VOP in which
// the object has moved by (3,-2) and its notch has grown, so the P-VOP holds
// transparent, opaque, no-update (motion only) and CAE-coded BABs. The
// motion-vector predictor is zero for every BAB. The reference VOP memory is
// a model returning the previous plane, zero outside it.
// Checks per BAB: the class (transparent/opaque) against a pixel count; for
// a no-update BAB that the block at the reported vector matches exactly; for
// a P-VOP CAE BAB that min_sad is the mismatch at the reported vector and is
// not zero; for CAE BABs the ratio and every code bit against the reference
// models. At the end, the cycles spent per VOP are compared with the budget
// of a CPL2 stream at 23.5 MHz: 7128 boundary BABs per second, i.e. 3297
// cycles per boundary BAB with non-boundary BABs included in that budget.
module tb_vop_workload;
  import shape_pkg::*;
  import shape_ref_pkg::*;
  localparam int VW = 96, VH = 64;   // 6 x 4 BABs per VOP
  logic clk = 0, rst_n = 0;
  logic cur_we = 0, prob_we = 0, th_we = 0, start = 0, conv_en = 1;
  logic [3:0] cur_waddr = 0;
  logic [15:0] cur_wdata = 0;
  logic [9:0] prob_addr = 0;
  logic [15:0] prob_data = 0;
  logic [7:0] th_addr = 0;
  logic [4:0] th_data = 0;
  vop_type_e vop_type = VOP_I;
  logic signed [10:0] bab_x = 0, bab_y = 0;
  logic signed [7:0] mvp_x = 0, mvp_y = 0, mv_x, mv_y;
  logic [4:0] alpha_thr = 0;
  logic ref_rd_en, busy, done, bit_valid, bit_out;
  logic signed [10:0] ref_rd_row;
  logic signed [6:0] ref_rd_word;
  logic [15:0] ref_rd_data, nbits;
  bab_type_e bab_type;
  logic [SAD_W-1:0] min_sad;
  cr_e cr;

  bit  plane [2][VH][VW];
  int  refp = 0;
  int  prob[1024], th[256];
  bit  got[$];
  int  n_type[7], n_boundary;
  longint vop_cycles;
  int  checks = 0, failures = 0;

  shape_coder_top dut (.*);
  always #5 clk = ~clk;

  function automatic bit pix(int p, int x, int y);
    if (x < 0 || y < 0 || x >= VW || y >= VH) return 0;
    return plane[p][y][x];
  endfunction

  always_ff @(posedge clk)
    if (ref_rd_en)
      for (int b = 0; b < 16; b++)
        ref_rd_data[15-b] <= pix(refp, 16*int'(ref_rd_word) + b, int'(ref_rd_row));

  always @(posedge clk) if (bit_valid) got.push_back(bit_out);

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string s);
    failures++;
    $display("FAIL: %s", s);
  endtask

  // ellipse centred at (cx,cy) with a square notch of side ns at its top right
  function automatic void draw(int p, int cx, int cy, int ns);
    for (int y = 0; y < VH; y++)
      for (int x = 0; x < VW; x++) begin
        int dx, dy;
        dx = x - cx; dy = y - cy;
        plane[p][y][x] = (dx*dx*400 + dy*dy*900 <= 400*900);
        if (dx > 0 && dy < 0 && dx < ns && -dy < ns) plane[p][y][x] = 0;
      end
  endfunction

  task automatic code_vop(int p, vop_type_e vt);
    vop_cycles = 0;
    for (int by = 0; by < VH; by += 16)
      for (int bx = 0; bx < VW; bx += 16) begin
        bab_t b, conv;
        bit   exp_bits[$];
        cr_e  exp_cr;
        int   ones, cyc, s;
        ones = 0;
        for (int r = 0; r < 16; r++)
          for (int c = 0; c < 16; c++) begin
            b[r][c] = plane[p][by+r][bx+c];
            ones += int'(b[r][c]);
          end
        for (int r = 0; r < 16; r++) begin
          @(negedge clk);
          cur_we = 1; cur_waddr = 4'(r);
          for (int c = 0; c < 16; c++) cur_wdata[15-c] = b[r][c];
        end
        @(negedge clk);
        cur_we = 0; got.delete();
        vop_type = vt; bab_x = 11'(bx); bab_y = 11'(by); mvp_x = 0; mvp_y = 0;
        alpha_thr = 5'd1; conv_en = 1; start = 1;
        @(negedge clk); start = 0;
        cyc = 1;
        while (!done) begin @(negedge clk); cyc++; end
        vop_cycles += cyc;
        n_type[int'(bab_type)]++;
        checks++;
        if (ones == 0 && bab_type != BAB_TRANSP) fail("transparent BAB misclassified");
        else if (ones == 256 && bab_type != BAB_OPAQUE) fail("opaque BAB misclassified");
        else if (ones != 0 && ones != 256) begin
          n_boundary++;
          if (vt == VOP_I && bab_type != BAB_INTRA_CAE) fail("I-VOP boundary BAB not intra coded");
          if (vt == VOP_P) begin
            s = 0;
            for (int r = 0; r < 16; r++)
              for (int c = 0; c < 16; c++)
                s += int'(b[r][c] != pix(refp, bx + int'(mv_x) + c, by + int'(mv_y) + r));
            checks++;
            if (s != int'(min_sad)) fail($sformatf("(%0d,%0d): min_sad %0d, block at mv differs in %0d", bx, by, min_sad, s));
            checks++;
            if ((bab_type == BAB_MVD0_NOUPD) != (s == 0 && mv_x == 0 && mv_y == 0) ||
                (bab_type == BAB_MVD_NOUPD)  != (s == 0 && (mv_x != 0 || mv_y != 0)))
              fail($sformatf("(%0d,%0d): bab_type %0d with sad %0d", bx, by, bab_type, s));
          end
          if (bab_type == BAB_INTRA_CAE) begin
            size_conv_model(b, 1, th, exp_cr, conv);
            cae_model(conv, blk_n(exp_cr), prob, exp_bits);
            checks += 2;
            if (cr != exp_cr) fail($sformatf("(%0d,%0d): cr %0d expected %0d", bx, by, cr, exp_cr));
            if (got != exp_bits) fail($sformatf("(%0d,%0d): code bits differ", bx, by));
          end
        end
        $display("VOP %0d BAB (%0d,%0d) type %0d cr %0d mv (%0d,%0d) sad %0d bits %0d cycles %0d",
                 p, bx, by, bab_type, cr, mv_x, mv_y, min_sad, nbits, cyc);
      end
  endtask

  initial begin
    int nb;
    n_type = '{default: 0};
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 1024; c++) begin
      prob[c] = ($countones(c) >= 6) ? 4000 : ($countones(c) <= 3) ? 61000 : 32768 + 1000 * ($countones(c) - 5);
      @(negedge clk); prob_we = 1; prob_addr = 10'(c); prob_data = 16'(prob[c]);
    end
    for (int c = 0; c < 256; c++) begin
      th[c] = default_th(c);
      @(negedge clk); prob_we = 0; th_we = 1; th_addr = 8'(c); th_data = 5'(th[c]);
    end
    @(negedge clk); th_we = 0;
    draw(0, 44, 30, 6);
    draw(1, 47, 28, 9);
    for (int v = 0; v < 2; v++) begin
      n_boundary = 0;
      refp = 0;
      code_vop(v, v == 0 ? VOP_I : VOP_P);
      nb = n_boundary > 0 ? n_boundary : 1;
      checks++;
      $display("VOP %0d: %0d cycles, %0d boundary BABs, %0d cycles per boundary BAB (budget 3297)",
               v, vop_cycles, n_boundary, vop_cycles / nb);
      if (vop_cycles > longint'(nb) * 3297) fail("VOP exceeds the CPL2 cycle budget");
    end
    checks++;
    if (n_type[0] + n_type[1] == 0 || n_type[2] == 0 || n_type[3] == 0 || n_type[4] == 0)
      fail($sformatf("not every BAB kind occurred: %p", n_type));
    $display("types: %p", n_type);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
