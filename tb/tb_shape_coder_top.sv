// tb_shape_coder_top: end-to-end test of the shape encoder at its default
// size. A synthetic reference VOP (random discs) sits in a model of the
// external VOP memory. BABs of every kind are coded in turn: transparent,
// opaque, intra boundary BABs whose size conversion ends at each ratio, and
// P-VOP BABs that are exact copies of the reference (no update, with zero
// and non-zero MV difference) or noisy copies (motion estimation, then
// size conversion and CAE, which run while the search goes on and are
// aborted when it finds an exact match). Expected bab_type, motion vector, SAD, ratio
// and code bits come from the reference models. Each mechanism must occur at
// least once, and a P-VOP boundary BAB must finish within 3034 cycles, the
// per-BAB budget of the unpipelined schedule.
module tb_shape_coder_top;
  import shape_pkg::*;
  import shape_ref_pkg::*;
  localparam int IW = 128, IH = 96;
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

  bit  img [IH][IW];
  int  prob[1024], th[256];
  bit  got[$];
  int  n_type[7], n_cr[3], n_stall, n_abort;
  int  checks = 0, failures = 0;

  typedef struct {
    bab_t      b;
    vop_type_e vt;
    int        bx, by, px, py, thr;
    bit        cen;
    string     name;
  } case_t;
  case_t cases[$];

  shape_coder_top dut (.*);
  always #5 clk = ~clk;

  function automatic bit pix(int x, int y);
    if (x < 0 || y < 0 || x >= IW || y >= IH) return 0;
    return img[y][x];
  endfunction

  always_ff @(posedge clk)
    if (ref_rd_en)
      for (int b = 0; b < 16; b++)
        ref_rd_data[15-b] <= pix(16*int'(ref_rd_word) + b, int'(ref_rd_row));

  always @(posedge clk) begin
    if (bit_valid) got.push_back(bit_out);
    if (bit_valid) n_stall++;        // each code bit holds the CAE stream
    if (dut.cae_cancel) n_abort++;    // speculative CAE dropped after a match
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string s);
    failures++;
    $display("FAIL: %s", s);
  endtask

  // exhaustive search in the unit's candidate order
  // (loop bounds are run-time values so the simulator does not unroll them)
  int n16 = 0;
  function automatic void bme_model(bab_t b, int bx, int by, int px, int py,
                                    output int best, output int mx, output int my);
    best = 1 << 20; mx = 0; my = 0;
    for (int h = 0; h < n16 / 8; h++)
      for (int dy = -n16; dy < n16; dy++)
        for (int k = 0; k < n16; k++) begin
          int dx, s;
          dx = -16 + 16*h + k; s = 0;
          for (int r = 0; r < n16; r++)
            for (int c = 0; c < n16; c++)
              s += (b[r][c] != pix(bx + px + dx + c, by + py + dy + r));
          if (s < best) begin best = s; mx = px + dx; my = py + dy; end
        end
  endfunction

  task automatic code_bab(case_t cs);
    bab_t b;
    vop_type_e vt;
    int bx, by, px, py, thr;
    bit cen;
    string name;
    bab_type_e exp_type;
    cr_e  exp_cr;
    bab_t conv;
    bit   exp_bits[$];
    int   ones, best, mx, my, cyc;
    bit   coded;
    b = cs.b; vt = cs.vt; bx = cs.bx; by = cs.by; px = cs.px; py = cs.py;
    thr = cs.thr; cen = cs.cen; name = cs.name;
    // expected result
    ones = 0;
    for (int r = 0; r < 16; r++) ones += $countones(b[r]);
    coded = 0; exp_cr = CR_1; best = 0; mx = 0; my = 0;
    if (ones == 0) exp_type = BAB_TRANSP;
    else if (ones == 256) exp_type = BAB_OPAQUE;
    else begin
      if (vt == VOP_P) bme_model(b, bx, by, px, py, best, mx, my);
      if (vt == VOP_P && best == 0)
        exp_type = (mx == px && my == py) ? BAB_MVD0_NOUPD : BAB_MVD_NOUPD;
      else begin
        exp_type = BAB_INTRA_CAE;
        coded = 1;
        if (cen) size_conv_model(b, thr, th, exp_cr, conv);
        else begin exp_cr = CR_1; conv = b; end
        cae_model(conv, blk_n(exp_cr), prob, exp_bits);
      end
    end
    // load the BAB (leftmost pixel in the MSB) and run
    for (int r = 0; r < 16; r++) begin
      @(negedge clk);
      cur_we = 1; cur_waddr = 4'(r);
      for (int c = 0; c < 16; c++) cur_wdata[15-c] = b[r][c];
    end
    @(negedge clk);
    cur_we = 0; got.delete();
    vop_type = vt; bab_x = 11'(bx); bab_y = 11'(by); mvp_x = 8'(px); mvp_y = 8'(py);
    alpha_thr = 5'(thr); conv_en = cen; start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (bab_type != exp_type) fail($sformatf("%s: bab_type %0d expected %0d", name, bab_type, exp_type));
    if (vt == VOP_P && ones != 0 && ones != 256) begin
      checks++;
      if (int'(mv_x) != mx || int'(mv_y) != my || int'(min_sad) != best)
        fail($sformatf("%s: mv (%0d,%0d) sad %0d expected (%0d,%0d) %0d",
                       name, mv_x, mv_y, min_sad, mx, my, best));
      checks++;
      if (cyc > 3034) fail($sformatf("%s: %0d cycles", name, cyc));
    end
    if (coded) begin
      checks += 2;
      if (cr != exp_cr) fail($sformatf("%s: cr %0d expected %0d", name, cr, exp_cr));
      if (got != exp_bits || int'(nbits) != exp_bits.size())
        fail($sformatf("%s: %0d code bits, expected %0d", name, got.size(), exp_bits.size()));
      n_cr[int'(cr)]++;
    end
    n_type[int'(bab_type)]++;
    $display("%-22s type %0d cr %0d mv (%0d,%0d) sad %0d bits %0d cycles %0d",
             name, bab_type, cr, mv_x, mv_y, min_sad, nbits, cyc);
  endtask

  function automatic void add(bab_t b, vop_type_e vt, int bx, int by, int px, int py,
                              int thr, bit cen, string name);
    case_t c;
    c.b = b; c.vt = vt; c.bx = bx; c.by = by; c.px = px; c.py = py;
    c.thr = thr; c.cen = cen; c.name = name;
    cases.push_back(c);
  endfunction

  function automatic bab_t cut(int x0, int y0, int noise);
    bab_t b;
    for (int r = 0; r < 16; r++)
      for (int c = 0; c < 16; c++) begin
        b[r][c] = pix(x0 + c, y0 + r);
        if (noise > 0 && ($urandom % noise) == 0) b[r][c] = ~b[r][c];
      end
    return b;
  endfunction

  function automatic bit mixed(bab_t b);
    int ones;
    ones = 0;
    for (int r = 0; r < 16; r++) ones += $countones(b[r]);
    return ones > 20 && ones < 236;
  endfunction

  initial begin
    bab_t b;
    n16 = 16;
    for (int y = 0; y < IH; y++) for (int x = 0; x < IW; x++) img[y][x] = 0;
    for (int k = 0; k < 20; k++) begin
      int cx, cy, r;
      cx = $urandom % IW; cy = $urandom % IH; r = 4 + $urandom % 10;
      for (int y = 0; y < IH; y++) for (int x = 0; x < IW; x++)
        if ((x-cx)*(x-cx) + (y-cy)*(y-cy) <= r*r) img[y][x] = ~img[y][x];
    end
    n_type = '{default: 0}; n_cr = '{default: 0}; n_stall = 0; n_abort = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 1024; c++) begin
      int ones;
      ones = $countones(c);
      prob[c] = (ones >= 6) ? 4000 : (ones <= 3) ? 61000 : 32768 + 1000 * (ones - 5);
      @(negedge clk); prob_we = 1; prob_addr = 10'(c); prob_data = 16'(prob[c]);
    end
    for (int c = 0; c < 256; c++) begin
      th[c] = default_th(c);
      @(negedge clk); prob_we = 0; th_we = 1; th_addr = 8'(c); th_data = 5'(th[c]);
    end
    @(negedge clk); th_we = 0;

    // transparent and opaque
    add('0, VOP_I, 48, 32, 0, 0, 0, 1, "transparent");
    add('1, VOP_P, 48, 32, 2, 1, 0, 1, "opaque");
    // intra boundary BABs reaching each conversion ratio
    for (int y = 0; y < 16; y++) for (int x = 0; x < 16; x++) b[y][x] = (y >= 8);
    add(b, VOP_I, 16, 16, 0, 0, 2, 1, "intra half plane");
    for (int y = 0; y < 16; y++) for (int x = 0; x < 16; x++) b[y][x] = (x + y > 13);
    add(b, VOP_I, 16, 16, 0, 0, 4, 1, "intra diagonal");
    for (int y = 0; y < 16; y++) for (int x = 0; x < 16; x++) b[y][x] = ((x-8)*(x-8) + (y-8)*(y-8) < 30);
    add(b, VOP_I, 16, 16, 0, 0, 3, 1, "intra disc");
    for (int y = 0; y < 16; y++) b[y] = 16'($urandom);
    add(b, VOP_I, 16, 16, 0, 0, 2, 1, "intra noise");
    for (int y = 0; y < 16; y++) for (int x = 0; x < 16; x++) b[y][x] = (y > 5) && (x % 5 != 0);
    add(b, VOP_I, 16, 16, 0, 0, 0, 0, "intra no conversion");
    // P-VOP: exact copies give "no update", noisy copies are coded
    for (int t = 0; t < 6; t++) begin
      int bx, by, px, py, ox, oy, tries;
      tries = 0;
      do begin
        bx = 32 + 16 * ($urandom % 4); by = 32 + 16 * ($urandom % 2);
        px = int'($urandom % 9) - 4;   py = int'($urandom % 9) - 4;
        ox = (t % 3 == 0) ? 0 : int'($urandom % 20) - 10;
        oy = (t % 3 == 0) ? 0 : int'($urandom % 20) - 10;
        b  = cut(bx + px + ox, by + py + oy, (t % 3 == 2) ? 12 : 0);
        tries++;
      end while (!mixed(b) && tries < 200);
      add(b, VOP_P, bx, by, px, py, 3, 1, $sformatf("P-VOP %0d", t));
    end

    foreach (cases[i]) code_bab(cases[i]);

    // every mechanism must have happened
    begin
      string nm[7] = '{"no update mvd=0", "no update mvd!=0", "transparent", "opaque",
                       "intra CAE", "inter mvd=0", "inter mvd!=0"};
      for (int k = 0; k < 5; k++) begin
        checks++;
        if (n_type[k] == 0) fail($sformatf("bab_type %s never produced", nm[k]));
      end
    end
    for (int k = 0; k < 3; k++) begin
      checks++;
      if (n_cr[k] == 0) fail($sformatf("conversion ratio code %0d never chosen", k));
    end
    checks++;
    if (n_stall == 0) fail("arithmetic coder never stalled the CAE stream");
    checks++;
    if (n_abort == 0) fail("CAE run alongside motion estimation never aborted");
    $display("types: %p  ratios (1,1/2,1/4): %p  code bits: %0d", n_type, n_cr, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
