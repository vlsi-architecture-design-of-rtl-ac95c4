// tb_ddbme: binary motion estimation on a synthetic reference VOP (random
// blobs, zeros outside the VOP). The current BAB is cut from the reference
// at a known displacement around the predictor, sometimes with flipped
// pixels, sometimes unrelated. An exhaustive search done here over
// [-16,15]^2, in the unit's candidate order, gives the expected motion
// vector and SAD. Also checks the latency from start to done (1139 cycles).
module tb_ddbme;
  import shape_pkg::*;
  localparam int IW = 128, IH = 96;
  logic clk = 0, rst_n = 0, start = 0;
  logic signed [10:0] bab_x, bab_y;
  logic signed [7:0]  mvp_x, mvp_y, mv_x, mv_y;
  logic cur_rd_en, ref_rd_en, done, busy;
  logic [3:0] cur_rd_addr;
  logic [15:0] cur_rd_data, ref_rd_data;
  logic signed [10:0] ref_rd_row;
  logic signed [6:0]  ref_rd_word;
  logic [SAD_W-1:0] min_sad;
  bit   img [IH][IW];
  logic [15:0] cur [16];
  int n16 = 0;
  int checks = 0, failures = 0;

  ddbme dut (.*);
  always #5 clk = ~clk;

  function automatic bit pix(int x, int y);
    if (x < 0 || y < 0 || x >= IW || y >= IH) return 0;
    return img[y][x];
  endfunction

  // external memories: synchronous read, one cycle latency
  always_ff @(posedge clk) begin
    if (cur_rd_en) cur_rd_data <= cur[cur_rd_addr];
    if (ref_rd_en)
      for (int b = 0; b < 16; b++)
        ref_rd_data[15-b] <= pix(16*int'(ref_rd_word) + b, int'(ref_rd_row));
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    n16 = 16;
    // blobs
    for (int y = 0; y < IH; y++) for (int x = 0; x < IW; x++) img[y][x] = 0;
    for (int b = 0; b < 25; b++) begin
      int cx, cy, r;
      cx = $urandom % IW; cy = $urandom % IH; r = 3 + $urandom % 10;
      for (int y = 0; y < IH; y++) for (int x = 0; x < IW; x++)
        if ((x-cx)*(x-cx) + (y-cy)*(y-cy) <= r*r) img[y][x] = ~img[y][x];
    end
    bab_x = 0; bab_y = 0; mvp_x = 0; mvp_y = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 8; t++) begin
      int bx, by, px, py, tx, ty, best, bdx, bdy, cyc;
      bx = 32 + 16 * ($urandom % 4); by = 32 + 16 * ($urandom % 2);
      px = int'($urandom % 9) - 4;   py = int'($urandom % 9) - 4;
      tx = int'($urandom % 32) - 16; ty = int'($urandom % 32) - 16;
      for (int r = 0; r < 16; r++)
        for (int c = 0; c < 16; c++) begin
          bit v;
          v = pix(bx + px + tx + c, by + py + ty + r);
          if (t % 3 == 1 && ($urandom % 20) == 0) v = ~v;
          if (t % 4 == 3) v = $urandom % 2;
          cur[r][15-c] = v;
        end
      // reference search in the unit's order
      // (run-time loop bounds keep the simulator from unrolling the search)
      best = 1 << 20; bdx = 0; bdy = 0;
      for (int h = 0; h < n16 / 8; h++)
        for (int dy = -n16; dy < n16; dy++)
          for (int k = 0; k < n16; k++) begin
            int dx, s;
            dx = -16 + 16*h + k; s = 0;
            for (int r = 0; r < n16; r++)
              for (int c = 0; c < n16; c++)
                s += (cur[r][15-c] != pix(bx + px + dx + c, by + py + dy + r));
            if (s < best) begin best = s; bdx = dx; bdy = dy; end
          end
      @(negedge clk);
      bab_x = 11'(bx); bab_y = 11'(by); mvp_x = 8'(px); mvp_y = 8'(py); start = 1;
      @(negedge clk); start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks += 2;
      if (int'(min_sad) != best || int'(mv_x) != px + bdx || int'(mv_y) != py + bdy) begin
        failures++;
        $display("trial %0d: got sad %0d mv (%0d,%0d), expected %0d (%0d,%0d)", t,
                 min_sad, mv_x, mv_y, best, px + bdx, py + bdy);
      end
      if (cyc != 1139) begin failures++; $display("latency %0d", cyc); end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
