// upsample: doubles the resolution of a binary block (4x4 -> 8x8 or
// 8x8 -> 16x16) with the MPEG-4 style 12-pixel interpolation template.
// Window around one "centre" (the crossing of low-resolution pixels A..D):
//        E F
//      L A B G
//      K C D H
//        J I
// Four high-resolution pixels sit around the centre, pixel 1 in A's cell,
// 2 in B's, 3 in C's and 4 in D's. Pixel 1 is
//   1 if 4A + 2(B+C+D) + (E+F+G+H+I+J+K+L) > Th[Cf], else 0,
// and pixels 2..4 use the same rule on the template mirrored left-right
// (pixel 2), top-bottom (pixel 3) or both (pixel 4). Cf is the 8-bit word
// {E,F,G,H,I,J,K,L} of the mirrored template and Th is a 256-entry table of
// 5-bit thresholds written through th_we. The weights follow the source; the
// Cf bit order, the mirroring and the table size are this design's reading of
// "a pre-defined permutation of E-L", and the table contents must be loaded.
//
// The low-resolution block, with a two-pixel border made by repeating its
// edge pixels, is streamed in raster order (stride S = N+4) through a
// delay-line chain so the whole window is available from fixed taps. At each
// centre the stream holds for four cycles while one shared upsampling PE
// produces pixels 1..4, one per cycle; then all pixels move on. Interface:
// 'start' with n8 (1: 8x8 input) and lo[y][x]; 'done' pulses when hi[y][x]
// holds the 2N x 2N result. 4x4 -> 8x8 takes 140 cycles, 8x8 -> 16x16 388.
module upsample
  import shape_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic                  n8,
  input  logic [7:0][7:0]       lo,       // lo[y][x]; 4x4 uses [3:0][3:0]
  input  logic                  th_we,
  input  logic [7:0]            th_addr,
  input  logic [4:0]            th_data,
  output bab_t                  hi,
  output logic                  busy,
  output logic                  done
);
  localparam int SMAX = 12;
  localparam int LEN  = 3*SMAX + 2;

  logic [4:0]        th_mem [256];
  always_ff @(posedge clk) if (th_we) th_mem[th_addr] <= th_data;

  logic              run;
  logic signed [5:0] px, py, n, cx, cy;
  logic [1:0]        sub;
  logic [LEN-1:0]    d;
  logic              pix, centre, step;
  int                s;

  assign n = n8 ? 6'sd8 : 6'sd4;
  assign s = n8 ? 12 : 8;

  // edge-replicated border pixel at (px,py)
  always_comb begin
    cx  = (px < 0) ? 6'sd0 : (px >= n) ? n - 6'sd1 : px;
    cy  = (py < 0) ? 6'sd0 : (py >= n) ? n - 6'sd1 : py;
    pix = lo[cy[2:0]][cx[2:0]];
  end

  // the pixel now on the input is the (unused) corner at (x+2, y+2)
  assign centre = run && px >= 6'sd1 && py >= 6'sd1;
  assign step   = run && (!centre || sub == 2'd3);

  // template taps, k pixels back from the input pixel are at d[k-1]
  logic tE, tF, tG, tH, tI, tJ, tK, tL, tA, tB, tC, tD;
  always_comb begin
    tE = d[1+3*s]; tF = d[3*s];   tL = d[2+2*s]; tA = d[1+2*s];
    tB = d[2*s];   tG = d[2*s-1]; tK = d[2+s];   tC = d[1+s];
    tD = d[s];     tH = d[s-1];   tJ = d[1];     tI = d[0];
  end

  // mirrored template for the pixel selected by sub
  logic        mh, mv;
  logic        a, b, c, dd, e, f, g, h, i, j, k, l;
  logic [4:0]  sum;
  logic [7:0]  cf;
  logic        val;
  logic signed [6:0] ox, oy;
  always_comb begin
    mh = sub[0];
    mv = sub[1];
    {a, b, c, dd, e, f, g, h, i, j, k, l} =
      {tA, tB, tC, tD, tE, tF, tG, tH, tI, tJ, tK, tL};
    if (mh) {a, b, c, dd, e, f, l, g, k, h, j, i} =
            {b, a, dd, c, f, e, g, l, h, k, i, j};
    if (mv) {a, c, b, dd, e, j, f, i, l, k, g, h} =
            {c, a, dd, b, j, e, i, f, k, l, h, g};
    sum = {2'b00, a, 2'b00}
        + {3'b000, b, 1'b0} + {3'b000, c, 1'b0} + {3'b000, dd, 1'b0}
        + 5'(e) + 5'(f) + 5'(g) + 5'(h) + 5'(i) + 5'(j) + 5'(k) + 5'(l);
    cf  = {e, f, g, h, i, j, k, l};
    val = (sum > th_mem[cf]);
    ox  = 7'({px - 6'sd2, 1'b1}) + 7'(mh);   // 2x+1 (+1 for mirrored)
    oy  = 7'({py - 6'sd2, 1'b1}) + 7'(mv);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0; px <= '0; py <= '0; sub <= '0; d <= '0; hi <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !run) begin
        run <= 1'b1; px <= -6'sd2; py <= -6'sd2; sub <= '0; hi <= '0;
      end else if (run) begin
        if (centre) begin
          sub <= sub + 2'd1;
          if (ox >= 0 && oy >= 0 && ox < 7'(2*n) && oy < 7'(2*n))
            hi[oy[3:0]][ox[3:0]] <= val;
        end
        if (step) begin
          d <= {d[LEN-2:0], pix};
          if (px == n + 6'sd1) begin
            px <= -6'sd2;
            py <= py + 6'sd1;
            if (py == n + 6'sd1) begin run <= 1'b0; done <= 1'b1; end
          end else px <= px + 6'sd1;
        end
      end
    end
  end

  assign busy = run;
endmodule
