// ddbme: data-dispatch binary motion estimation. Finds, for the 16x16
// current BAB, the displacement (dx,dy) in [-16,15]^2 around the motion-vector
// predictor that minimises the number of mismatching pixels (SAD) against
// the reference VOP, and returns mv = mvp + (dx,dy).
//
// Sixteen SAD PEs each evaluate one of 16 horizontally adjacent candidates.
// Each cycle one 32-bit search-range row SR[31:0] is read from the SR buffer
// and dispatched without any shifting logic: PE k receives SR[31-k:16-k],
// and all PEs receive the same current-BAB row (broadcast). After 16 cycles
// the 16 SADs go to the compare-and-select unit, which scans them while the
// array already works on the next vertical offset. Reference rows enter the
// SR buffer through the shift-and-pack unit, which aligns a 48-pixel window
// of three VOP-memory words to the search-area column. Candidate order:
// dx -16..-1 for dy -16..15, then dx 0..15 for dy -16..15; the first minimum
// in that order wins.
//
// Interfaces: current-BAB memory and reference VOP memory are external
// synchronous-read ports (data one cycle after the request). The reference
// port takes a signed row and a signed 16-pixel word index; the memory is
// expected to return padding (zeros) outside the VOP. Timing: 'done' pulses
// 1139 cycles after 'start' (2 x 48 preload cycles, 1024 pass cycles, 19 cycles of pipeline
// and final scan). The source overlaps more of the preload and reports about
// 1072 cycles per BAB for this stage; this design keeps the preload separate.
module ddbme
  import shape_pkg::*;
#(
  parameter int NPE = 16          // PEs = BAB width, fixed by the dispatch
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic signed [10:0] bab_x,         // BAB position in pixels
  input  logic signed [10:0] bab_y,
  input  logic signed [7:0]  mvp_x,         // motion-vector predictor
  input  logic signed [7:0]  mvp_y,
  // current BAB memory read port
  output logic               cur_rd_en,
  output logic [3:0]         cur_rd_addr,
  input  logic [15:0]        cur_rd_data,
  // reference VOP memory read port
  output logic               ref_rd_en,
  output logic signed [10:0] ref_rd_row,
  output logic signed [6:0]  ref_rd_word,
  input  logic [15:0]        ref_rd_data,
  // result
  output logic               done,
  output logic               busy,
  output logic signed [7:0]  mv_x,
  output logic signed [7:0]  mv_y,
  output logic [SAD_W-1:0]   min_sad
);
  // ---------------- sequencing ----------------
  logic              rd_en, pe_first, pe_last, final_pass, f_en, half, agu_busy;
  logic [3:0]        sr_rd_addr;
  logic signed [5:0] pass_dx0, pass_dy;
  logic [5:0]        f_row;
  logic [1:0]        f_widx;

  bme_agu u_agu (
    .clk, .rst_n, .start,
    .rd_en, .sr_rd_addr, .cur_rd_addr, .pe_first, .pe_last, .final_pass,
    .pass_dx0, .pass_dy, .f_en, .f_row, .f_widx, .half, .busy(agu_busy)
  );
  assign cur_rd_en = rd_en;

  // ---------------- reference fetch and SAP ----------------
  logic signed [10:0] bx_q, by_q;
  logic signed [7:0]  mvpx_q, mvpy_q;
  logic signed [10:0] col0;
  logic               f_en_d;
  logic [1:0]         f_widx_d;
  logic [3:0]         f_slot_d;
  logic [31:0]        asm_q;
  logic [31:0]        sr_wdata;
  logic               sr_we;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bx_q <= '0; by_q <= '0; mvpx_q <= '0; mvpy_q <= '0;
    end else if (start && !busy) begin
      bx_q <= bab_x; by_q <= bab_y; mvpx_q <= mvp_x; mvpy_q <= mvp_y;
    end
  end

  assign col0        = bx_q + 11'(mvpx_q) - 11'sd16 + (half ? 11'sd16 : 11'sd0);
  assign ref_rd_en   = f_en;
  assign ref_rd_row  = by_q + 11'(mvpy_q) - 11'sd16 + 11'($signed({1'b0, f_row}));
  assign ref_rd_word = 7'(col0 >>> 4) + 7'($signed({1'b0, f_widx}));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      f_en_d <= 1'b0; f_widx_d <= '0; f_slot_d <= '0; asm_q <= '0;
    end else begin
      f_en_d   <= f_en;
      f_widx_d <= f_widx;
      f_slot_d <= f_row[3:0];
      if (f_en_d) asm_q <= {asm_q[15:0], ref_rd_data};
    end
  end

  sap u_sap (.win({asm_q, ref_rd_data}), .shift(col0[3:0]), .row32(sr_wdata));
  assign sr_we = f_en_d && (f_widx_d == 2'd2);

  // ---------------- SR buffer ----------------
  logic [31:0] sr_data;
  dp_sram #(.DEPTH(16), .WIDTH(32)) u_srbuf (
    .clk, .we(sr_we), .waddr(f_slot_d), .wdata(sr_wdata),
    .rd_en, .raddr(sr_rd_addr), .rd_data(sr_data)
  );

  // ---------------- PE array with data dispatch ----------------
  logic              en_d, first_d, last_d, final_d, load_q, final_q;
  logic signed [5:0] dx0_d, dy_d, dx0_q, dy_q;
  logic [NPE-1:0][SAD_W-1:0] sads;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      en_d <= 1'b0; first_d <= 1'b0; last_d <= 1'b0; final_d <= 1'b0;
      dx0_d <= '0; dy_d <= '0; load_q <= 1'b0; final_q <= 1'b0;
      dx0_q <= '0; dy_q <= '0;
    end else begin
      en_d    <= rd_en;
      first_d <= pe_first;
      last_d  <= pe_last;
      final_d <= final_pass;
      dx0_d   <= pass_dx0;
      dy_d    <= pass_dy;
      load_q  <= en_d && last_d;
      final_q <= final_d;
      dx0_q   <= dx0_d;
      dy_q    <= dy_d;
    end
  end

  for (genvar k = 0; k < NPE; k++) begin : g_pe
    sad_pe #(.W(16), .SADW(SAD_W)) u_pe (
      .clk, .rst_n, .en(en_d), .first(first_d),
      .cur_row(cur_rd_data), .ref_row(sr_data[31-k -: 16]), .sad(sads[k])
    );
  end

  // ---------------- compare and select ----------------
  logic signed [5:0] best_dx, best_dy;
  logic              cas_done;

  bme_cas #(.NPE(NPE)) u_cas (
    .clk, .rst_n, .clear(start && !busy), .load(load_q), .last(final_q),
    .sad_in(sads), .dx0(dx0_q), .dy(dy_q),
    .best_sad(min_sad), .best_dx, .best_dy, .done(cas_done)
  );

  logic tail;   // pipeline still draining after the sequencer stops
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)             tail <= 1'b0;
    else if (start && !busy) tail <= 1'b1;
    else if (cas_done)      tail <= 1'b0;
  end

  assign busy = agu_busy || tail;
  assign done = cas_done;
  assign mv_x = mvpx_q + 8'(best_dx);
  assign mv_y = mvpy_q + 8'(best_dy);
endmodule
