// shape_coder_top: binary-shape encoder for one 16x16 binary alpha block
// (BAB) at a time. The stages are:
//   1. mode decision (16 row reads): all transparent -> bab_type 2,
//      all opaque -> bab_type 3, otherwise a boundary BAB;
//   2. for a P-VOP, data-dispatch binary motion estimation over a
//      [-16,15]^2 window around the given predictor; a perfect match
//      (SAD 0) is sent as "no update" (bab_type 0 if mv equals the
//      predictor, else 1);
//   3. size conversion picks the conversion ratio 1/4, 1/2 or 1;
//   4. intra CAE codes the (possibly reduced) block: bab_type 4.
// For a P-VOP, steps 3 and 4 run while step 2 is still searching: they work
// on the BAB copy held by the mode decision, so they share no memory port
// with the search. If the search then finds an exact match, the CAE run is
// aborted and its bits are to be discarded; otherwise the BAB completes when
// both the search and the CAE have finished.
// The code bits appear on bit_valid/bit_out while CAE runs; they and nbits
// belong to the BAB only when the final bab_type is 4.
// The current BAB is written into an on-chip 16x16 memory through cur_we
// (leftmost pixel in the MSB) before 'start'. The reference VOP lives in an
// external memory reached through the ref_rd_* port (data one cycle after the
// request; zeros are expected outside the VOP). The motion-vector predictor
// is an input: predictor derivation, inter-CAE and the variable-length coding
// of bab_type and motion-vector differences are outside this unit.
// Running size conversion and intra-CAE alongside motion estimation follows
// the source's task schedule; pipelining successive BABs, which the source
// also does, is not built: the next BAB starts only after 'done'.
// 'done' pulses once per BAB with bab_type, mv, min_sad, cr and nbits valid.
module shape_coder_top
  import shape_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  // current BAB memory load
  input  logic               cur_we,
  input  logic [3:0]         cur_waddr,
  input  logic [15:0]        cur_wdata,
  // table loads
  input  logic               prob_we,
  input  logic [9:0]         prob_addr,
  input  logic [15:0]        prob_data,
  input  logic               th_we,
  input  logic [7:0]         th_addr,
  input  logic [4:0]         th_data,
  // per-BAB command
  input  logic               start,
  input  vop_type_e          vop_type,
  input  logic signed [10:0] bab_x,
  input  logic signed [10:0] bab_y,
  input  logic signed [7:0]  mvp_x,
  input  logic signed [7:0]  mvp_y,
  input  logic               conv_en,    // allow size conversion
  input  logic [4:0]         alpha_thr,  // accepted errors per 4x4 sub-block
  // reference VOP memory
  output logic               ref_rd_en,
  output logic signed [10:0] ref_rd_row,
  output logic signed [6:0]  ref_rd_word,
  input  logic [15:0]        ref_rd_data,
  // results
  output logic               busy,
  output logic               done,
  output bab_type_e          bab_type,
  output logic signed [7:0]  mv_x,
  output logic signed [7:0]  mv_y,
  output logic [SAD_W-1:0]   min_sad,
  output cr_e                cr,
  output logic               bit_valid,
  output logic               bit_out,
  output logic [15:0]        nbits
);
  typedef enum logic [2:0] {S_IDLE, S_MD, S_BME, S_SC, S_CAE} state_e;
  state_e state;

  // ---------------- current BAB memory ----------------
  logic       cur_rd_en, md_rd_en, me_rd_en;
  logic [3:0] cur_raddr, md_rd_addr, me_rd_addr;
  logic [15:0] cur_rd_data;

  dp_sram #(.DEPTH(16), .WIDTH(16)) u_curbab (
    .clk, .we(cur_we), .waddr(cur_waddr), .wdata(cur_wdata),
    .rd_en(cur_rd_en), .raddr(cur_raddr), .rd_data(cur_rd_data)
  );
  assign cur_rd_en = (state == S_BME) ? me_rd_en   : md_rd_en;
  assign cur_raddr = (state == S_BME) ? me_rd_addr : md_rd_addr;

  // ---------------- stages ----------------
  logic       md_start, md_busy, md_done;
  bab_class_e cls;
  bab_t       bab;
  mode_decision u_md (
    .clk, .rst_n, .start(md_start), .rd_en(md_rd_en), .rd_addr(md_rd_addr),
    .rd_data(cur_rd_data), .cls, .bab, .busy(md_busy), .done(md_done)
  );

  logic me_start, me_busy, me_done;
  logic signed [7:0] me_mvx, me_mvy;
  logic [SAD_W-1:0]  me_sad;
  ddbme u_me (
    .clk, .rst_n, .start(me_start), .bab_x, .bab_y, .mvp_x, .mvp_y,
    .cur_rd_en(me_rd_en), .cur_rd_addr(me_rd_addr), .cur_rd_data,
    .ref_rd_en, .ref_rd_row, .ref_rd_word, .ref_rd_data,
    .done(me_done), .busy(me_busy), .mv_x(me_mvx), .mv_y(me_mvy), .min_sad(me_sad)
  );

  logic sc_start, sc_busy, sc_done;
  cr_e  sc_cr;
  bab_t conv;
  size_conv u_sc (
    .clk, .rst_n, .start(sc_start), .enable(conv_en), .bab, .thr(alpha_thr),
    .th_we, .th_addr, .th_data, .cr(sc_cr), .conv, .busy(sc_busy), .done(sc_done)
  );

  logic cae_start, cae_cancel, cae_busy, cae_done;
  cae_coder u_cae (
    .clk, .rst_n, .start(cae_start), .cancel(cae_cancel), .bsize(sc_cr), .blk(conv),
    .prob_we, .prob_addr, .prob_data,
    .out_valid(bit_valid), .out_bit(bit_out), .nbits, .busy(cae_busy), .done(cae_done)
  );

  // ---------------- BAB-level control ----------------
  logic vop_p_q, me_fin, sc_fin, cae_fin;
  cr_e  cr_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; md_start <= 1'b0; me_start <= 1'b0; sc_start <= 1'b0;
      cae_start <= 1'b0; done <= 1'b0; bab_type <= BAB_TRANSP; vop_p_q <= 1'b0;
      me_fin <= 1'b0; sc_fin <= 1'b0; cae_fin <= 1'b0; cr_q <= CR_1; cae_cancel <= 1'b0;
      mv_x <= '0; mv_y <= '0; min_sad <= '0; cr <= CR_1;
    end else begin
      md_start <= 1'b0; me_start <= 1'b0; sc_start <= 1'b0; cae_start <= 1'b0;
      cae_cancel <= 1'b0; done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_MD; md_start <= 1'b1; vop_p_q <= (vop_type == VOP_P);
          mv_x <= '0; mv_y <= '0; min_sad <= '0; cr <= CR_1;
        end
        S_MD: if (md_done) begin
          if (cls == CLS_TRANSP) begin
            bab_type <= BAB_TRANSP; done <= 1'b1; state <= S_IDLE;
          end else if (cls == CLS_OPAQUE) begin
            bab_type <= BAB_OPAQUE; done <= 1'b1; state <= S_IDLE;
          end else if (vop_p_q) begin
            state <= S_BME; me_start <= 1'b1; sc_start <= 1'b1;
            me_fin <= 1'b0; sc_fin <= 1'b0; cae_fin <= 1'b0;
          end else begin
            state <= S_SC; sc_start <= 1'b1;
          end
        end
        S_BME: begin
          // motion estimation runs side by side with size conversion and
          // then intra CAE; an exact match drops the CAE run
          if (me_done) me_fin <= 1'b1;
          if (sc_done) begin sc_fin <= 1'b1; cae_start <= 1'b1; cr_q <= sc_cr; end
          if (cae_done) cae_fin <= 1'b1;
          if ((me_fin || me_done) && me_sad == '0 && sc_fin) begin
            mv_x <= me_mvx; mv_y <= me_mvy; min_sad <= me_sad;
            bab_type <= (me_mvx == mvp_x && me_mvy == mvp_y) ? BAB_MVD0_NOUPD
                                                             : BAB_MVD_NOUPD;
            cae_cancel <= 1'b1;
            done  <= 1'b1;
            state <= S_IDLE;
          end else if ((me_fin || me_done) && (cae_fin || cae_done)) begin
            mv_x <= me_mvx; mv_y <= me_mvy; min_sad <= me_sad;
            bab_type <= BAB_INTRA_CAE; cr <= cr_q;
            done  <= 1'b1;
            state <= S_IDLE;
          end
        end
        S_SC: if (sc_done) begin
          cr <= sc_cr; state <= S_CAE; cae_start <= 1'b1;
        end
        S_CAE: if (cae_done) begin
          bab_type <= BAB_INTRA_CAE; done <= 1'b1; state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  // mode decision runs alone; size conversion and CAE never overlap
  stages_exclusive: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({md_busy, me_busy | sc_busy | cae_busy}) && !(sc_busy && cae_busy));
endmodule
