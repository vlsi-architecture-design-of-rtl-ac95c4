// size_conv: conversion-ratio (CR) decision for a boundary BAB. The BAB is
// first reduced to 4x4 and blown back up to 16x16 (4->8->16 with the
// upsampling unit); if the accepted-quality test passes, CR = 1/4 and the
// 4x4 block is what CAE codes. Otherwise the 8x8 reduction is tried the same
// way (8->16) for CR = 1/2, and if that fails too CR = 1 and the BAB is coded
// at full size. With 'enable' low the unit answers CR = 1 at once.
// Interface: 'start' with 'bab' and 'thr' (accepted errors per 4x4
// sub-block); 'done' pulses with 'cr' and 'conv' (the block to code, in the
// top-left corner). Worst case (CR = 1) takes about 530 + 390 cycles. The
// trial order 1/4, 1/2, 1 follows the source's size-conversion procedure;
// the handshake is this design's.
module size_conv
  import shape_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        enable,
  input  bab_t        bab,
  input  logic [4:0]  thr,
  input  logic        th_we,        // upsampling threshold table write
  input  logic [7:0]  th_addr,
  input  logic [4:0]  th_data,
  output cr_e         cr,
  output bab_t        conv,
  output logic        busy,
  output logic        done
);
  typedef enum logic [2:0] {S_IDLE, S_Q48, S_Q816, S_QCHK, S_H816, S_HCHK} state_e;
  state_e         state;
  bab_t           bab_q, up_hi;
  logic [7:0][7:0] lo4, lo2, up_lo;
  logic           up_start, up_n8, up_busy, up_done, accept;

  downsample u_d4 (.bab(bab_q), .quarter(1'b1), .lo(lo4));
  downsample u_d2 (.bab(bab_q), .quarter(1'b0), .lo(lo2));

  upsample u_up (
    .clk, .rst_n, .start(up_start), .n8(up_n8), .lo(up_lo),
    .th_we, .th_addr, .th_data, .hi(up_hi), .busy(up_busy), .done(up_done)
  );

  acq_detect u_acq (.orig(bab_q), .recon(up_hi), .thr, .accept);

  logic launched;   // upsampling of the current state has been started
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; bab_q <= '0; up_lo <= '0; up_n8 <= 1'b0; up_start <= 1'b0;
      launched <= 1'b0; cr <= CR_1; conv <= '0; done <= 1'b0;
    end else begin
      done     <= 1'b0;
      up_start <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          bab_q <= bab;
          if (enable) begin
            state <= S_Q48; launched <= 1'b0;
          end else begin
            cr <= CR_1; conv <= bab; done <= 1'b1;
          end
        end
        S_Q48: if (!launched) begin
          up_lo <= lo4; up_n8 <= 1'b0; up_start <= 1'b1; launched <= 1'b1;
        end else if (up_done) begin
          state <= S_Q816; launched <= 1'b0;
        end
        S_Q816: if (!launched) begin
          up_n8 <= 1'b1; up_start <= 1'b1; launched <= 1'b1;
          for (int y = 0; y < 8; y++) up_lo[y] <= up_hi[y][7:0];
        end else if (up_done) state <= S_QCHK;
        S_QCHK: if (accept) begin
          cr <= CR_1_4; conv <= '0; done <= 1'b1; state <= S_IDLE;
          for (int y = 0; y < 4; y++) conv[y][3:0] <= lo4[y][3:0];
        end else begin
          state <= S_H816; launched <= 1'b0;
        end
        S_H816: if (!launched) begin
          up_lo <= lo2; up_n8 <= 1'b1; up_start <= 1'b1; launched <= 1'b1;
        end else if (up_done) state <= S_HCHK;
        S_HCHK: begin
          state <= S_IDLE; done <= 1'b1;
          if (accept) begin
            cr <= CR_1_2; conv <= '0;
            for (int y = 0; y < 8; y++) conv[y][7:0] <= lo2[y];
          end else begin
            cr <= CR_1; conv <= bab_q;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  // an upsampling run is only started when the unit is idle
  up_idle_on_start: assert property (@(posedge clk) disable iff (!rst_n)
    up_start |-> !up_busy);
endmodule
