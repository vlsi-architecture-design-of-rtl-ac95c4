// cae_coder: reconfigurable context-based arithmetic encoder for one block of
// 16x16, 8x8 or 4x4 pixels (the size follows the conversion ratio). A
// sequencer streams the bordered block in raster order into the DLM context
// generator (cae_ctx); for every pixel of the block the 10-bit context
// addresses the probability table and the pixel is coded by the binary
// arithmetic encoder, which may stall the stream while it renormalises.
// Border pixels only flow through the DLM. At the end the code word is
// terminated and 'done' pulses.
// Border rule: the two rows above and two columns left are taken as
// transparent (0), as for a BAB at the top-left of a VOP (the surrounding
// BABs are not held by this unit); the top-right border is likewise 0, and
// for rows inside the block the unknown right border repeats the rightmost
// pixel of the row, as the source prescribes.
// Probability table: 1024 x 16-bit p0 values written through prob_we. The
// normative MPEG-4 intra table is not reproduced here and must be loaded.
// 'cancel' returns the unit to idle at once and restarts the coder, so a
// block whose code turns out not to be needed is dropped.
// Timing: (N+2)*(N+4) stream cycles plus renormalisation and output cycles;
// one cycle per block pixel when no renormalisation is needed.
module cae_coder
  import shape_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        cancel,          // drop the block being coded
  input  cr_e         bsize,
  input  bab_t        blk,             // block in blk[y][x], 0 <= x,y < N
  input  logic        prob_we,
  input  logic [9:0]  prob_addr,
  input  logic [15:0] prob_data,
  output logic        out_valid,
  output logic        out_bit,
  output logic [15:0] nbits,           // code bits emitted for this block
  output logic        busy,
  output logic        done
);
  typedef enum logic [1:0] {S_IDLE, S_STREAM, S_FLUSH, S_WAIT} state_e;
  state_e            state;
  logic signed [5:0] px, py, n;
  logic              pix, active, shift, bac_ready, flushed;
  logic [9:0]        ctx;
  logic [15:0]       prob_mem [1024];

  always_ff @(posedge clk) if (prob_we) prob_mem[prob_addr] <= prob_data;

  always_comb begin
    unique case (bsize)
      CR_1_2:  n = 6'sd8;
      CR_1_4:  n = 6'sd4;
      default: n = 6'sd16;
    endcase
  end

  always_comb begin
    pix    = 1'b0;
    active = 1'b0;
    if (py >= 0 && px >= 0) begin
      if (px >= n) pix = blk[py[3:0]][4'(n - 6'sd1)];
      else begin
        pix    = blk[py[3:0]][px[3:0]];
        active = 1'b1;
      end
    end
    shift = (state == S_STREAM) && (active ? bac_ready : 1'b1);
  end

  cae_ctx u_ctx (
    .clk, .rst_n, .bsize, .clear(start && state == S_IDLE), .shift, .pix_in(pix), .ctx
  );

  bac_encoder u_bac (
    .clk, .rst_n, .init((start && state == S_IDLE) || cancel),
    .in_valid(state == S_STREAM && active), .in_bit(pix), .p0(prob_mem[ctx]),
    .flush(state == S_FLUSH), .ready(bac_ready), .out_valid, .out_bit, .flushed
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; px <= '0; py <= '0; nbits <= '0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (out_valid) nbits <= nbits + 16'd1;
      if (cancel) state <= S_IDLE;
      else unique case (state)
        S_IDLE: if (start) begin
          state <= S_STREAM; px <= -6'sd2; py <= -6'sd2; nbits <= '0;
        end
        S_STREAM: if (shift) begin
          if (px == n + 6'sd1) begin
            px <= -6'sd2;
            py <= py + 6'sd1;
            if (py == n - 6'sd1) state <= S_FLUSH;
          end else px <= px + 6'sd1;
        end
        S_FLUSH: if (bac_ready) state <= S_WAIT;
        S_WAIT:  if (flushed) begin state <= S_IDLE; done <= 1'b1; end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);
endmodule
