// bac_encoder: binary arithmetic encoder for context-based arithmetic coding.
// It holds a 32-bit interval (low, range) and codes one binary symbol per
// accepted request, given p0 = probability that the symbol is 0 in units of
// 2^-16. The less probable symbol (LPS) gets the sub-interval
// rLPS = (range >> 16) * pLPS at the bottom of the interval; the more
// probable symbol takes the rest. While range <= 2^30 the interval is doubled
// (renormalised) one step per cycle, emitting a bit when the interval lies in
// one half, or counting a pending "follow" bit when it straddles the middle;
// pending bits are emitted, one per cycle, after the next decided bit.
// 'flush' terminates the code word with the usual two-bit rule.
// The source adapts a Q-Coder for this unit without giving its insides; the
// interval arithmetic here is a plain integer arithmetic coder of this
// design's own, not a bit-exact MPEG-4 coder.
// Handshake: a symbol or flush is taken when in_valid/flush && ready.
// A symbol that needs no renormalisation takes one cycle; each renormalising
// step adds one cycle plus one per pending follow bit.
module bac_encoder (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        init,          // restart the coder (new block)
  input  logic        in_valid,
  input  logic        in_bit,
  input  logic [15:0] p0,
  input  logic        flush,
  output logic        ready,
  output logic        out_valid,
  output logic        out_bit,
  output logic        flushed        // one-cycle pulse when the flush is done
);
  localparam logic [32:0] HALF    = 33'h0_8000_0000;
  localparam logic [32:0] QUARTER = 33'h0_4000_0000;

  typedef enum logic [1:0] {S_READY, S_RENORM, S_FOLLOW, S_TERM} state_e;
  state_e      state, ret_state;
  logic [32:0] low, range;
  logic [15:0] follow, fcnt;
  logic        fbit;

  // symbol interval update
  logic        lps;
  logic [16:0] plps;
  logic [32:0] rlps, n_low, n_range;
  always_comb begin
    lps     = (p0 > 16'd32768);      // 1 is the LPS when p0 > 1/2
    plps    = lps ? 17'h10000 - 17'(p0) : 17'(p0);
    rlps    = 33'(range[31:16] * plps);
    if (rlps == 0) rlps = 33'd1;
    if (in_bit == lps) begin
      n_low   = low;
      n_range = rlps;
    end else begin
      n_low   = low + rlps;
      n_range = range - rlps;
    end
  end

  assign ready = (state == S_READY) && !init;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_READY; ret_state <= S_READY;
      low <= '0; range <= 33'h0_FFFF_FFFF; follow <= '0; fcnt <= '0; fbit <= 1'b0;
      out_valid <= 1'b0; out_bit <= 1'b0; flushed <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      flushed   <= 1'b0;
      if (init) begin
        state <= S_READY; low <= '0; range <= 33'h0_FFFF_FFFF; follow <= '0;
      end else begin
        unique case (state)
          S_READY: begin
            if (flush) begin
              // two-bit termination: one decided bit, pending bits, then done
              out_valid    <= 1'b1;
              out_bit      <= (low >= QUARTER);
              fbit         <= !(low >= QUARTER);
              fcnt         <= follow + 16'd1;
              follow       <= '0;
              state        <= S_FOLLOW;
              ret_state    <= S_TERM;
            end else if (in_valid) begin
              low   <= n_low;
              range <= n_range;
              if (n_range <= QUARTER) state <= S_RENORM;
            end
          end
          S_RENORM: begin
            if (range > QUARTER) state <= S_READY;
            else begin
              if (low >= HALF) begin
                out_valid <= 1'b1; out_bit <= 1'b1;
                fbit <= 1'b0; fcnt <= follow; follow <= '0;
                low <= (low - HALF) << 1;
                if (follow != 0) begin state <= S_FOLLOW; ret_state <= S_RENORM; end
              end else if (low + range <= HALF) begin
                out_valid <= 1'b1; out_bit <= 1'b0;
                fbit <= 1'b1; fcnt <= follow; follow <= '0;
                low <= low << 1;
                if (follow != 0) begin state <= S_FOLLOW; ret_state <= S_RENORM; end
              end else begin
                follow <= follow + 16'd1;
                low    <= (low - QUARTER) << 1;
              end
              range <= range << 1;
            end
          end
          S_FOLLOW: begin
            out_valid <= 1'b1;
            out_bit   <= fbit;
            fcnt      <= fcnt - 16'd1;
            if (fcnt == 16'd1) state <= ret_state;
          end
          S_TERM: begin
            flushed <= 1'b1;
            low <= '0; range <= 33'h0_FFFF_FFFF; follow <= '0;
            state <= S_READY;
          end
          default: state <= S_READY;
        endcase
      end
    end
  end
endmodule
