// bme_agu: address generation and sequencing for the data-dispatch motion
// estimator. A search is done in two halves: horizontal offsets -16..-1, then
// 0..15 (regions I+II, then II+III of the search area). For each half the
// unit first preloads 16 search-range rows into the 16-entry SR buffer (three
// 16-bit reference words per row), then runs 32 passes, one per vertical
// offset -16..15. A pass reads 16 SR-buffer rows and 16 current-BAB rows, one
// of each per cycle. While pass j runs, the row needed by pass j+1 is fetched
// in cycles 1..3 and written over the slot pass j read in cycle 0, so the
// buffer never holds more than 16 rows. SR-buffer slot = row offset mod 16.
// All outputs are decoded from the state counters in the same cycle. The
// two-half order and the 16x32 buffer follow the source; the preload
// schedule, the overlapped refill and the three-word fetch are this design's.
module bme_agu (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  // read side: current BAB memory and SR buffer, data back next cycle
  output logic              rd_en,
  output logic [3:0]        sr_rd_addr,
  output logic [3:0]        cur_rd_addr,
  output logic              pe_first,       // row 0 of a pass
  output logic              pe_last,        // row 15 of a pass
  output logic              final_pass,     // pass is the last of the search
  output logic signed [5:0] pass_dx0,       // -16 or 0
  output logic signed [5:0] pass_dy,        // -16..15
  // reference fetch side
  output logic              f_en,
  output logic [5:0]        f_row,          // row offset 0..46 in search area
  output logic [1:0]        f_widx,         // word 0..2 of the 48-pixel window
  output logic              half,           // 0: dx -16..-1, 1: dx 0..15
  output logic              busy
);
  typedef enum logic [1:0] {S_IDLE, S_PRE, S_PASS} state_e;
  state_e     state;
  logic [4:0] j;        // pass = vertical offset index 0..31
  logic [3:0] t;        // row within pass, or preload row
  logic [1:0] w;        // word within a fetched row

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      j     <= '0;
      t     <= '0;
      w     <= '0;
      half  <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_PRE;
          half  <= 1'b0;
          t     <= '0;
          w     <= '0;
        end
        S_PRE: begin
          w <= (w == 2'd2) ? 2'd0 : w + 2'd1;
          if (w == 2'd2) begin
            t <= t + 4'd1;
            if (t == 4'd15) begin
              state <= S_PASS;
              j     <= '0;
            end
          end
        end
        S_PASS: begin
          t <= t + 4'd1;
          if (t == 4'd15) begin
            j <= j + 5'd1;
            if (j == 5'd31) begin
              if (half) state <= S_IDLE;
              else begin
                state <= S_PRE;
                half  <= 1'b1;
                w     <= '0;
              end
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    rd_en       = (state == S_PASS);
    sr_rd_addr  = 4'(j) + t;
    cur_rd_addr = t;
    pe_first    = (t == 4'd0);
    pe_last     = (t == 4'd15);
    final_pass  = half && (j == 5'd31);
    pass_dx0    = half ? 6'sd0 : -6'sd16;
    pass_dy     = $signed({1'b0, j}) - 6'sd16;
    f_en        = 1'b0;
    f_row       = '0;
    f_widx      = '0;
    if (state == S_PRE) begin
      f_en   = 1'b1;
      f_row  = {2'b00, t};
      f_widx = w;
    end else if (state == S_PASS && j != 5'd31 && t >= 4'd1 && t <= 4'd3) begin
      f_en   = 1'b1;
      f_row  = 6'(j) + 6'd16;
      f_widx = 2'(t - 4'd1);
    end
    busy = (state != S_IDLE);
  end
endmodule
