// bme_cas: compare-and-select unit of the motion estimator. On 'load' it
// captures the 16 SADs of one pass of the PE array into 16 registers together
// with the pass's vertical offset and the horizontal offset of PE0. Over the
// next 16 cycles one comparator walks the registers (PE0 first) and keeps the
// smallest SAD and its displacement; a strictly smaller SAD is needed to
// replace the best, so the first minimum in scan order wins. 'clear' starts
// a new search. A load marked 'last' raises 'done' for one cycle once its 16
// entries have been compared. The 16 registers and single comparator follow
// the source; the tie rule and the load/clear protocol are this design's.
// A new load may arrive in the same cycle as the 16th comparison.
module bme_cas
  import shape_pkg::*;
#(
  parameter int NPE = 16
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         clear,
  input  logic                         load,
  input  logic                         last,
  input  logic [NPE-1:0][SAD_W-1:0]    sad_in,
  input  logic signed [5:0]            dx0,      // offset of PE0's candidate
  input  logic signed [5:0]            dy,
  output logic [SAD_W-1:0]             best_sad,
  output logic signed [5:0]            best_dx,
  output logic signed [5:0]            best_dy,
  output logic                         done
);
  localparam int IW = $clog2(NPE);

  logic [NPE-1:0][SAD_W-1:0] sad_q;
  logic signed [5:0]         dx0_q, dy_q;
  logic                      busy, last_q;
  logic [IW-1:0]             idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sad_q    <= '0;
      dx0_q    <= '0;
      dy_q     <= '0;
      busy     <= 1'b0;
      last_q   <= 1'b0;
      idx      <= '0;
      best_sad <= '1;
      best_dx  <= '0;
      best_dy  <= '0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      if (clear) begin
        best_sad <= '1;
        busy     <= 1'b0;
      end else if (busy) begin
        if (sad_q[idx] < best_sad) begin
          best_sad <= sad_q[idx];
          best_dx  <= dx0_q + 6'(idx);
          best_dy  <= dy_q;
        end
        idx <= idx + 1'b1;
        if (idx == IW'(NPE-1)) begin
          busy <= 1'b0;
          done <= last_q;
        end
      end
      if (load) begin
        sad_q  <= sad_in;
        dx0_q  <= dx0;
        dy_q   <= dy;
        last_q <= last;
        busy   <= 1'b1;
        idx    <= '0;
      end
    end
  end

  // A pass may only be loaded while the previous one is on its final entry.
  assert property (@(posedge clk) disable iff (!rst_n)
                   load && busy |-> idx == IW'(NPE-1));
endmodule
