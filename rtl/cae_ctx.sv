// cae_ctx: delay-line model (DLM) producing the 10-bit intra-CAE context.
// The block to code is streamed in raster order together with its border:
// two rows above, two columns left and two columns right, so a row of the
// stream is S = N+4 pixels (N = 16, 8 or 4). Every pixel shifts one place
// along a 41-stage shift chain (two delay lines plus the context box). The
// taps that form the context of the pixel now on pix_in sit at fixed
// distances of 1, 2, S-3..S+1 and 2S-2..2S back; the block size only changes
// S, so the virtual length of the delay lines is chosen by multiplexers on
// the taps while the chain itself stays 2*20+1 long, as in the source's
// configurable DLM. Context bits (MPEG-4 intra template):
//   c0 (x-1,y)   c1 (x-2,y)   c2 (x+2,y-1) c3 (x+1,y-1) c4 (x,y-1)
//   c5 (x-1,y-1) c6 (x-2,y-1) c7 (x+1,y-2) c8 (x,y-2)   c9 (x-1,y-2)
// ctx is combinational from the chain and describes the pixel on pix_in;
// 'shift' moves that pixel into the chain at the clock edge. Feeding the
// border (including the rule that the unknown right border repeats the
// rightmost pixel of the row) is the caller's job; the source instead keeps
// left/top-right border pixels in dedicated L and R registers.
module cae_ctx
  import shape_pkg::*;
#(
  parameter int SMAX = BAB_N + 4       // longest stream row (16x16 block)
) (
  input  logic       clk,
  input  logic       rst_n,
  input  cr_e        bsize,            // CR_1: 16x16, CR_1_2: 8x8, CR_1_4: 4x4
  input  logic       clear,            // empty the chain (new block)
  input  logic       shift,
  input  logic       pix_in,
  output logic [9:0] ctx
);
  localparam int LEN = 2*SMAX + 1;
  logic [LEN-1:0] d;                   // d[0]: most recent pixel

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      d <= '0;
    else if (clear)  d <= '0;
    else if (shift)  d <= {d[LEN-2:0], pix_in};
  end

  int s;
  always_comb begin
    unique case (bsize)
      CR_1_2:  s = 12;
      CR_1_4:  s = 8;
      default: s = 20;
    endcase
    ctx[0] = d[0];
    ctx[1] = d[1];
    ctx[2] = d[s-3];
    ctx[3] = d[s-2];
    ctx[4] = d[s-1];
    ctx[5] = d[s];
    ctx[6] = d[s+1];
    ctx[7] = d[2*s-2];
    ctx[8] = d[2*s-1];
    ctx[9] = d[2*s];
  end
endmodule
