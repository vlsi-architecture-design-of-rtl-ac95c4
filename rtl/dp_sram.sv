// dp_sram: simple two-port on-chip SRAM (one write port, one read port),
// used for the 16x32 search-range buffer and the 16x16 BAB buffers. Reads
// are synchronous: rd_data is valid the cycle after rd_en. A read and a
// write to the same address in one cycle return the old word. Port style and
// read latency are this design's choice; the sizes are the source's.
module dp_sram #(
  parameter int DEPTH = 16,
  parameter int WIDTH = 16,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             rd_en,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rd_data
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we)    mem[waddr] <= wdata;
    if (rd_en) rd_data    <= mem[raddr];
  end
endmodule
