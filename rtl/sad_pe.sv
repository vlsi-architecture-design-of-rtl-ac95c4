// sad_pe: one processing element of the binary motion-estimation array.
// Each cycle with en=1 it XORs a 16-pixel row of the current BAB with the
// matching row of one candidate BAB, counts the mismatches with an adder
// tree and adds that partial SAD to an accumulator. first=1 restarts the
// accumulation, so after 16 rows (16 cycles) sad holds the SAD of the
// candidate. The XOR/adder-tree/accumulator structure follows the source
// architecture; the restart-by-flag and reset behaviour are choices of this
// design. Timing: sad is valid the cycle after the 16th enabled row.
module sad_pe #(
  parameter int W    = 16,               // pixels per row
  parameter int SADW = 9                 // accumulator width
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            en,            // a row pair is presented
  input  logic            first,         // row 0 of a new candidate
  input  logic [W-1:0]    cur_row,
  input  logic [W-1:0]    ref_row,
  output logic [SADW-1:0] sad
);
  logic [W-1:0]    diff;
  logic [SADW-1:0] row_sad;

  assign diff = cur_row ^ ref_row;

  // Adder tree: the synthesis tool builds a balanced tree from this sum.
  always_comb begin
    row_sad = '0;
    for (int i = 0; i < W; i++) row_sad = row_sad + SADW'(diff[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      sad <= '0;
    else if (en)     sad <= first ? row_sad : sad + row_sad;
  end
endmodule
