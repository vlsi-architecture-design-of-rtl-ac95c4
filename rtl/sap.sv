// sap: shift-and-pack unit. Search-range rows are not aligned to the 16-bit
// words of the VOP memory when the motion-vector predictor is not a multiple
// of 16, so three consecutive words (48 pixels) are concatenated and a
// 32-bit barrel shifter extracts the 32 pixels starting at bit offset
// 'shift' from the left. Purely combinational. The source names one 32-bit
// barrel shifter for this job; the three-word window is this design's choice.
module sap (
  input  logic [47:0] win,     // {word0, word1, word2}, leftmost pixel in MSB
  input  logic [3:0]  shift,   // pixel offset of the first wanted pixel
  output logic [31:0] row32
);
  assign row32 = 32'((win << shift) >> 16);
endmodule
