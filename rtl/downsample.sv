// downsample: reduces a 16x16 BAB to 8x8 (conversion ratio 1/2, 2x2 cells)
// or 4x4 (ratio 1/4, 4x4 cells). A low-resolution pixel is opaque when at
// least half of the pixels of its cell are opaque. Purely combinational.
// The source names this unit and calls it simple; the majority rule with
// ties going to opaque is this design's choice.
module downsample
  import shape_pkg::*;
(
  input  bab_t           bab,
  input  logic           quarter,     // 1: 16x16 -> 4x4, 0: 16x16 -> 8x8
  output logic [7:0][7:0] lo           // lo[y][x]; the 4x4 result in [3:0][3:0]
);
  function automatic logic cell4(input bab_t b, input int y, input int x);
    logic [4:0] cnt;
    cnt = '0;
    for (int v = 0; v < 4; v++)
      for (int u = 0; u < 4; u++) cnt += 5'(b[4*y+v][4*x+u]);
    return cnt >= 5'd8;
  endfunction

  function automatic logic cell2(input bab_t b, input int y, input int x);
    logic [2:0] cnt;
    cnt = 3'(b[2*y][2*x]) + 3'(b[2*y][2*x+1]) + 3'(b[2*y+1][2*x]) + 3'(b[2*y+1][2*x+1]);
    return cnt >= 3'd2;
  endfunction

  always_comb begin
    lo = '0;
    if (quarter) begin
      for (int y = 0; y < 4; y++)
        for (int x = 0; x < 4; x++) lo[y][x] = cell4(bab, y, x);
    end else begin
      for (int y = 0; y < 8; y++)
        for (int x = 0; x < 8; x++)
          lo[y][x] = cell2(bab, y, x);
    end
  end
endmodule
