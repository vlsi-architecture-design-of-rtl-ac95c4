// acq_detect: accepted-quality test of a lossy BAB. The 16x16 block is split
// into sixteen 4x4 sub-blocks; in each, the pixels where the original and
// the reconstructed block differ are counted. The reconstruction is accepted
// only if no sub-block has more than 'thr' differing pixels. Purely
// combinational. The per-4x4 error criterion follows the MPEG-4 shape coder;
// expressing the threshold directly as a pixel count (0..16) is this
// design's choice.
module acq_detect
  import shape_pkg::*;
(
  input  bab_t       orig,
  input  bab_t       recon,
  input  logic [4:0] thr,
  output logic       accept
);
  function automatic logic [4:0] sub_err(input bab_t a, input bab_t b,
                                         input int by, input int bx);
    logic [4:0] err;
    err = '0;
    for (int v = 0; v < 4; v++)
      for (int u = 0; u < 4; u++)
        err += 5'(a[4*by+v][4*bx+u] ^ b[4*by+v][4*bx+u]);
    return err;
  endfunction

  always_comb begin
    accept = 1'b1;
    for (int by = 0; by < 4; by++)
      for (int bx = 0; bx < 4; bx++)
        if (sub_err(orig, recon, by, bx) > thr) accept = 1'b0;
  end
endmodule
