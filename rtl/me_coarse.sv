// ME coarse: eight SAD processing elements working in parallel.
//
// Every cycle the same current pixel is broadcast to all PEs while PE k gets
// the reference pixel k columns to the right, so in one pass over the 64
// pixels of the 8x8 block the array produces the SADs of eight horizontally
// adjacent displacements (dx0 .. dx0+7). Sums are valid the cycle after the
// address generator's `last`. The eight PEs are the document's; the
// horizontal assignment of displacements to PEs is this design's.
module me_coarse
  import me_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  logic               clear,
  input  pix_t               cur,
  input  pix_t [NUM_PE-1:0]  ref_px,
  output sad_t [NUM_PE-1:0]  sad
);
  for (genvar k = 0; k < NUM_PE; k++) begin : g_pe
    sad_pe u_pe (
      .clk    (clk),
      .rst_n  (rst_n),
      .en     (en),
      .clear  (clear),
      .cur    (cur),
      .ref_px (ref_px[k]),
      .sad    (sad[k])
    );
  end

endmodule
