// SAD processing element: absolute difference and accumulate.
//
// Each enabled cycle adds |cur - ref| to the running sum; when `clear` is high
// the sum restarts from this cycle's difference. The sum is valid the cycle
// after the last enabled cycle. 8-bit pixels, 14-bit sum (64 pixels).
// The document says the PEs compute sums of absolute differences; the
// structure is this design's.
module sad_pe
  import me_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic clear,
  input  pix_t cur,
  input  pix_t ref_px,
  output sad_t sad
);
  pix_t ad;
  assign ad = (cur > ref_px) ? cur - ref_px : ref_px - cur;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   sad <= '0;
    else if (en)  sad <= (clear ? sad_t'(0) : sad) + sad_t'(ad);
  end

endmodule
