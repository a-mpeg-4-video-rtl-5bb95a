// Skip decision of the mixed-mode motion estimation.
//
// On `eval` it registers
//   sad_max   = max(SADa, SADb, SADc)      (left, top, top-right macroblocks)
//   skip_flag = (SADmcp - sad_max < 0), i.e. SADmcp < sad_max
// where SADmcp is the SAD of the median-predicted vector. With the flag set the
// predicted vector is taken as the result and the coarse search is not run.
// Both outputs hold until the next `eval`. The rule is the document's; the
// one-cycle registered timing is this design's.
module skip_decision
  import me_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic eval,
  input  sad_t sad_a,
  input  sad_t sad_b,
  input  sad_t sad_c,
  input  sad_t sad_mcp,
  output sad_t sad_max,
  output logic skip_flag
);
  sad_t m_ab, m_abc;
  assign m_ab  = (sad_a > sad_b) ? sad_a : sad_b;
  assign m_abc = (m_ab > sad_c) ? m_ab : sad_c;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sad_max   <= '0;
      skip_flag <= 1'b0;
    end else if (eval) begin
      sad_max   <= m_abc;
      skip_flag <= (sad_mcp < m_abc);
    end
  end

endmodule
