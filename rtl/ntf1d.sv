// ntf1d: digital noise-transfer filter NTF_1d(z) = (1 - z^-1)^2.
//
// It shapes the second-stage error estimate v_e with the ideal first-stage
// noise transfer function so that the first-stage quantization noise cancels
// in the output. It is built as two cascaded first differences; the output
// of the first, v_de = (1 - z^-1) v_e, is brought out because the improved
// correction feeds it (instead of v_e) to the adaptive filter L_C(z), which
// adds the differentiator at no hardware cost.
//
// Timing: combinational from ve to vde and vc; two registers hold the
// previous v_e and v_de. Reset clears them. Widths grow by one bit per
// difference, so nothing overflows.
module ntf1d #(
  parameter int unsigned VE_W = 13
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [VE_W-1:0]  ve,
  output logic signed [VE_W:0]    vde,
  output logic signed [VE_W+1:0]  vc
);

  logic signed [VE_W-1:0] ve_q;
  logic signed [VE_W:0]   vde_q;

  always_comb begin
    vde = (VE_W+1)'(ve) - (VE_W+1)'(ve_q);
    vc  = (VE_W+2)'(vde) - (VE_W+2)'(vde_q);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ve_q  <= '0;
      vde_q <= '0;
    end else begin
      ve_q  <= ve;
      vde_q <= vde;
    end
  end

endmodule
