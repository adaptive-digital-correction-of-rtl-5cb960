// stf2d_delay: the signal-transfer path STF_2d(z) = z^-N2 of the 2-0 MASH.
//
// The first-stage quantizer output v1 must be delayed by the latency of the
// pipelined second stage (N2 samples, one per single-bit pipeline stage) so
// that it lines up with the second-stage word v2 of the same sample. This
// is a shift register of N2 words of width W; v_out is the input from N2
// clocks earlier. Reset clears the register (the delayed output reads 0
// for the first N2 samples).
module stf2d_delay #(
  parameter int unsigned N2 = 10,
  parameter int unsigned W  = 2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic signed [W-1:0] v_in,
  output logic signed [W-1:0] v_out
);

  logic signed [W-1:0] sr [N2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(N2); i++) sr[i] <= '0;
    end else begin
      sr[0] <= v_in;
      for (int i = 1; i < int'(N2); i++) sr[i] <= sr[i-1];
    end
  end

  assign v_out = sr[N2-1];

endmodule
