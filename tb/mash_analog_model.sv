// mash_analog_model: behavioural model of the analog part of the improved
// 2-0 MASH ADC, for simulation only (not synthesizable).
//
// It models, in full-scale units (+/-1), the second-order first stage with
// its tri-level (1.5-bit) quantizer, the test-signal injection in front of
// that quantizer, the feedback DAC, the interstage coupling and a 10-bit
// pipelined second stage with N2 samples of latency:
//   y1 <= P1*y1 + G1*a1*(u1 - b1*v1a)           a1 = 1/4, b1 = 1
//   y2 <= P2*y2 + G2*a2*(y1 - b2*v1a)           a2 = 1/2, b2 = 1/2
//   q   = 8*y2 + TS_AMP*ts                      (quantizer gain 8)
//   v1  = +1 if q > 1/2, -1 if q < -1/2, else 0; v1a = v1
//   u2  = m0*(alpha*y2 - beta*v1a)              alpha = 8, beta = 2, m0 = 1/2
//   v2  = round(u2 * 2^(N2-1)), clipped, delivered N2 clocks after v1
// The gains follow the figure of the improved structure. The quantizer gain
// of 8 is what makes the loop's noise transfer function exactly
// (1 - z^-1)^2 with these gains. Integrator pole errors (P1, P2 below 1,
// from finite op-amp gain) and gain errors (G1, G2, from capacitor
// mismatch) are parameters; with P = G = 1 the model is ideal and the
// first-stage noise cancels exactly in the digital output.
//
// Timing: on each rising clock edge the model reads u1 and ts as they were
// before the edge and registers the new v1; v2 of that sample appears N2
// edges later. Both integrators are delaying.
module mash_analog_model #(
  parameter int unsigned N2     = 10,
  parameter real         P1     = 1.0,
  parameter real         P2     = 1.0,
  parameter real         G1     = 1.0,
  parameter real         G2     = 1.0,
  parameter real         TS_AMP = 0.0625
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  real                  u1,
  input  logic                 ts,
  output logic signed [1:0]    v1,
  output logic signed [N2-1:0] v2
);

  real y1, y2;
  logic signed [N2-1:0] pipe [N2+1];

  function automatic logic signed [N2-1:0] adc(input real x);
    real s;
    int  c;
    s = x * real'(1 << (N2 - 1));
    c = (s >= 0.0) ? int'(s + 0.5) : -int'(-s + 0.5);
    if (c > (1 << (N2 - 1)) - 1) c = (1 << (N2 - 1)) - 1;
    if (c < -(1 << (N2 - 1)))    c = -(1 << (N2 - 1));
    return N2'(c);
  endfunction

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y1 = 0.0;
      y2 = 0.0;
      v1 <= '0;
      for (int i = 0; i <= int'(N2); i++) pipe[i] <= '0;
    end else begin
      real q, v1a, u2, y1n, y2n;
      logic signed [1:0] d;
      q = 8.0 * y2 + (ts ? TS_AMP : -TS_AMP);
      d = (q > 0.5) ? 2'sd1 : (q < -0.5) ? -2'sd1 : 2'sd0;
      v1a = real'(d);
      u2  = 0.5 * (8.0 * y2 - 2.0 * v1a);
      y1n = P1 * y1 + G1 * 0.25 * (u1 - v1a);
      y2n = P2 * y2 + G2 * 0.5 * (y1 - 0.5 * v1a);
      y1 = y1n;
      y2 = y2n;
      v1 <= d;
      pipe[0] <= adc(u2);
      for (int i = 1; i <= int'(N2); i++) pipe[i] <= pipe[i-1];
    end
  end

  assign v2 = pipe[N2];

endmodule
