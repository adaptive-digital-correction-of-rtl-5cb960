// tb_lc_filter: self-checking test of the adaptive filter L_C(z).
//
// A testbench model keeps the six coefficients and the tap history as
// integers. Each clock it checks v_L = floor(sum_k l_k * x[n-k] / 2^7)
// (16-bit coefficients with 15 fraction bits, 8 fraction bits kept on v_L)
// and every coefficient. Phase 1 drives random inputs, including full-scale
// ones, with random update pulses and directions. Phase 2 holds the update
// direction for 33000 blocks so that l0 climbs to +32767 and l1 falls to
// -32767 and must saturate there; the saturations are counted. Phase 3
// returns to random traffic with the filter saturated.
module tb_lc_filter;
  import mash_corr_pkg::*;

  localparam int unsigned X_W  = 14;
  localparam int unsigned M    = 6;
  localparam int unsigned NL   = 16;
  localparam int unsigned VL_W = 26;
  localparam longint      LMAX = 32767;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [X_W-1:0]  x;
  logic                   upd_valid;
  dir_t                   upd_dir [M];
  logic signed [VL_W-1:0] vl;
  logic signed [NL-1:0]   coeff [M];

  lc_filter #(.X_W(X_W), .M(M), .NL(NL), .GAMMA(1), .VL_FRAC(8)) dut (
    .clk, .rst_n, .x, .upd_valid, .upd_dir, .vl, .coeff);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint l_m [M];
  longint h_m [M];
  int     n_sat_hi = 0, n_sat_lo = 0;

  // One clock: drive, check, then advance the model.
  task automatic step(input int xi, input bit uv, input int d [M]);
    longint acc, exp;
    x = X_W'(xi);
    upd_valid = uv;
    for (int k = 0; k < int'(M); k++) upd_dir[k] = 2'(d[k]);
    h_m[0] = longint'(xi);
    #1;
    acc = 0;
    for (int k = 0; k < int'(M); k++) acc += l_m[k] * h_m[k];
    exp = acc >>> 7;
    check(longint'(vl) == exp, $sformatf("v_L: got %0d expected %0d", vl, exp));
    for (int k = 0; k < int'(M); k++)
      check(longint'(coeff[k]) == l_m[k], $sformatf("l%0d: got %0d expected %0d", k, coeff[k], l_m[k]));
    @(posedge clk);
    #1;
    for (int k = int'(M) - 1; k > 0; k--) h_m[k] = h_m[k-1];
    if (uv)
      for (int k = 0; k < int'(M); k++) begin
        longint nx;
        nx = l_m[k] - longint'(d[k]);
        if (nx > LMAX) begin nx = LMAX; if (k == 0) n_sat_hi++; end
        if (nx < -LMAX) begin nx = -LMAX; if (k == 1) n_sat_lo++; end
        l_m[k] = nx;
      end
  endtask

  initial begin
    int d [M];
    x = '0;
    upd_valid = 1'b0;
    for (int k = 0; k < int'(M); k++) begin upd_dir[k] = '0; l_m[k] = 0; h_m[k] = 0; end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    // Phase 1: random traffic.
    for (int n = 0; n < 3000; n++) begin
      for (int k = 0; k < int'(M); k++) d[k] = int'($urandom_range(0, 2)) - 1;
      step((n % 50 == 0) ? -8192 : int'($urandom_range(0, 16383)) - 8192,
           ($urandom_range(0, 3) == 0), d);
    end
    // Phase 2: drive l0 up and l1 down into saturation.
    for (int k = 0; k < int'(M); k++) d[k] = 0;
    d[0] = -1;
    d[1] = 1;
    for (int n = 0; n < 33000; n++) step(8191, 1'b1, d);
    check(coeff[0] == 16'sd32767, "l0 did not saturate at +32767");
    check(coeff[1] == -16'sd32767, "l1 did not saturate at -32767");
    // Phase 3: random traffic on a saturated filter.
    for (int n = 0; n < 2000; n++) begin
      for (int k = 0; k < int'(M); k++) d[k] = int'($urandom_range(0, 2)) - 1;
      step(int'($urandom_range(0, 16383)) - 8192, ($urandom_range(0, 7) == 0), d);
    end
    $display("saturation events: upper %0d, lower %0d", n_sat_hi, n_sat_lo);
    check(n_sat_hi > 0 && n_sat_lo > 0, "saturation never exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
