// tb_mash_two_tone: end-to-end adaptation with a two-tone input.
//
// Same arrangement and checks as tb_mash_adaptive_correction (an ideal and a
// leaky converter side by side, K = 2^14, in-band noise measured through a
// sinc^3 filter of length 16 with the input tones removed, residual test
// signal measured by correlation at lags 0..23), but the input is two
// in-band tones of 5 % of full scale each, at f_S/203 and f_S/97. It checks
// that the adaptation also converges when the input is not a single tone:
// noise lowered by at least 3 dB and within 6 dB of the ideal converter,
// residual test signal lowered by at least 10 dB, coefficients settled,
// updates every K samples, and counts the same mechanisms.
module tb_mash_two_tone;
  import mash_corr_pkg::*;

  localparam int unsigned N2      = 10;
  localparam int unsigned M       = 6;
  localparam int unsigned NL      = 16;
  localparam int unsigned LOG2K   = 14;
  localparam int unsigned VM_FRAC = 8;
  localparam int unsigned VM_W    = N2 + 1 + 2 + 5 + VM_FRAC;
  localparam int unsigned WIN     = 1 << 15;
  localparam int unsigned NWIN    = 1500;
  localparam int unsigned NCYC    = WIN * NWIN;
  localparam int unsigned NAVG    = 300;       // windows averaged at the end
  localparam int unsigned L       = 16;        // sinc length 2*OSR
  localparam real         PA      = 1.0 - 1.0 / 501.0;  // 54 dB op-amp gain
  localparam real         GA      = 1.0 - 0.008;        // capacitor error
  localparam real         AMP     = 0.05;
  localparam real         FREQ    = 1.0 / 203.0;        // in band (< 1/16)
  localparam real         FREQ2   = 1.0 / 97.0;
  localparam real         PI      = 3.14159265358979;
  localparam real         SCALE   = real'(1 << (N2 - 1 + VM_FRAC));

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  real  u1 = 0.0;

  // Two instances: [0] ideal analog, [1] analog with errors.
  logic                   ts   [2];
  logic signed [1:0]      v1   [2];
  logic signed [N2-1:0]   v2   [2];
  logic signed [VM_W-1:0] vm   [2];
  logic signed [NL-1:0]   cf   [2][M];
  logic                   upd  [2];

  mash_analog_model #(.N2(N2)) u_an0 (
    .clk, .rst_n, .u1, .ts(ts[0]), .v1(v1[0]), .v2(v2[0]));
  mash_analog_model #(.N2(N2), .P1(PA), .P2(PA), .G1(GA), .G2(GA)) u_an1 (
    .clk, .rst_n, .u1, .ts(ts[1]), .v1(v1[1]), .v2(v2[1]));

  mash_adaptive_correction #(.LOG2K(LOG2K)) u_dut0 (
    .clk, .rst_n, .ts_out(ts[0]), .v1_in(v1[0]), .v2_in(v2[0]),
    .vm_out(vm[0]), .coeff_out(cf[0]), .upd_valid_out(upd[0]));
  mash_adaptive_correction #(.LOG2K(LOG2K)) u_dut1 (
    .clk, .rst_n, .ts_out(ts[1]), .v1_in(v1[1]), .v2_in(v2[1]),
    .vm_out(vm[1]), .coeff_out(cf[1]), .upd_valid_out(upd[1]));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  // Watchdog.
  initial begin
    repeat (NCYC + 100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Input history, to align the output with the input.
  localparam int unsigned HMAX = 48;
  real uhist [HMAX];
  int  dly = -1;
  real dpow [HMAX];

  // sinc^3 low-pass state per instance: three running sums of length L.
  real s1 [2][L], s2 [2][L], s3 [2][L];
  real a1 [2], a2 [2], a3 [2];
  real pw [2], ps [2], pc [2], ps2 [2], pc2 [2];
  real pw_first [2], pw_last [2];
  // Residual test signal in the leaky converter's output: correlation of
  // v_m with ts at lags 0..NLAG-1 over the first window and over the last
  // NAVG windows.
  localparam int unsigned NLAG = 24;
  bit  tsh [NLAG];
  real cr_first [NLAG], cr_last [NLAG];
  int  ncyc = 0, wcnt = 0, widx = 0;
  int  n_upd [2], n_up = 0, n_dn = 0, n_ts1 = 0, n_ts0 = 0;
  int  last_upd_cyc = -1, upd_gap_bad = 0;
  logic signed [NL-1:0] cf_prev [M];
  logic signed [NL-1:0] cf_mid  [M];

  function automatic real db(input real p);
    return 10.0 * $log10(p + 1.0e-30);
  endfunction

  initial begin
    for (int i = 0; i < 2; i++) begin
      for (int j = 0; j < int'(L); j++) begin s1[i][j] = 0; s2[i][j] = 0; s3[i][j] = 0; end
      a1[i] = 0; a2[i] = 0; a3[i] = 0; pw[i] = 0; ps[i] = 0; pc[i] = 0; ps2[i] = 0; pc2[i] = 0; pw_last[i] = 0; n_upd[i] = 0;
    end
    for (int j = 0; j < int'(HMAX); j++) begin uhist[j] = 0.0; dpow[j] = 0.0; end
    for (int k = 0; k < int'(M); k++) cf_prev[k] = '0;
    for (int j = 0; j < int'(NLAG); j++) begin tsh[j] = 1'b0; cr_first[j] = 0.0; cr_last[j] = 0.0; end
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
  end

  always @(posedge clk) if (rst_n) begin
    real e, x;
    int  p;
    // Input for the next sample.
    u1 <= AMP * ($sin(2.0 * PI * FREQ * real'(ncyc)) + $sin(2.0 * PI * FREQ2 * real'(ncyc)));
    for (int j = HMAX - 1; j > 0; j--) uhist[j] = uhist[j-1];
    uhist[0] = u1;
    ncyc++;
    if (ts[1]) n_ts1++; else n_ts0++;
    for (int j = int'(NLAG) - 1; j > 0; j--) tsh[j] = tsh[j-1];
    tsh[0] = ts[1];

    // Latency search on the ideal instance during the first window.
    if (ncyc > 1000 && ncyc <= 1000 + 20000)
      for (int j = 0; j < int'(HMAX); j++) begin
        e = real'(vm[0]) / SCALE - uhist[j];
        dpow[j] += e * e;
      end
    if (ncyc == 1000 + 20000) begin
      real best;
      best = 1.0e30;
      for (int j = 0; j < int'(HMAX); j++)
        if (dpow[j] < best) begin best = dpow[j]; dly = j; end
      $display("latency from input to output: %0d samples", dly);
    end

    if (dly >= 0) begin
      p = wcnt % int'(L);
      for (int i = 0; i < 2; i++) begin
        e = real'(vm[i]) / SCALE - uhist[dly];
        a1[i] += e - s1[i][p];        s1[i][p] = e;
        a2[i] += a1[i] - s2[i][p];    s2[i][p] = a1[i];
        x = a2[i] / real'(L * L);
        a3[i] += x - s3[i][p];        s3[i][p] = x;
        x = a3[i] / real'(L);
        pw[i] += x * x;
        ps[i] += x * $sin(2.0 * PI * FREQ * real'(ncyc));
        pc[i] += x * $cos(2.0 * PI * FREQ * real'(ncyc));
        ps2[i] += x * $sin(2.0 * PI * FREQ2 * real'(ncyc));
        pc2[i] += x * $cos(2.0 * PI * FREQ2 * real'(ncyc));
      end
      for (int j = 0; j < int'(NLAG); j++) begin
        x = real'(vm[1]) / SCALE * (tsh[j] ? 1.0 : -1.0);
        if (widx == 0) cr_first[j] += x / real'(WIN);
        if (widx >= int'(NWIN) - 1 - int'(NAVG)) cr_last[j] += x / real'(WIN * NAVG);
      end
      wcnt++;
      if (wcnt == int'(WIN)) begin
        // Remove what is left of the two input tones (a gain error, not noise).
        for (int i = 0; i < 2; i++) begin
          ps[i] = 2.0 * ps[i] / real'(WIN);
          pc[i] = 2.0 * pc[i] / real'(WIN);
          ps2[i] = 2.0 * ps2[i] / real'(WIN);
          pc2[i] = 2.0 * pc2[i] / real'(WIN);
          pw[i] = pw[i] / real'(WIN) - (ps[i] * ps[i] + pc[i] * pc[i]) / 2.0
                  - (ps2[i] * ps2[i] + pc2[i] * pc2[i]) / 2.0;
        end
        if (widx == 0) begin pw_first[0] = pw[0]; pw_first[1] = pw[1]; end
        if (widx >= int'(NWIN) - 1 - int'(NAVG)) begin
          pw_last[0] += pw[0] / real'(NAVG);
          pw_last[1] += pw[1] / real'(NAVG);
        end
        if (widx % 100 == 0)
          $display("window %0d: in-band noise ideal %0.1f dB, with errors %0.1f dB, l = %0d %0d %0d %0d %0d %0d",
                   widx, db(pw[0]), db(pw[1]), cf[1][0], cf[1][1], cf[1][2], cf[1][3], cf[1][4], cf[1][5]);
        for (int i = 0; i < 2; i++) begin pw[i] = 0; ps[i] = 0; pc[i] = 0; ps2[i] = 0; pc2[i] = 0; end
        wcnt = 0;
        widx++;
        if (widx == int'(NWIN) * 9 / 10) cf_mid = cf[1];
        if (widx == int'(NWIN) - 1) finish_checks();
      end
    end

    // Update bookkeeping.
    for (int i = 0; i < 2; i++) if (upd[i]) n_upd[i]++;
    if (upd[1]) begin
      if (last_upd_cyc >= 0 && ncyc - last_upd_cyc != (1 << LOG2K)) upd_gap_bad++;
      last_upd_cyc = ncyc;
    end
    for (int k = 0; k < int'(M); k++) begin
      if (cf[1][k] > cf_prev[k]) n_up++;
      if (cf[1][k] < cf_prev[k]) n_dn++;
    end
    cf_prev = cf[1];
  end

  task automatic finish_checks();
    int maxdrift, maxideal;
    $display("in-band noise: ideal %0.1f -> %0.1f dB, with errors %0.1f -> %0.1f dB",
             db(pw_first[0]), db(pw_last[0]), db(pw_first[1]), db(pw_last[1]));
    check(dly > 0, "latency search found no alignment");
    check(db(pw_first[1]) > db(pw_first[0]) + 6.0,
          "analog errors do not raise the uncorrected noise floor");
    check(db(pw_last[1]) < db(pw_first[1]) - 3.0,
          "adaptation did not lower the in-band noise by 3 dB");
    begin
      real rf, rl;
      rf = 0.0;
      rl = 0.0;
      for (int j = 0; j < int'(NLAG); j++) begin
        rf += cr_first[j] * cr_first[j];
        rl += cr_last[j] * cr_last[j];
      end
      $display("residual test signal in the output: %0.1f dB -> %0.1f dB", db(rf), db(rl));
      check(db(rl) < db(rf) - 10.0, "residual test signal not lowered by 10 dB");
    end
    check(db(pw_last[1]) < db(pw_last[0]) + 6.0,
          "corrected noise not within 6 dB of the ideal converter");
    maxdrift = 0;
    maxideal = 0;
    for (int k = 0; k < int'(M); k++) begin
      int d;
      d = int'(cf[1][k]) - int'(cf_mid[k]);
      if (d < 0) d = -d;
      if (d > maxdrift) maxdrift = d;
      d = int'(cf[0][k]);
      if (d < 0) d = -d;
      if (d > maxideal) maxideal = d;
    end
    $display("coefficient drift over the last tenth: %0d LSB; ideal converter |l| max %0d LSB",
             maxdrift, maxideal);
    check(maxdrift < 64, "coefficients have not settled");
    check(maxideal < 1024, "ideal converter's coefficients wandered off zero");
    check(upd_gap_bad == 0, "coefficient updates not spaced by K samples");
    check(n_upd[0] == n_upd[1] && n_upd[1] >= ncyc / (1 << LOG2K) - 2,
          "wrong number of coefficient updates");
    // Mechanisms.
    $display("mechanisms: ts=+1 %0d, ts=-1 %0d, block updates %0d, up steps %0d, down steps %0d",
             n_ts1, n_ts0, n_upd[1], n_up, n_dn);
    check(n_ts1 > 0 && n_ts0 > 0, "test signal did not take both levels");
    check(real'(n_ts1) / real'(ncyc) > 0.45 && real'(n_ts1) / real'(ncyc) < 0.55,
          "test signal not balanced");
    check(n_upd[1] > 0, "no block update happened");
    check(n_up > 0, "no coefficient up step happened");
    check(n_dn > 0, "no coefficient down step happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

endmodule
