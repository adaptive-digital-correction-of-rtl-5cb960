// tb_ssblms_correlator: self-checking test of the block correlator.
//
// The block length is shortened to K = 2^6. A testbench model accumulates
// sum_k = sum over the block of v_m[n] * sign(r[n-k]) for the six taps in
// 64-bit integers and, one clock after the last sample of each block,
// checks the one-clock upd_valid pulse and upd_dir = sign(sum_k). It also
// checks that upd_valid comes exactly once every K clocks. Three kinds of
// blocks are used: v_m built from the replica at a lag of 0..5 (so the sign
// of one tap is known), random v_m, and v_m = 0 (all signs 0). Full-scale
// v_m words check the accumulator width.
module tb_ssblms_correlator;
  import mash_corr_pkg::*;

  localparam int unsigned VM_W  = 26;
  localparam int unsigned M     = 6;
  localparam int unsigned LOG2K = 6;
  localparam int unsigned K     = 1 << LOG2K;
  localparam int unsigned NBLK  = 300;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic ref_bit;
  logic signed [VM_W-1:0] vm;
  logic upd_valid;
  dir_t upd_dir [M];

  ssblms_correlator #(.VM_W(VM_W), .M(M), .LOG2K(LOG2K)) dut (
    .clk, .rst_n, .ref_bit, .vm, .upd_valid, .upd_dir);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    repeat (NBLK * K + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint sum_m [M];
  bit     rh [M];
  int     exp_d [M];
  int     n_pos = 0, n_neg = 0, n_zero = 0;

  initial begin
    ref_bit = 1'b0;
    vm = '0;
    for (int k = 0; k < int'(M); k++) begin sum_m[k] = 0; rh[k] = 1'b0; end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int b = 0; b < int'(NBLK); b++) begin
      int mode, lag, pol;
      mode = b % 3;
      lag = int'($urandom_range(0, M - 1));
      pol = $urandom_range(0, 1) ? 1 : -1;
      for (int n = 0; n < int'(K); n++) begin
        longint v;
        ref_bit = $urandom_range(0, 1);
        for (int k = int'(M) - 1; k > 0; k--) rh[k] = rh[k-1];
        rh[0] = ref_bit;
        case (mode)
          0: v = longint'(pol) * (rh[lag] ? 1000 : -1000) + longint'($urandom_range(0, 1000)) - 500;
          1: v = (n % 16 == 0) ? ((b % 2 == 0) ? 33554431 : -33554432)
                               : longint'($urandom_range(0, 200000)) - 100000;
          default: v = 0;
        endcase
        vm = VM_W'(v);
        for (int k = 0; k < int'(M); k++) sum_m[k] += rh[k] ? v : -v;
        #1;
        check(upd_valid == ((b > 0) && (n == 0)), "upd_valid not at the block boundary");
        if (b > 0 && n == 0)
          for (int k = 0; k < int'(M); k++)
            check(int'(upd_dir[k]) == exp_d[k],
                  $sformatf("block %0d tap %0d: dir %0d expected %0d", b - 1, k, upd_dir[k], exp_d[k]));
        @(posedge clk);
        #1;
      end
      for (int k = 0; k < int'(M); k++) begin
        exp_d[k] = (sum_m[k] > 0) ? 1 : (sum_m[k] < 0) ? -1 : 0;
        if (exp_d[k] > 0) n_pos++; else if (exp_d[k] < 0) n_neg++; else n_zero++;
        sum_m[k] = 0;
      end
      if (mode == 0) check(exp_d[lag] == pol, "model: correlated tap has the wrong sign");
    end
    #1;
    check(upd_valid == 1'b1, "last upd_valid missing");
    for (int k = 0; k < int'(M); k++)
      check(int'(upd_dir[k]) == exp_d[k], "last block direction");
    @(posedge clk);
    #1 check(upd_valid == 1'b0, "upd_valid longer than one clock");
    $display("directions: +1 %0d, -1 %0d, 0 %0d", n_pos, n_neg, n_zero);
    check(n_pos > 0 && n_neg > 0 && n_zero > 0, "not every direction exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
