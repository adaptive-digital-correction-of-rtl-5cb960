// tb_ts_gen: self-checking test of the test-signal generator.
//
// The default 23-bit generator is compared, bit by bit for 5000 samples,
// with a sequence built independently from the recurrence
// ts[n] = ts[n-23] ^ ts[n-18] and the seed. A second, 7-bit instance
// (x^7 + x^6 + 1) is run over whole periods to check that the sequence has
// the maximal period 127 and is balanced (64 ones, 63 zeros), i.e. that it
// is zero-mean to within one sample per period. Hold (en = 0) and reset are
// checked too.
module tb_ts_gen;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic ts_a, ts_b;

  localparam logic [22:0] SEED_A = 23'h5A5A5A;
  localparam logic [6:0]  SEED_B = 7'h01;

  ts_gen #(.W(23), .TAP(18), .SEED(SEED_A)) u_a (.clk, .rst_n, .en, .ts_bit(ts_a));
  ts_gen #(.W(7),  .TAP(6),  .SEED(SEED_B)) u_b (.clk, .rst_n, .en, .ts_bit(ts_b));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit ref_a [5023];
  bit seq_b [254];
  int ones;

  initial begin
    // Expected sequence: the output at time n is state bit 22 after n
    // shifts; the first 23 outputs are the seed bits from MSB down.
    for (int i = 0; i < 23; i++) ref_a[i] = SEED_A[22 - i];
    for (int n = 23; n < 5023; n++) ref_a[n] = ref_a[n-23] ^ ref_a[n-18];

    repeat (2) @(posedge clk);
    #1 check(ts_a == SEED_A[22] && ts_b == SEED_B[6], "reset value");
    rst_n = 1'b1;
    // Hold.
    repeat (3) @(posedge clk);
    #1 check(ts_a == SEED_A[22], "generator advanced while en = 0");
    en = 1'b1;
    for (int n = 0; n < 5000; n++) begin
      check(ts_a == ref_a[n], $sformatf("23-bit sequence differs at %0d", n));
      if (n < 254) seq_b[n] = ts_b;
      @(posedge clk);
      #1;
    end
    // Period and balance of the 7-bit instance.
    for (int n = 0; n < 127; n++) check(seq_b[n] == seq_b[n + 127], "7-bit period is not 127");
    ones = 0;
    for (int n = 0; n < 127; n++) ones += int'(seq_b[n]);
    check(ones == 64, $sformatf("7-bit period has %0d ones, expected 64", ones));
    // Shorter periods would repeat inside 127 samples.
    for (int p = 1; p < 127; p++) begin
      bit same;
      same = 1'b1;
      for (int n = 0; n < 127; n++) if (seq_b[n] != seq_b[n + p]) same = 1'b0;
      check(!same, $sformatf("7-bit sequence repeats after %0d", p));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
