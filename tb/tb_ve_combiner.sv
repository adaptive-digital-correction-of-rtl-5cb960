// tb_ve_combiner: self-checking test of v_e = m2*v2 + m1*v1.
//
// With the document's m2 = 2 and m1 = 1 and a 10-bit second stage, v1 = +/-1
// full scale is +/-512 second-stage LSBs, so v_e = 2*v2 + 512*v1. All three
// v1 levels and random v2 codes, including both extremes, are checked
// against that integer formula.
module tb_ve_combiner;

  localparam int unsigned N2 = 10;
  localparam int unsigned VE_W = 13;

  int checks = 0, failures = 0;
  logic signed [1:0]      v1;
  logic signed [N2-1:0]   v2;
  logic signed [VE_W-1:0] ve;

  ve_combiner #(.N2(N2), .M2_SHIFT(1), .M1(1), .VE_W(VE_W)) dut (.v1, .v2, .ve);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input int a, input int b);
    int exp;
    v1 = 2'(a);
    v2 = N2'(b);
    #1;
    exp = 2 * b + 512 * a;
    check(int'(ve) == exp, $sformatf("v1=%0d v2=%0d: got %0d expected %0d", a, b, ve, exp));
  endtask

  initial begin
    for (int a = -1; a <= 1; a++) begin
      apply(a, -512);
      apply(a, 511);
      apply(a, 0);
    end
    for (int n = 0; n < 3000; n++)
      apply(int'($urandom_range(0, 2)) - 1, int'($urandom_range(0, 1023)) - 512);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
