// tb_ntf1d: self-checking test of NTF_1d(z) = (1 - z^-1)^2.
//
// Random v_e words, including full-scale steps, are applied for 3000
// clocks. The testbench keeps its own copies of the previous v_e and v_de
// and checks v_de = v_e[n] - v_e[n-1] and v_C = v_de[n] - v_de[n-1] in
// integers, and that both read as if the history were zero right after
// reset.
module tb_ntf1d;

  localparam int unsigned VE_W = 13;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [VE_W-1:0] ve;
  logic signed [VE_W:0]   vde;
  logic signed [VE_W+1:0] vc;

  ntf1d #(.VE_W(VE_W)) dut (.clk, .rst_n, .ve, .vde, .vc);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int x, xp, d, dp;
    ve = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    xp = 0;
    dp = 0;
    for (int n = 0; n < 3000; n++) begin
      if (n % 100 < 4) x = (n % 2 == 0) ? 4095 : -4096;
      else x = int'($urandom_range(0, 8191)) - 4096;
      ve = VE_W'(x);
      #1;
      d = x - xp;
      check(int'(vde) == d, $sformatf("v_de: got %0d expected %0d", vde, d));
      check(int'(vc) == d - dp, $sformatf("v_C: got %0d expected %0d", vc, d - dp));
      @(posedge clk);
      #1;
      xp = x;
      dp = d;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
