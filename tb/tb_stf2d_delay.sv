// tb_stf2d_delay: self-checking test of the z^-N2 delay.
//
// Random tri-level words go in; every output is compared with the input
// of exactly N2 = 10 clocks earlier, kept in a testbench queue. After reset
// the output must read zero for the first N2 clocks.
module tb_stf2d_delay;

  localparam int unsigned N2 = 10;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [1:0] v_in, v_out;
  logic signed [1:0] hist [$];

  stf2d_delay #(.N2(N2), .W(2)) dut (.clk, .rst_n, .v_in, .v_out);

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
    v_in = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < int'(N2); i++) hist.push_back(2'sd0);
    for (int n = 0; n < 2000; n++) begin
      int r;
      r = int'($urandom_range(0, 2)) - 1;
      v_in = 2'(r);
      check(v_out == hist[0], $sformatf("cycle %0d: got %0d expected %0d", n, v_out, hist[0]));
      @(posedge clk);
      #1;
      void'(hist.pop_front());
      hist.push_back(2'(r));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
