// tb_atestpulse: checks the anode test pulse train: 1-cycle high pulses with
// a period of SAMPLECNT+1 us for several SAMPLECNT values (337 -> ~2.96 kHz,
// 1 -> 500 kHz), and that the output stays low when SWEA, the test pulser
// enable or the analog power is off.
module tb_atestpulse;
  logic clk1m = 1'b0;
  always #1 clk1m = ~clk1m;
  logic rst = 1'b1, afepwr = 1'b1, enbswea = 1'b1, enbsweatp = 1'b1, testpulse;
  logic [8:0] samplecnt = 9'd337;
  int checks = 0, failures = 0;
  atestpulse dut (.clk1m, .rst, .afepwr, .enbswea, .enbsweatp, .samplecnt, .testpulse);
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  task automatic measure(input int n);
    int t = 0, last = -1, highs = 0;
    samplecnt = 9'(n);
    repeat (3 * (n + 1)) @(posedge clk1m);
    for (int i = 0; i < 6 * (n + 1); i++) begin
      @(posedge clk1m); #0.1; t++;
      if (testpulse) begin
        if (last >= 0) check(t - last == n + 1, $sformatf("period %0d for SAMPLECNT %0d", t - last, n));
        last = t; highs++;
      end
    end
    check(highs >= 5, "pulses present");
  endtask
  initial begin
    repeat (2) @(posedge clk1m); rst = 0;
    measure(337); measure(150); measure(20); measure(2); measure(1);
    // pulse width one cycle
    samplecnt = 9'd5;
    repeat (20) begin @(posedge clk1m); #0.1; if (testpulse) begin @(posedge clk1m); #0.1; check(!testpulse, "1 us pulse"); end end
    enbsweatp = 0; repeat (10) begin @(posedge clk1m); #0.1; check(!testpulse, "off when test pulser disabled"); end
    enbsweatp = 1; enbswea = 0; repeat (10) begin @(posedge clk1m); #0.1; check(!testpulse, "off when SWEA disabled"); end
    enbswea = 1; afepwr = 0; repeat (10) begin @(posedge clk1m); #0.1; check(!testpulse, "off without analog power"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk1m); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
