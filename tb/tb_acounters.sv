// tb_acounters: drives random numbers of 300 ns anode pulses into the 16
// counters (asynchronous to CLK1M) between SAMPLECLKs and checks that each
// holding register holds exactly the pulses of its interval, that the
// counters restart from zero, that the 14-bit counter wraps, and that the
// block stays cleared while SWEA is disabled.
module tb_acounters;
  logic clk1m = 1'b0;
  always #500 clk1m = ~clk1m;   // 1 MHz with 1 ns steps
  logic rst = 1'b1, enbswea = 1'b1, afepwr = 1'b1, sampleclk = 1'b0, latched;
  logic [15:0] apulse = '0;
  logic [15:0][13:0] latcnt;
  int checks = 0, failures = 0;
  acounters dut (.clk1m, .rst, .enbswea, .afepwr, .sampleclk, .apulse, .latcnt, .latched);
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  int exp [16];
  task automatic burst(input int ch, input int n);
    repeat (n) begin #137; apulse[ch] = 1; #300; apulse[ch] = 0; end
  endtask
  task automatic sample();
    @(negedge clk1m); sampleclk = 1; @(negedge clk1m); sampleclk = 0;
    repeat (3) @(negedge clk1m);
  endtask
  initial begin
    repeat (3) @(posedge clk1m); rst = 0; sample();
    for (int iv = 0; iv < 6; iv++) begin
      for (int c = 0; c < 16; c++) begin
        exp[c] = $urandom_range(0, 40);
        fork burst(c, exp[c]); join_none
      end
      #30000; wait fork;
      sample();
      for (int c = 0; c < 16; c++)
        check(latcnt[c] == 14'(exp[c]), $sformatf("interval %0d ch %0d: %0d expected %0d", iv, c, latcnt[c], exp[c]));
    end
    // wrap of the 14-bit counter
    burst(5, 16384 + 7); sample();
    check(latcnt[5] == 14'd7, $sformatf("14-bit wrap: %0d", latcnt[5]));
    enbswea = 0; burst(2, 10); sample();
    check(latcnt[2] == 0, "held in reset while SWEA disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #200_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
