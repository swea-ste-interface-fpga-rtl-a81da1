// tb_covercntl: checks the SWEA cover pulse (cleared after 16 TK8HZ ticks),
// the non-forced STE actuation that stops when the status input falls, the
// forced actuation that ignores status and stops after STECOVTMO+1 ticks,
// the infinite timeout (15), and CTIMIDLE. A small model of the command bits
// clears them on SWEACLR / STECLR like the command interface does.
module tb_covercntl;
  logic clk1m = 1'b0;
  always #1 clk1m = ~clk1m;
  logic rst = 1'b1, tk8hz = 0, sweacovon = 0;
  logic [1:0] stecovon = '0, forstecovon = '0, stecovstat = '0, stecovsw;
  logic [3:0] stecovtmo = '0;
  logic sweacovsw, sweaclr, steclr, ctimidle;
  int checks = 0, failures = 0;
  covercntl dut (.clk1m, .rst, .tk8hz, .sweacovon, .stecovon, .forstecovon, .stecovstat,
    .stecovtmo, .sweacovsw, .stecovsw, .sweaclr, .steclr, .ctimidle);
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  always @(posedge clk1m) begin
    if (sweaclr) sweacovon <= 0;
    if (steclr) begin stecovon <= 0; forstecovon <= 0; end
  end
  int nt = 0;
  task automatic ticks(input int n);
    repeat (n) begin repeat (9) @(negedge clk1m); tk8hz = 1; @(negedge clk1m); tk8hz = 0; nt++; end
    repeat (3) @(negedge clk1m);
  endtask
  initial begin
    repeat (2) @(posedge clk1m); rst = 0; @(negedge clk1m);
    check(ctimidle, "idle");
    sweacovon = 1; @(negedge clk1m);
    check(sweacovsw && !ctimidle, "SWEA actuator on, subsystem busy");
    ticks(15); check(sweacovsw, "SWEA still on after 15 ticks");
    ticks(1);  check(!sweacovsw && ctimidle, "SWEA off after 16 ticks (2 s)");
    // non-forced open, status high until the cover arrives
    stecovtmo = 4'd14; stecovstat = 2'b11; stecovon = 2'b01; @(negedge clk1m);
    check(stecovsw == 2'b01, "STE open powered");
    ticks(3); check(stecovsw == 2'b01, "still powered while status high");
    stecovstat = 2'b10; repeat (3) @(negedge clk1m);
    check(stecovsw == 2'b00 && stecovon == 0, "status low stops and clears the actuation");
    // non-forced with status already low: never powered
    stecovon = 2'b10; stecovstat = 2'b01; @(negedge clk1m); #0.1;
    check(stecovsw == 2'b00, "inhibited by low status");
    repeat (3) @(negedge clk1m);
    // forced close with timeout setting 2: 3 ticks
    stecovstat = 2'b00; stecovtmo = 4'd2; forstecovon = 2'b10; @(negedge clk1m);
    check(stecovsw == 2'b10, "forced actuator ignores status");
    ticks(2); check(stecovsw == 2'b10, "on after 2 ticks");
    ticks(1); check(stecovsw == 2'b00, "off after 3 ticks (3/8 s)");
    // infinite timeout in forced mode
    stecovtmo = 4'hF; forstecovon = 2'b01; @(negedge clk1m);
    ticks(40); check(stecovsw == 2'b01, "infinite timeout keeps forced actuator on");
    forstecovon = 2'b00; @(negedge clk1m); check(stecovsw == 0 && ctimidle, "explicit off");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk1m); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
