// tb_latchupprot: checks AFEPWR against all eight rows of the control truth
// table, that the overcurrent clear acts without a clock edge and stays
// latched after AFESHDN goes away, and that reset clears AFEPWR.
module tb_latchupprot;
  logic clk1m = 1'b0, clk_en = 1'b1;
  always #1 if (clk_en) clk1m = ~clk1m;
  logic rst = 1'b1, afeshdn = 1'b0, afepwron = 1'b0, afepwroff = 1'b0, afepwr;
  int checks = 0, failures = 0;
  latchupprot dut (.clk1m, .rst, .afeshdn, .afepwron, .afepwroff, .afepwr);
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  task automatic apply(input bit s, input bit off, input bit on, input bit start);
    // force the previous state first, then apply the row
    afeshdn = 0; afepwroff = 0; afepwron = start; @(posedge clk1m); #0.1;
    afepwron = 0; @(posedge clk1m); #0.1;
    if (!start) begin afepwroff = 1; @(posedge clk1m); #0.1; afepwroff = 0; end
    check(afepwr == start, "set-up state");
    afeshdn = s; afepwroff = off; afepwron = on;
    repeat (2) @(posedge clk1m); #0.1;
  endtask
  initial begin
    repeat (2) @(posedge clk1m); rst = 0;
    for (int st = 0; st < 2; st++)
      for (int r = 0; r < 8; r++) begin
        bit s, off, on, exp;
        {s, off, on} = 3'(r);
        apply(s, off, on, st[0]);
        if (off)      exp = 0;
        else if (on)  exp = 1;
        else if (s)   exp = 0;
        else          exp = st[0];
        check(afepwr == exp, $sformatf("row shdn=%0d off=%0d on=%0d prev=%0d", s, off, on, st));
      end
    // asynchronous clear with the clock stopped, and it stays latched
    afeshdn = 0; afepwroff = 0; afepwron = 1; repeat (2) @(posedge clk1m);
    afepwron = 0; repeat (2) @(posedge clk1m); #0.1;
    check(afepwr == 1, "powered before clock stop");
    clk_en = 0; #5; afeshdn = 1; #0.5;
    check(afepwr == 0, "AFESHDN clears AFEPWR without a clock");
    #3; afeshdn = 0; clk_en = 1; repeat (3) @(posedge clk1m); #0.1;
    check(afepwr == 0, "clear stays latched");
    afepwron = 1; @(posedge clk1m); #0.1; check(afepwr == 1, "AFEPWRON restores power");
    rst = 1; #0.1; check(afepwr == 0, "reset clears AFEPWR");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
