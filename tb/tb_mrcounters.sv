// tb_mrcounters: drives LLD, ULD and PULSERESET edges of four chains and
// checks the latched counts per SAMCLKINT interval, saturation at 511 / 15 /
// 7, the LLD/ULD inhibit while ALLPRSTL is low, the per-chain PULSERESET
// inhibit IPRSTCNT, and the clear of each interval.
module tb_mrcounters;
  logic clk1m = 1'b0;
  always #500 clk1m = ~clk1m;
  logic rst = 1'b1, afepwr = 1'b1, samclkint = 0, allprstl = 1, latched;
  logic [3:0] lld = '0, uld = '0, pulserst = '0, iprstcnt = '0;
  logic [3:0][8:0] lldlat; logic [3:0][3:0] uldlat; logic [3:0][2:0] prlat;
  int checks = 0, failures = 0;
  mrcounters dut (.clk1m, .rst, .afepwr, .samclkint, .lld, .uld, .pulserst, .allprstl,
    .iprstcnt, .lldlat, .uldlat, .prlat, .latched);
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  task automatic pulses(input int kind, input int ch, input int n);
    repeat (n) begin
      #211;
      case (kind) 0: lld[ch] = 1; 1: uld[ch] = 1; default: pulserst[ch] = 1; endcase
      #400;
      case (kind) 0: lld[ch] = 0; 1: uld[ch] = 0; default: pulserst[ch] = 0; endcase
    end
  endtask
  task automatic interval();
    @(negedge clk1m); samclkint = 1; @(negedge clk1m); samclkint = 0; repeat (3) @(negedge clk1m);
  endtask
  int el[4], eu[4], ep[4];
  initial begin
    repeat (3) @(posedge clk1m); rst = 0; interval();
    for (int iv = 0; iv < 5; iv++) begin
      for (int c = 0; c < 4; c++) begin
        el[c] = $urandom_range(0, 600); eu[c] = $urandom_range(0, 20); ep[c] = $urandom_range(0, 9);
        fork
          pulses(0, c, el[c]); pulses(1, c, eu[c]); pulses(2, c, ep[c]);
        join_none
      end
      wait fork; interval();
      for (int c = 0; c < 4; c++) begin
        check(lldlat[c] == 9'(el[c] > 511 ? 511 : el[c]), $sformatf("LLD %0d ch%0d: %0d", el[c], c, lldlat[c]));
        check(uldlat[c] == 4'(eu[c] > 15 ? 15 : eu[c]), $sformatf("ULD %0d ch%0d: %0d", eu[c], c, uldlat[c]));
        check(prlat[c] == 3'(ep[c] > 7 ? 7 : ep[c]), $sformatf("PR %0d ch%0d: %0d", ep[c], c, prlat[c]));
      end
    end
    // inhibits
    allprstl = 0; iprstcnt = 4'b0010;
    pulses(0, 0, 5); pulses(1, 3, 5); pulses(2, 1, 4); pulses(2, 2, 3);
    interval();
    check(lldlat[0] == 0 && uldlat[3] == 0, "LLD/ULD inhibited by PULSERESET of an active chain");
    check(prlat[1] == 0, "PULSERESET count inhibited by another chain");
    check(prlat[2] == 3, "PULSERESET counted when not inhibited");
    allprstl = 1; iprstcnt = 0; interval();
    check(lldlat == '0 && uldlat == '0 && prlat == '0, "counters cleared each interval");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #500_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
