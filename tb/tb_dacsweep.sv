// tb_dacsweep: sweep DAC control at full size against a memory model that
// returns a byte derived from the address. One full 1345-step cycle is run
// with a STEPCLK every 250 clocks. Checks per step: one SWDACLD pulse, four
// 18-bit DAC words with channels 0..3 in order, each carrying the table word
// of the next step (step 0 after the GAP step 1344), built low byte first;
// all within the step. Also checks that nothing moves while SWEA is off.
module tb_dacsweep;
  import ssf_pkg::*;
  logic clk1m = 1'b0;
  always #1 clk1m = ~clk1m;
  logic rst = 1, enbswea = 1, afepwr = 1, stepclk = 0;
  logic [10:0] stepidx = '0;
  mem_req_t mem_rq;
  logic mem_done, swdacld, swdacclr, sdcidle;
  logic [7:0] mem_rdata;
  dac_ser_t swdac;
  int checks = 0, failures = 0;
  dacsweep dut (.*);
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  function automatic logic [7:0] memf(input logic [13:0] a);
    return a[7:0] ^ {a[13:12], a[11:8], 2'b01} ^ 8'h3C;
  endfunction
  // memory model: answers every other cycle, like the arbiter
  logic ph = 0;
  always @(posedge clk1m) ph <= mem_rq.req ? ~ph : 1'b0;
  assign mem_done  = mem_rq.req && ph;
  assign mem_rdata = memf(mem_rq.addr[13:0]);

  logic [17:0] rx, words[$]; int nb = 0, nld = 0;
  always @(posedge swdac.sclk) if (!swdac.cs_n && !rst) begin
    rx = {rx[16:0], swdac.sdat}; nb++;
    if (nb == 18) begin words.push_back(rx); nb = 0; end
  end
  always @(posedge clk1m) if (swdacld && !rst) nld++;

  initial begin
    repeat (3) @(posedge clk1m); rst = 0;
    for (int s = 0; s <= 1344; s++) begin
      int nxt;
      nxt = (s == 1344) ? 0 : s + 1;
      words.delete(); nld = 0;
      @(negedge clk1m); stepidx = 11'(s); stepclk = 1; @(negedge clk1m); stepclk = 0;
      repeat (248) @(negedge clk1m);
      check(nld == 1, "one DAC load per step");
      check(words.size() == 4, $sformatf("four DAC words in step %0d, got %0d", s, words.size()));
      for (int d = 0; d < words.size(); d++) begin
        logic [15:0] w;
        w = {memf({2'(d), 11'(nxt), 1'b1}), memf({2'(d), 11'(nxt), 1'b0})};
        check(words[d] == {2'(d), w}, $sformatf("step %0d dac %0d word %h expected %h", s, d, words[d], {2'(d), w}));
      end
      check(sdcidle, "idle before the next step");
    end
    enbswea = 0; words.delete(); nld = 0;
    @(negedge clk1m); stepidx = 11'd5; stepclk = 1; @(negedge clk1m); stepclk = 0;
    repeat (200) @(negedge clk1m);
    check(words.size() == 0 && nld == 0 && swdacclr, "held in reset while SWEA disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1_000_000) @(posedge clk1m); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
