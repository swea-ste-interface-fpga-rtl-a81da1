// tb_ad5544_shift: loads random 18-bit words, decodes the serial output on
// the rising SCLK edges while CS_N is low and checks the word, the bit count
// (18), the 36-cycle busy time and that a start while busy is ignored.
module tb_ad5544_shift;
  import ssf_pkg::*;
  logic clk1m = 1'b0;
  always #1 clk1m = ~clk1m;
  logic rst = 1'b1, start = 1'b0, busy, done;
  logic [17:0] word;
  dac_ser_t ser;
  int checks = 0, failures = 0;
  ad5544_shift dut (.clk1m, .rst, .start, .word, .ser, .busy, .done);
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  logic [17:0] rx; int nb;
  always @(posedge ser.sclk) if (!ser.cs_n && !rst) begin rx = {rx[16:0], ser.sdat}; nb++; end
  initial begin
    repeat (2) @(posedge clk1m); rst = 0;
    for (int k = 0; k < 20; k++) begin
      int cyc;
      logic [17:0] w;
      cyc = 0; w = 18'($urandom);
      nb = 0; rx = '0;
      @(negedge clk1m); word = w; start = 1;
      @(negedge clk1m); start = 0; word = ~w;
      // a second start while busy must be ignored
      if (k == 3) begin start = 1; @(negedge clk1m); start = 0; cyc++; end
      while (!done) begin @(negedge clk1m); cyc++; end
      check(rx == w, $sformatf("word %h got %h", w, rx));
      check(nb == 18, $sformatf("18 bits, got %0d", nb));
      check(cyc == 36, $sformatf("36 us per word, got %0d", cyc));
      @(negedge clk1m); check(!busy && ser.cs_n, "idle after done");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk1m); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
