// tb_mcpdac: checks that MCP and STE bias load strobes raise a request with
// {D[7:0], 00h} and the right DAC channel (3 MCP, 2 STE bias), that a second
// load while a request is outstanding is ignored, that the request drops on
// the controller's done, and that analog power off clears it.
module tb_mcpdac;
  import ssf_pkg::*;
  logic clk1m = 1'b0;
  always #1 clk1m = ~clk1m;
  logic rst = 1'b1, afepwr = 1'b1, mcpcmdlat = 0, stebiascmdlat = 0, mwrdn = 0;
  logic [15:0] cmd_data = '0, mcpdat;
  logic mcpdacrq; logic [1:0] dacsel;
  int checks = 0, failures = 0;
  mcpdac dut (.clk1m, .rst, .afepwr, .cmd_data, .mcpcmdlat, .stebiascmdlat, .mwrdn,
              .mcpdacrq, .mcpdat, .dacsel);
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  task automatic load(input bit mcp, input logic [7:0] v);
    @(negedge clk1m); cmd_data = {8'hA5, v}; mcpcmdlat = mcp; stebiascmdlat = !mcp;
    @(negedge clk1m); mcpcmdlat = 0; stebiascmdlat = 0;
  endtask
  task automatic ack();
    @(negedge clk1m); mwrdn = 1; @(negedge clk1m); mwrdn = 0;
  endtask
  initial begin
    repeat (2) @(posedge clk1m); rst = 0;
    for (int k = 0; k < 10; k++) begin
      logic [7:0] v; bit m;
      v = 8'($urandom); m = k[0];
      load(m, v);
      check(mcpdacrq, "request raised");
      check(mcpdat == {v, 8'h00}, $sformatf("data %h", mcpdat));
      check(dacsel == (m ? DAC_MCP : DAC_STEBIAS), "DAC channel");
      load(!m, ~v);            // back-to-back load is ignored
      check(mcpdat == {v, 8'h00} && dacsel == (m ? DAC_MCP : DAC_STEBIAS), "second load ignored");
      repeat (3) @(negedge clk1m);
      check(mcpdacrq, "request held until done");
      ack();
      check(!mcpdacrq, "request dropped after done");
    end
    load(1, 8'h12); afepwr = 0; @(negedge clk1m); check(!mcpdacrq && mcpdat == 0, "cleared without power");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk1m); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
