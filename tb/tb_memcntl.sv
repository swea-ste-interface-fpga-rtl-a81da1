// tb_memcntl: memory controller against the SRAM model. Checks the fixed
// priority TLM > CMD > SWP > EVP when all request together, the address
// each client produces (sweep LUT with SB, energy LUT with EB, accumulator
// with AB for telemetry and ~AB for event processing, quadrant bits 18:17),
// LUT writes (sector, inverse buffer select, low byte first, pointer
// increment), the accumulator buffer swap, and test-mode addressing
// (telemetry reads at {TMADR, offset}; LUT writes redirected to bit 16).
module tb_memcntl;
  import ssf_pkg::*;
  logic clk1m = 1'b0;
  always #1 clk1m = ~clk1m;
  logic rst = 1, lutaddrlat = 0, lutdatlat = 0, swbufsel = 0, enbufsel = 0, mtestmode = 0, ab_swap = 0;
  logic [15:0] cmd_data = '0;
  logic [1:0] mqsel = '0;
  logic [7:0] tmadr = '0, rdata, memdout, memdin;
  mem_req_t tlm_rq = '0, swp_rq = '0, evp_rq = '0;
  logic tlm_done, swp_done, evp_done, arbufsel, lutwr_busy, memcs_n, memoe_n, memwr_n;
  logic [18:0] memadr;
  int checks = 0, failures = 0;
  memcntl dut (.*);
  sram_512kx8 ram (.clk1m, .a(memadr), .d_in(memdout), .d_out(memdin), .cs_n(memcs_n), .oe_n(memoe_n), .wr_n(memwr_n));
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  string order = "";
  always @(posedge clk1m) if (!rst) begin
    if (tlm_done) begin order = {order, "T"}; tlm_rq.req <= 0; end
    if (swp_done) begin order = {order, "S"}; swp_rq.req <= 0; end
    if (evp_done) begin order = {order, "E"}; evp_rq.req <= 0; end
    if (!memcs_n && !memwr_n && dut.gnt == 2'd1) order = {order, "C"};
  end
  // one read through a client, returning the byte
  logic [7:0] got;
  task automatic rd(input int c, input logic [18:0] a);
    @(negedge clk1m);
    case (c)
      0: begin tlm_rq.addr = a; tlm_rq.we = 0; tlm_rq.req = 1; end
      2: begin swp_rq.addr = a; swp_rq.we = 0; swp_rq.req = 1; end
      default: begin evp_rq.addr = a; evp_rq.we = 0; evp_rq.req = 1; end
    endcase
    forever begin
      @(posedge clk1m);
      if ((c == 0 && tlm_done) || (c == 2 && swp_done) || (c == 3 && evp_done)) begin got = rdata; break; end
    end
  endtask
  task automatic lutw(input logic [15:0] d);
    @(negedge clk1m); cmd_data = d; lutdatlat = 1; @(negedge clk1m); lutdatlat = 0;
    wait (!lutwr_busy); @(negedge clk1m);
  endtask
  initial begin
    repeat (3) @(posedge clk1m); rst = 0;
    // priority
    @(negedge clk1m); cmd_data = 16'h1234; lutdatlat = 1;
    tlm_rq = '{req:1, we:0, addr:'0, wdata:'0}; swp_rq = '{req:1, we:0, addr:'0, wdata:'0};
    evp_rq = '{req:1, we:0, addr:'0, wdata:'0};
    @(negedge clk1m); lutdatlat = 0;
    repeat (20) @(negedge clk1m);
    check(order == "TCCSE", $sformatf("priority order %s", order));
    // LUT writes: energy sector, EB=0 -> buffer 1 (bit14=1)
    mqsel = 2'b01;
    @(negedge clk1m); cmd_data = 16'h0000 | (16'h0123 << 1); lutaddrlat = 1; @(negedge clk1m); lutaddrlat = 0;
    lutw(16'hA1B2); lutw(16'hC3D4);
    check(ram.mem[{2'b01, 3'b001, 13'h123, 1'b0}] == 8'hB2 && ram.mem[{2'b01, 3'b001, 13'h123, 1'b1}] == 8'hA1,
          "energy LUT write to the inactive buffer, low byte first");
    check(ram.mem[{2'b01, 3'b001, 13'h124, 1'b0}] == 8'hD4, "pointer advanced one word");
    // sweep sector with SB=1 -> bit14=0
    swbufsel = 1;
    @(negedge clk1m); cmd_data = 16'h4000 | (16'h0540 << 1); lutaddrlat = 1; @(negedge clk1m); lutaddrlat = 0;
    lutw(16'h7788);
    check(ram.mem[{2'b01, 3'b010, 13'h540, 1'b0}] == 8'h88, "sweep LUT write goes to buffer 0 while SB=1");
    // reads with buffer selects
    swbufsel = 0; rd(2, 19'({13'h540, 1'b0})); check(got == 8'h88, "sweep read from SB=0 buffer at 8000+");
    enbufsel = 1; rd(3, 19'({13'h123, 1'b1})); check(got == 8'hA1, "energy LUT read from EB=1 buffer at 4000+");
    // accumulator: EVP writes ~AB, TLM reads AB; swap exchanges them
    ram.mem[{2'b01, 8'b1000_0001, 9'h010}] = 8'h5A;
    rd(0, 19'h010); check(got == 8'h00, "TLM reads buffer 0 while AB=0");
    rd(3, 19'h10010); check(got == 8'h5A, "EVP reaches buffer 1 while AB=0");
    @(negedge clk1m); ab_swap = 1; @(negedge clk1m); ab_swap = 0;
    rd(0, 19'h010); check(got == 8'h5A && arbufsel, "after swap TLM reads buffer 1");
    // test mode
    mtestmode = 1; tmadr = 8'h21;  // MemAddr[16:9] = 0x21 -> 4200 region
    rd(0, 19'h047); check(got == ram.mem[{2'b01, 8'h21, 9'h047}] && got == 8'hA1, "test mode TLM read of LUT area");
    tmadr = 8'h80;
    @(negedge clk1m); cmd_data = 16'h0000; lutaddrlat = 1; @(negedge clk1m); lutaddrlat = 0;
    lutw(16'h99EE);
    check(ram.mem[{2'b01, 1'b1, 1'b0, 1'b0, 13'h0, 1'b0}] == 8'hEE, "test mode LUT write redirected to bit 16");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk1m); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
