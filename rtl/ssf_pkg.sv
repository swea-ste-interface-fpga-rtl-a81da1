// ssf_pkg: types and constants shared by the SSF (SWEA/STE Interface FPGA)
// modules. Command IDs, telemetry message IDs, the DAC channel numbers and the
// SRAM client request bundle are defined here so every subsystem and every
// testbench uses the same values. The IDs and DAC numbers are the design's
// documented values; the struct layouts are this implementation's choice.
package ssf_pkg;

  // Command IDs (8-bit ID field of the 24-bit command)
  localparam logic [7:0] CMD_BUFSEL   = 8'hE0;
  localparam logic [7:0] CMD_MCPDAC   = 8'hE1;
  localparam logic [7:0] CMD_CTRL     = 8'hE2;
  localparam logic [7:0] CMD_PEXEC    = 8'hE3;
  localparam logic [7:0] CMD_HEATER   = 8'hE4;
  localparam logic [7:0] CMD_TDAC     = 8'hE5;
  localparam logic [7:0] CMD_ARM      = 8'hE6;
  localparam logic [7:0] CMD_SWHKSEL  = 8'hE7;
  localparam logic [7:0] CMD_LUTADDR  = 8'hE8;
  localparam logic [7:0] CMD_LUTDATA  = 8'hE9;
  localparam logic [7:0] CMD_MEMQUAD  = 8'hEA;
  localparam logic [7:0] CMD_MEMTEST  = 8'hEB;
  localparam logic [7:0] CMD_COVTMO   = 8'hEC;
  localparam logic [7:0] CMD_STEBIAS  = 8'hED;

  // Telemetry message IDs (upper 6 bits of the header word)
  localparam logic [5:0] MSG_ANODE    = 6'h30;
  localparam logic [5:0] MSG_ANODE_HK = 6'h31;
  localparam logic [5:0] MSG_ENERGY   = 6'h32;
  localparam logic [5:0] MSG_RATES    = 6'h34;
  localparam logic [5:0] MSG_RATES1   = 6'h35;
  localparam logic [5:0] MSG_HSKP     = 6'h36;

  // Channel numbers inside the MCP / STE-bias / STE-pulser quad DAC
  localparam logic [1:0] DAC_STEPULSER = 2'd0;
  localparam logic [1:0] DAC_STEBIAS   = 2'd2;
  localparam logic [1:0] DAC_MCP       = 2'd3;

  localparam int MEM_AW = 19;  // 512K x 8 SRAM

  // One SRAM client request: held until the arbiter returns done.
  typedef struct packed {
    logic              req;
    logic              we;
    logic [MEM_AW-1:0] addr;   // bits 18:17 are replaced by the quadrant select
    logic [7:0]        wdata;
  } mem_req_t;

  // Serial input of an AD5544 quad DAC
  typedef struct packed {
    logic sdat;
    logic sclk;
    logic cs_n;
  } dac_ser_t;

  // Header word of a telemetry message: ID in bits 15:10, length-2 in 9:0
  function automatic logic [15:0] tlm_header(input logic [5:0] id, input int unsigned len);
    logic [9:0] l;
    l = 10'(len - 2);
    return {id, l};
  endfunction

endpackage
