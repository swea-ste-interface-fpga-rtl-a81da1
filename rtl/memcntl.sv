// memcntl: SRAM cycle controller for the external 512K x 8 SRAM.
//
// Four clients share the byte-wide memory with fixed priority
// 1 telemetry (TLM), 2 command LUT writes (CMD), 3 sweep DAC reads (SWP),
// 4 event processing (EVP). Each client holds a mem_req_t until its done
// strobe. An access occupies two CLK1M cycles: in the first the chosen
// client's address, data and strobes are driven (registered outputs, strobes
// active low) and the client's done is high, with the read data passed
// straight from the SRAM to rdata; the second is an idle cycle in which the
// client may retire or renew its request. The two-cycle access and the
// active-low strobes are this design's choice.
//
// Address map (byte addresses, bits 18:17 always the commanded quadrant):
//   energy LUT  {0,0,EB,det[1:0],energy[11:0]}      buffers at 0000 / 4000
//   sweep LUT   {0,1,SB,dac[1:0],step[10:0],byte}   buffers at 8000 / C000
//   accumulator {1,0000000,AB,counter[7:0],byte}    buffers at 10000 / 10200
// Readers use the selected buffer (SB, EB, and AB for telemetry); writers
// use the other one (LUT writes ~SB/~EB, event processing ~AB). The
// accumulator select AB toggles on ab_swap from the telemetry manager. In
// memory test mode telemetry reads {TMADR[7:0], offset[8:0]} instead, and
// if TMADR[7] (address bit 16) is set, LUT writes go to the accumulator
// half (bit 16 forced to 1).
//
// The LUT writer (client CMD) lives here: LUT address write loads the sector
// (D14: 1 sweep, 0 energy) and word pointer D[13:1]; each LUT data write
// stores D[7:0] then D[15:8] and advances the pointer by one word.
// Client address inputs carry only their offset bits: TLM addr[8:0], SWP
// addr[13:0], EVP addr[16] selects accumulator (1) or energy LUT (0) with
// the offset in addr[8:0] or addr[13:0].
module memcntl
  import ssf_pkg::*;
(
  input  logic              clk1m,
  input  logic              rst,
  input  logic [15:0]       cmd_data,
  input  logic              lutaddrlat,
  input  logic              lutdatlat,
  input  logic              swbufsel,
  input  logic              enbufsel,
  input  logic [1:0]        mqsel,
  input  logic              mtestmode,
  input  logic [7:0]        tmadr,
  input  logic              ab_swap,
  output logic              arbufsel,
  input  mem_req_t          tlm_rq,
  output logic              tlm_done,
  input  mem_req_t          swp_rq,
  output logic              swp_done,
  input  mem_req_t          evp_rq,
  output logic              evp_done,
  output logic [7:0]        rdata,
  output logic              lutwr_busy,
  // SRAM pins
  output logic [MEM_AW-1:0] memadr,
  output logic [7:0]        memdout,
  input  logic [7:0]        memdin,
  output logic              memcs_n,
  output logic              memoe_n,
  output logic              memwr_n
);
  typedef enum logic [1:0] {C_TLM, C_CMD, C_SWP, C_EVP} client_e;

  // ---------------- LUT writer ----------------
  logic        sector;
  logic [12:0] ptr;
  logic [15:0] wword;
  logic [1:0]  wpend;     // bit0: low byte pending, bit1: high byte pending
  mem_req_t    cmd_rq;
  logic        cmd_done;
  logic        lut_to_acc;

  assign lut_to_acc = mtestmode & tmadr[7];

  always_ff @(posedge clk1m) begin
    if (rst) begin
      sector <= 1'b0; ptr <= '0; wword <= '0; wpend <= '0;
    end else begin
      if (lutaddrlat) begin
        sector <= cmd_data[14];
        ptr    <= cmd_data[13:1];
      end
      if (lutdatlat && wpend == '0) begin
        wword <= cmd_data;
        wpend <= 2'b11;
      end else if (cmd_done) begin
        if (wpend[0]) wpend[0] <= 1'b0;
        else begin
          wpend[1] <= 1'b0;
          ptr      <= ptr + 13'd1;
        end
      end
    end
  end
  assign lutwr_busy    = wpend != '0;
  assign cmd_rq.req    = wpend != '0;
  assign cmd_rq.we     = 1'b1;
  assign cmd_rq.wdata  = wpend[0] ? wword[7:0] : wword[15:8];
  assign cmd_rq.addr   = {mqsel, lut_to_acc, sector,
                          ~(sector ? swbufsel : enbufsel), ptr, ~wpend[0]};

  // ---------------- accumulator buffer select ----------------
  always_ff @(posedge clk1m) begin
    if (rst)          arbufsel <= 1'b0;
    else if (ab_swap) arbufsel <= ~arbufsel;
  end

  // ---------------- full addresses per client ----------------
  logic [MEM_AW-1:0] a_tlm, a_swp, a_evp;
  assign a_tlm = mtestmode ? {mqsel, tmadr, tlm_rq.addr[8:0]}
                           : {mqsel, 8'b1000_0000 | {7'b0, arbufsel}, tlm_rq.addr[8:0]};
  assign a_swp = {mqsel, 2'b01, swbufsel, swp_rq.addr[13:0]};
  assign a_evp = evp_rq.addr[16] ? {mqsel, 8'b1000_0000 | {7'b0, ~arbufsel}, evp_rq.addr[8:0]}
                                 : {mqsel, 2'b00, enbufsel, evp_rq.addr[13:0]};

  // ---------------- arbiter ----------------
  logic    active;
  client_e gnt;

  always_ff @(posedge clk1m) begin
    if (rst) begin
      active <= 1'b0; gnt <= C_TLM;
      memadr <= '0; memdout <= '0; memcs_n <= 1'b1; memoe_n <= 1'b1; memwr_n <= 1'b1;
    end else if (active) begin
      active <= 1'b0;
      memcs_n <= 1'b1; memoe_n <= 1'b1; memwr_n <= 1'b1;
    end else begin
      active <= 1'b1;
      memcs_n <= 1'b0;
      if (tlm_rq.req) begin
        gnt <= C_TLM; memadr <= a_tlm; memdout <= tlm_rq.wdata;
        memoe_n <= tlm_rq.we; memwr_n <= ~tlm_rq.we;
      end else if (cmd_rq.req) begin
        gnt <= C_CMD; memadr <= cmd_rq.addr; memdout <= cmd_rq.wdata;
        memoe_n <= cmd_rq.we; memwr_n <= ~cmd_rq.we;
      end else if (swp_rq.req) begin
        gnt <= C_SWP; memadr <= a_swp; memdout <= swp_rq.wdata;
        memoe_n <= swp_rq.we; memwr_n <= ~swp_rq.we;
      end else if (evp_rq.req) begin
        gnt <= C_EVP; memadr <= a_evp; memdout <= evp_rq.wdata;
        memoe_n <= evp_rq.we; memwr_n <= ~evp_rq.we;
      end else begin
        active <= 1'b0; memcs_n <= 1'b1;
      end
    end
  end

  assign tlm_done = active && gnt == C_TLM;
  assign cmd_done = active && gnt == C_CMD;
  assign swp_done = active && gnt == C_SWP;
  assign evp_done = active && gnt == C_EVP;
  assign rdata    = memdin;

  // a client's request must stay up until it is served
  property p_hold(logic r, logic d);
    @(posedge clk1m) disable iff (rst) (r && !d && !active) |=> r;
  endproperty
  a_tlm_hold: assert property (p_hold(tlm_rq.req, tlm_done));
  a_evp_hold: assert property (p_hold(evp_rq.req, evp_done));

endmodule
