// evproc: STE event processing for NCHAIN (4) shaper chains.
//
// Acceptance: a chain accepts an event at the falling edge of its PEAK
// signal if the chain is enabled, LLD is high and has been high for at most
// LLD_MAX_US microseconds, no enabled chain asserts PULSERST, and the chain
// has no event pending. ADCSOC is raised combinationally in the accepting
// cycle, held until the ADC reports BUSY, and the end of BUSY queues the
// chain for readout. Further events on a pending chain are dropped; other
// chains keep converting.
// Arbitration: one round-robin arbiter serves the queued chains and the
// housekeeping ADC (HSKPRQ), which shares the 12-bit ADC bus. A read drives
// ADCREAD (or HADCREAD) for one cycle and samples ADCDAT in that cycle.
// Processing: the value {chain, ADC[11:0]} addresses the energy LUT in SRAM;
// the 8-bit result selects a 16-bit accumulator, whose low byte is read,
// incremented and written back; only when it was FF is the high byte read
// and written too. An idle cycle follows each event. ALLPRSTL and IPRSTCNT
// are the PULSERST inhibits handed to the rate counters. The block is held
// in reset while ADC reset is asserted or the analog power is off.
// The acceptance rule, drop rule, LUT/accumulator scheme and fairness follow
// the description; LLD_MAX_US=4 reads "4-5 us", and ULD takes no part in
// acceptance because its role there is not specified.
module evproc
  import ssf_pkg::*;
#(
  parameter int unsigned NCHAIN     = 4,
  parameter int unsigned LLD_MAX_US = 4
) (
  input  logic              clk1m,
  input  logic              rst,
  input  logic              afepwr,
  input  logic              adcrst,
  input  logic [NCHAIN-1:0] schainenb,
  input  logic [NCHAIN-1:0] lld,
  input  logic [NCHAIN-1:0] peak,
  input  logic [NCHAIN-1:0] pulserst,
  input  logic [NCHAIN-1:0] adcbusy,
  output logic [NCHAIN-1:0] adcsoc,
  output logic [NCHAIN-1:0] adcread,
  input  logic [11:0]       adcdat,
  input  logic              hskprq,
  output logic              hadcread,
  output logic              allprstl,
  output logic [NCHAIN-1:0] iprstcnt,
  output mem_req_t          mem_rq,
  input  logic              mem_done,
  input  logic [7:0]        mem_rdata,
  output logic              evdone,      // one event counted (one cycle)
  output logic [NCHAIN-1:0] evdrop       // an event was dropped on a pending chain
);
  typedef enum logic [2:0] {C_IDLE, C_SOC, C_CONV, C_READY, C_PROC} chain_e;
  typedef enum logic [2:0] {P_IDLE, P_LUT, P_RDLO, P_WRLO, P_RDHI, P_WRHI, P_GAP} proc_e;

  logic              srst, inhibit;
  chain_e            cst [NCHAIN];
  logic [NCHAIN-1:0] peak_q, peakfall, accept, pend;
  logic [3:0]        lldcnt [NCHAIN];
  proc_e             pst;
  logic [2:0]        rr;       // next index to favour; NCHAIN = housekeeping
  logic [1:0]        cur;
  logic [11:0]       energy;
  logic [7:0]        bin, lob, byt;

  assign srst    = rst | adcrst | ~afepwr;
  assign inhibit = |(pulserst & schainenb);
  assign allprstl = ~inhibit;

  for (genvar i = 0; i < NCHAIN; i++) begin : g_ch
    assign iprstcnt[i] = |(pulserst & schainenb & ~(NCHAIN'(1) << i));
    assign peakfall[i] = peak_q[i] & ~peak[i];
    assign pend[i]     = cst[i] != C_IDLE;
    assign accept[i]   = !srst && schainenb[i] && peakfall[i] && lld[i] &&
                         32'(lldcnt[i]) <= LLD_MAX_US && !inhibit && !pend[i];
    assign evdrop[i]   = !srst && peakfall[i] && pend[i];
    assign adcsoc[i]   = accept[i] || cst[i] == C_SOC;

    always_ff @(posedge clk1m) begin
      if (srst) begin
        peak_q[i] <= 1'b0; lldcnt[i] <= '0;
      end else begin
        peak_q[i] <= peak[i];
        if (!lld[i])              lldcnt[i] <= '0;
        else if (lldcnt[i] != '1) lldcnt[i] <= lldcnt[i] + 4'd1;
      end
    end
  end

  // round-robin choice among ready chains and the housekeeping request
  logic [NCHAIN:0] rq;
  logic            any;
  logic [2:0]      pick;
  always_comb begin
    for (int i = 0; i < NCHAIN; i++) rq[i] = cst[i] == C_READY;
    rq[NCHAIN] = hskprq;
    any  = |rq;
    pick = rr;
    for (int k = NCHAIN; k >= 0; k--) begin
      automatic logic [2:0] j = 3'((32'(rr) + k) % (NCHAIN + 1));
      if (rq[j]) pick = j;
    end
  end

  always_ff @(posedge clk1m) begin
    if (srst) begin
      for (int i = 0; i < NCHAIN; i++) cst[i] <= C_IDLE;
      pst <= P_IDLE; rr <= '0; cur <= '0; bin <= '0; lob <= '0;
      adcread <= '0; hadcread <= 1'b0; evdone <= 1'b0;
    end else begin
      adcread  <= '0;
      hadcread <= 1'b0;
      evdone   <= 1'b0;
      if (|adcread) energy <= adcdat;   // ADC value sampled in the ADCREAD cycle
      for (int i = 0; i < NCHAIN; i++) begin
        unique case (cst[i])
          C_IDLE:  if (accept[i])  cst[i] <= C_SOC;
          C_SOC:   if (adcbusy[i]) cst[i] <= C_CONV;
          C_CONV:  if (!adcbusy[i]) cst[i] <= C_READY;
          default: ;
        endcase
      end
      unique case (pst)
        P_IDLE: if (any && adcread == '0 && !hadcread) begin
          cur <= pick[1:0];
          rr  <= (32'(pick) == NCHAIN) ? 3'd0 : pick + 3'd1;
          if (32'(pick) == NCHAIN) hadcread <= 1'b1;
          else begin
            adcread[pick[1:0]] <= 1'b1;
            cst[pick[1:0]] <= C_PROC;
            pst           <= P_LUT;
          end
        end
        P_LUT:  if (mem_done) begin bin <= mem_rdata; pst <= P_RDLO; end
        P_RDLO: if (mem_done) begin lob <= mem_rdata; pst <= P_WRLO; end
        P_WRLO: if (mem_done) begin
          if (lob == 8'hFF) pst <= P_RDHI;
          else begin pst <= P_GAP; evdone <= 1'b1; end
        end
        P_RDHI: if (mem_done) begin lob <= mem_rdata; pst <= P_WRHI; end
        P_WRHI: if (mem_done) begin pst <= P_GAP; evdone <= 1'b1; end
        P_GAP: begin
          cst[cur] <= C_IDLE;
          pst <= P_IDLE;
        end
        default: pst <= P_IDLE;
      endcase
    end
  end


  always_comb begin
    mem_rq.req   = 1'b0;
    mem_rq.we    = 1'b0;
    mem_rq.addr  = '0;
    mem_rq.wdata = '0;
    byt          = lob + 8'd1;
    unique case (pst)
      P_LUT:  begin mem_rq.req = 1'b1; mem_rq.addr[13:0] = {cur, energy}; end
      P_RDLO: begin mem_rq.req = 1'b1; mem_rq.addr = {2'b00, 1'b1, 7'b0, bin, 1'b0}; end
      P_WRLO: begin mem_rq.req = 1'b1; mem_rq.we = 1'b1; mem_rq.addr = {2'b00, 1'b1, 7'b0, bin, 1'b0}; mem_rq.wdata = byt; end
      P_RDHI: begin mem_rq.req = 1'b1; mem_rq.addr = {2'b00, 1'b1, 7'b0, bin, 1'b1}; end
      P_WRHI: begin mem_rq.req = 1'b1; mem_rq.we = 1'b1; mem_rq.addr = {2'b00, 1'b1, 7'b0, bin, 1'b1}; mem_rq.wdata = byt; end
      default: ;
    endcase
  end

endmodule
