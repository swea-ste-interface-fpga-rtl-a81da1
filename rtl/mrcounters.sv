// mrcounters: monitor rate counters of the four STE PHA chains. For each
// chain three counters are clocked by the rising edges of LLD (9 bits), ULD
// (4 bits) and PULSERESET (3 bits); each stops at its maximum. LLD and ULD
// counting is inhibited while any active chain asserts PULSERESET (ALLPRSTL
// low); a chain's PULSERESET counting is inhibited while another active
// chain asserts it (IPRSTCNT). Both inhibits come from the event processor
// and act as count enables sampled at the counting edge. At every
// SAMCLKINT (free-running 5.8 ms interval) the counts are copied into
// holding registers and the counters cleared by an asynchronous clear pulse
// one cycle later. Held in reset while the analog power is off; one clear
// pulse is given as the module leaves reset.
module mrcounters #(
  parameter int unsigned NCHAIN = 4,
  parameter int unsigned LLD_W  = 9,
  parameter int unsigned ULD_W  = 4,
  parameter int unsigned PR_W   = 3
) (
  input  logic                            clk1m,
  input  logic                            rst,
  input  logic                            afepwr,
  input  logic                            samclkint,
  input  logic [NCHAIN-1:0]               lld,
  input  logic [NCHAIN-1:0]               uld,
  input  logic [NCHAIN-1:0]               pulserst,
  input  logic                            allprstl,
  input  logic [NCHAIN-1:0]               iprstcnt,
  output logic [NCHAIN-1:0][LLD_W-1:0]    lldlat,
  output logic [NCHAIN-1:0][ULD_W-1:0]    uldlat,
  output logic [NCHAIN-1:0][PR_W-1:0]     prlat,
  output logic                            latched
);
  logic srst, srst_q, clr;
  logic [NCHAIN-1:0][LLD_W-1:0] lc;
  logic [NCHAIN-1:0][ULD_W-1:0] uc;
  logic [NCHAIN-1:0][PR_W-1:0]  pc;
  assign srst = rst | ~afepwr;

  always_ff @(posedge clk1m) begin
    if (srst) begin
      clr <= 1'b0; srst_q <= 1'b1; latched <= 1'b0; lldlat <= '0; uldlat <= '0; prlat <= '0;
    end else begin
      clr     <= samclkint | srst_q;   // also one clear on leaving reset
      srst_q  <= 1'b0;
      latched <= samclkint;
      if (samclkint) begin
        lldlat <= lc; uldlat <= uc; prlat <= pc;
      end
    end
  end

  for (genvar i = 0; i < NCHAIN; i++) begin : g_ch
    logic [LLD_W-1:0] lc_r;
    always_ff @(posedge lld[i] or posedge clr) begin
      if (clr) lc_r <= '0;
      else if (allprstl && lc_r != '1) lc_r <= lc_r + 1'b1;
    end
    assign lc[i] = lc_r;
    logic [ULD_W-1:0] uc_r;
    always_ff @(posedge uld[i] or posedge clr) begin
      if (clr) uc_r <= '0;
      else if (allprstl && uc_r != '1) uc_r <= uc_r + 1'b1;
    end
    assign uc[i] = uc_r;
    logic [PR_W-1:0] pc_r;
    always_ff @(posedge pulserst[i] or posedge clr) begin
      if (clr) pc_r <= '0;
      else if (!iprstcnt[i] && pc_r != '1) pc_r <= pc_r + 1'b1;
    end
    assign pc[i] = pc_r;
  end
endmodule
