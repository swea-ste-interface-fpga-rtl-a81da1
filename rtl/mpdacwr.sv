// mpdacwr: controller of the AD5544 quad DAC shared by the STE test pulser
// (channel 0), the STE bias supply (2) and the MCP supply (3).
//
// Two requesters: the STE test pulser (pdacrq/pdat, about every 500 us while
// active) and the MCP/STE-bias command path (mcpdacrq/mcpdat/dacsel). The
// pulser wins when both wait; a command write starts only while DACWRON is
// high, a window the pulser opens outside the ~128 us around each of its
// updates. Each write shifts {channel, value} in 36 us; the requester gets a
// one-cycle done (pwrdn / mwrdn) and must drop its request on it. A command
// write is followed at once by a DAC load pulse; pulser writes are loaded by
// the pulser's own PDACLD at the rising edge of its test pulse, and both load
// pulses drive the one MPDACLD output. MPDACCLR clears the DACs while in
// reset or with analog power off. Priority and window follow the design
// description; the exact cycle counts are this design's.
module mpdacwr
  import ssf_pkg::*;
(
  input  logic        clk1m,
  input  logic        rst,
  input  logic        afepwr,
  input  logic        pdacrq,
  input  logic [15:0] pdat,
  input  logic        pdacld,
  input  logic        dacwron,
  input  logic        mcpdacrq,
  input  logic [15:0] mcpdat,
  input  logic [1:0]  dacsel,
  output logic        pwrdn,
  output logic        mwrdn,
  output dac_ser_t    mpdac,
  output logic        mpdacld,
  output logic        mpdacclr
);
  typedef enum logic [1:0] {M_IDLE, M_SHIFT, M_WAIT} state_e;
  state_e      st;
  logic        src_p;
  logic        mld;
  logic        sh_start, sh_busy, sh_done;
  logic [17:0] sh_word;
  logic        srst;

  assign srst     = rst | ~afepwr;
  assign mpdacclr = srst;

  always_ff @(posedge clk1m) begin
    if (srst) begin
      st <= M_IDLE; src_p <= 1'b0; mld <= 1'b0; sh_start <= 1'b0; sh_word <= '0;
    end else begin
      sh_start <= 1'b0;
      mld      <= 1'b0;
      unique case (st)
        M_IDLE:
          if (pdacrq) begin
            sh_word <= {DAC_STEPULSER, pdat}; sh_start <= 1'b1; src_p <= 1'b1; st <= M_SHIFT;
          end else if (mcpdacrq && dacwron) begin
            sh_word <= {dacsel, mcpdat}; sh_start <= 1'b1; src_p <= 1'b0; st <= M_SHIFT;
          end
        M_SHIFT:
          if (sh_done) begin
            st <= M_WAIT;
            if (!src_p) mld <= 1'b1;
          end
        M_WAIT: st <= M_IDLE;
        default: st <= M_IDLE;
      endcase
    end
  end

  assign pwrdn   = sh_done &  src_p;
  assign mwrdn   = sh_done & ~src_p;
  assign mpdacld = mld | pdacld;

  ad5544_shift u_shift (
    .clk1m, .rst(srst), .start(sh_start), .word(sh_word),
    .ser(mpdac), .busy(sh_busy), .done(sh_done)
  );

  a_one_at_a_time: assert property (@(posedge clk1m) disable iff (srst)
    sh_start |-> !sh_busy);

endmodule
