// dacsweep: SWEA/STE sweep DAC control. Four sweep DACs (0 analyzer,
// 1 deflector 1, 2 deflector 2, 3 V0) in one AD5544 follow a table held in
// the sweep LUT area of SRAM, one 16-bit word per DAC per step.
//
// At every STEPCLK the block first pulses SWDACLD, moving the words shifted
// during the previous step into the DAC outputs, and then fetches the words
// of the next step (step index + 1, or 0 after the GAP step NSTEPS): for each
// DAC it reads the low byte and the high byte (sweep-LUT offset
// {dac, step, byte}) through the memory arbiter and shifts {dac, word} into
// the DAC at 500 kHz. The first table word (step 0) is therefore shifted at
// GAPSTART and appears exactly at CYCLECLK; the GAP value (step 1344, byte
// address A80) appears at GAPSTART. The block is held in reset while SWEA is
// disabled or the analog power is off. The per-step sequence is the
// documented one; the byte order (low byte at the even address) follows the
// LUT write order.
//
// Timing: one step's fetch and shift takes about 4 x (4 + 37) us, well inside
// a 1450 us step.
module dacsweep
  import ssf_pkg::*;
#(
  parameter int unsigned NSTEPS = 1344,
  parameter int unsigned NDAC   = 4
) (
  input  logic        clk1m,
  input  logic        rst,
  input  logic        enbswea,
  input  logic        afepwr,
  input  logic        stepclk,
  input  logic [10:0] stepidx,
  output mem_req_t    mem_rq,
  input  logic        mem_done,
  input  logic [7:0]  mem_rdata,
  output dac_ser_t    swdac,
  output logic        swdacld,
  output logic        swdacclr,
  output logic        sdcidle
);
  typedef enum logic [1:0] {S_IDLE, S_RD, S_SHIFT} state_e;
  state_e      st;
  logic [1:0]  dac;
  logic [10:0] nstep;
  logic        hib;
  logic [7:0]  lo;
  logic        sh_start, sh_busy, sh_done;
  logic [17:0] sh_word;
  logic        srst;

  assign srst     = rst | ~enbswea | ~afepwr;
  assign swdacclr = srst;

  always_ff @(posedge clk1m) begin
    if (srst) begin
      st <= S_IDLE; dac <= '0; nstep <= '0; hib <= 1'b0; lo <= '0;
      sh_start <= 1'b0; sh_word <= '0; swdacld <= 1'b0;
    end else begin
      sh_start <= 1'b0;
      swdacld  <= 1'b0;
      if (stepclk) begin
        swdacld <= 1'b1;
        nstep   <= (32'(stepidx) >= NSTEPS) ? 11'd0 : stepidx + 11'd1;
        dac     <= '0;
        hib     <= 1'b0;
        st      <= S_RD;
      end else begin
        unique case (st)
          S_IDLE: ;
          S_RD: if (mem_done) begin
            if (!hib) begin
              lo  <= mem_rdata;
              hib <= 1'b1;
            end else begin
              sh_word  <= {dac, mem_rdata, lo};
              sh_start <= 1'b1;
              hib      <= 1'b0;
              st       <= S_SHIFT;
            end
          end
          S_SHIFT: if (sh_done) begin
            if (32'(dac) == NDAC - 1) st <= S_IDLE;
            else begin
              dac <= dac + 2'd1;
              st  <= S_RD;
            end
          end
          default: st <= S_IDLE;
        endcase
      end
    end
  end

  assign mem_rq.req   = (st == S_RD);
  assign mem_rq.we    = 1'b0;
  assign mem_rq.wdata = '0;
  assign mem_rq.addr  = {5'b0, dac, nstep, hib};
  assign sdcidle      = (st == S_IDLE) && !sh_busy;

  ad5544_shift u_shift (
    .clk1m, .rst(srst), .start(sh_start), .word(sh_word),
    .ser(swdac), .busy(sh_busy), .done(sh_done)
  );

endmodule
