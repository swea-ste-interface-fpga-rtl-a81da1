// stetestpulse: STE test pulser. While enabled it ramps the 16-bit pulser DAC
// (channel 0 of the shared DAC) from 0 through 65535, one step per tick, and
// issues a 16 us active-low test pulse before each step.
//
// Ticks are decoded from the microsecond-in-step counter LOWCNT at 0, 512 and
// 1024, giving spacings of 512, 512 and 426 us (about 500 us; a ramp lasts
// about 32 s). A ramp starts at TESTCYCLECLK (every 10 s). At each tick the
// next value is requested from the DAC controller; once it is shifted the
// test pulse goes low for PULSE_US and at its rising edge PDACLD moves the new
// value to the DAC output, so each pulse is made with the previous value.
// After the last value the DAC is written with zero and the pulses stop until
// the next TESTCYCLECLK (so ramps repeat every 40 s). Disabling the pulser
// while active also writes zero before going idle. In low-resolution mode the
// lower 13 bits of each value are forced to zero (8 levels per ramp).
// DACWRON is low from 40 us before to 88 us after each tick while the pulser
// is enabled, keeping command DAC writes out of the pulser's slot (128 us of
// each ~500 us). Tick positions, pulse width and window length follow the
// description; the ordering inside a tick is this design's choice.
module stetestpulse #(
  parameter int unsigned STEP_US  = 1450,
  parameter int unsigned PULSE_US = 16
) (
  input  logic        clk1m,
  input  logic        rst,
  input  logic        afepwr,
  input  logic        enbstetp,
  input  logic        tplrmode,
  input  logic        testcycleclk,
  input  logic [10:0] lowcnt,
  input  logic        pwrdn,
  output logic        pdacrq,
  output logic [15:0] pdat,
  output logic        pdacld,
  output logic        testpulse_n,
  output logic        dacwron,
  output logic        ramping
);
  typedef enum logic [1:0] {T_IDLE, T_WAITDAC, T_PULSE, T_CLEAR} state_e;
  state_e      st;
  logic [15:0] val;
  logic [4:0]  pc;
  logic        tick;
  logic        srst;

  assign srst = rst | ~afepwr;
  assign tick = (lowcnt == 11'd0) || (lowcnt == 11'd512) || (lowcnt == 11'd1024);

  function automatic logic in_win(input logic [10:0] lc);
    // 40 us before to 88 us after a tick at 0, 512 or 1024 (wrap at STEP_US)
    return (32'(lc) >= STEP_US - 40) || (lc < 11'd88) ||
           (lc >= 11'd472 && lc < 11'd600) || (lc >= 11'd984 && lc < 11'd1112);
  endfunction
  assign dacwron = !(enbstetp && in_win(lowcnt));

  always_ff @(posedge clk1m) begin
    if (srst) begin
      st <= T_IDLE; val <= '0; ramping <= 1'b0; pc <= '0;
      pdacrq <= 1'b0; pdat <= '0; pdacld <= 1'b0; testpulse_n <= 1'b1;
    end else begin
      pdacld <= 1'b0;
      unique case (st)
        T_IDLE: begin
          if (ramping && !enbstetp) begin
            ramping <= 1'b0; pdat <= '0; pdacrq <= 1'b1; st <= T_CLEAR;
          end else if (!ramping && enbstetp && testcycleclk) begin
            ramping <= 1'b1; val <= '0;
          end else if (ramping && tick) begin
            pdacrq <= 1'b1;
            if (val == 16'hFFFF) begin
              ramping <= 1'b0; pdat <= '0; st <= T_CLEAR;
            end else begin
              pdat <= tplrmode ? ((val + 16'd1) & 16'hE000) : (val + 16'd1);
              val  <= val + 16'd1;
              st   <= T_WAITDAC;
            end
          end
        end
        T_WAITDAC: if (pwrdn) begin
          pdacrq <= 1'b0; testpulse_n <= 1'b0; pc <= '0; st <= T_PULSE;
        end
        T_PULSE: begin
          if (32'(pc) == PULSE_US - 1) begin
            testpulse_n <= 1'b1; pdacld <= 1'b1; st <= T_IDLE;
          end else pc <= pc + 5'd1;
        end
        T_CLEAR: if (pwrdn) begin
          pdacrq <= 1'b0; pdacld <= 1'b1; st <= T_IDLE;
        end
        default: st <= T_IDLE;
      endcase
    end
  end
endmodule
