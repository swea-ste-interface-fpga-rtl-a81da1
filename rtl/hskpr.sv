// hskpr: housekeeping ADC sequencer.
//
// CYCLING mode (HSKPMD=0, always while SWEA is disabled): the analog mux
// channel is set to 0 at CYCLECLK; at each TK8HZ tick (16 per cycle) one
// conversion is made, its result latched as {channel, value[11:0]} on AHKPG,
// HKPGDN is pulsed for the telemetry manager and the channel advances, so
// all 16 channels are scanned once per 2 s cycle.
// SWEEP mode (HSKPMD=1): at CYCLECLK the channel is set to the commanded
// SWHKSEL and stays there; conversions are made at every SAMPLECLK (the
// result goes out with the anode counter messages) and HKPGDN still pulses at
// every TK8HZ with the latest result.
// SHUTDOWN mode (analog power off or ADC reset asserted): no ADC activity,
// channel held at 0, HKPGDN still pulses at every TK8HZ so digital
// housekeeping keeps flowing.
// A conversion: HADCSOC high until HADCBUSY rises, wait for HADCBUSY to
// fall, then request the shared ADC bus from the event processor (HSKPRQ)
// and sample ADCDAT in the cycle it grants HADCRD. Mux outputs: AMUXSEL =
// channel[2:0], AMUXENB = 01 for channels 0-7, 10 for 8-15, 00 in shutdown
// (the mux encoding is this design's choice). The strobes from the timing
// block are used one cycle late so that HSKPMD has already toggled.
module hskpr (
  input  logic        clk1m,
  input  logic        rst,
  input  logic        afepwr,
  input  logic        adcrst,
  input  logic        cycleclk,
  input  logic        sampleclk,
  input  logic        tk8hz,
  input  logic        hskpmd,
  input  logic [3:0]  swhksel,
  input  logic        hadcbusy,
  input  logic        hadcrd,
  input  logic [11:0] adcdat,
  output logic        hadcsoc,
  output logic        hskprq,
  output logic [2:0]  amuxsel,
  output logic [1:0]  amuxenb,
  output logic [15:0] ahkpg,
  output logic        hkpgdn
);
  typedef enum logic [1:0] {H_IDLE, H_SOC, H_CONV, H_READ} state_e;
  state_e     st;
  logic [3:0] ch;
  logic       shdn, cyc_d, smp_d, tk8_d;

  assign shdn = ~afepwr | adcrst;

  always_ff @(posedge clk1m) begin
    if (rst) begin
      cyc_d <= 1'b0; smp_d <= 1'b0; tk8_d <= 1'b0;
    end else begin
      cyc_d <= cycleclk; smp_d <= sampleclk; tk8_d <= tk8hz;
    end
  end

  always_ff @(posedge clk1m) begin
    if (rst) begin
      st <= H_IDLE; ch <= '0; ahkpg <= '0; hkpgdn <= 1'b0;
    end else if (shdn) begin
      st <= H_IDLE; ch <= '0;
      hkpgdn <= tk8_d;
    end else begin
      hkpgdn <= hskpmd & tk8_d;
      if (cyc_d) ch <= hskpmd ? swhksel : 4'd0;
      unique case (st)
        H_IDLE: begin
          if (!hskpmd && tk8_d) st <= H_SOC;
          if (hskpmd && smp_d)  st <= H_SOC;
        end
        H_SOC:  if (hadcbusy)  st <= H_CONV;
        H_CONV: if (!hadcbusy) st <= H_READ;
        H_READ: if (hadcrd) begin
          ahkpg <= {ch, adcdat};
          st    <= H_IDLE;
          if (!hskpmd) begin
            hkpgdn <= 1'b1;
            ch     <= ch + 4'd1;
          end
        end
        default: st <= H_IDLE;
      endcase
    end
  end

  assign hadcsoc = (st == H_SOC);
  assign hskprq  = (st == H_READ);
  assign amuxsel = ch[2:0];
  assign amuxenb = shdn ? 2'b00 : (ch[3] ? 2'b10 : 2'b01);
endmodule
