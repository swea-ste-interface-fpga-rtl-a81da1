// covercntl: cover actuator control for the one-shot SWEA cover and the
// re-closable STE cover. Actuator outputs are active high.
//
// SWEA cover: the switch follows the protected SWEACOVON bit from the command
// interface and is cleared automatically (SWEACLR to the command interface)
// 2 s, i.e. 16 TK8HZ ticks, after it was set.
// STE cover: output 0 opens (STECOVSW0 / STECOVSTAT0), output 1 closes. In
// non-forced mode (stecovon) an actuator is powered only while its status
// input is high, i.e. the cover has not yet reached that end; a low status
// ends the actuation. In forced mode (forstecovon) the status is ignored.
// Either way the actuation ends after the programmed timeout of STECOVTMO+1
// TK8HZ ticks (1/8 .. 15/8 s); setting 15 never times out. Ending an
// actuation pulses STECLR to clear the command bits. CTIMIDLE is high while
// no actuator is powered; the command interface ignores new cover commands
// otherwise. Timing by TK8HZ ticks and the reading of the status polarity
// are this design's; the rest follows the description.
module covercntl (
  input  logic       clk1m,
  input  logic       rst,
  input  logic       tk8hz,
  input  logic       sweacovon,
  input  logic [1:0] stecovon,
  input  logic [1:0] forstecovon,
  input  logic [1:0] stecovstat,
  input  logic [3:0] stecovtmo,
  output logic       sweacovsw,
  output logic [1:0] stecovsw,
  output logic       sweaclr,
  output logic       steclr,
  output logic       ctimidle
);
  logic [4:0] swt;
  logic [3:0] stt;
  logic       ste_on, ste_end;

  assign sweacovsw = sweacovon;
  always_ff @(posedge clk1m) begin
    if (rst || !sweacovon) begin
      swt <= '0; sweaclr <= 1'b0;
    end else begin
      sweaclr <= 1'b0;
      if (tk8hz) begin
        if (swt == 5'd15) sweaclr <= 1'b1;
        else swt <= swt + 5'd1;
      end
    end
  end

  assign stecovsw = forstecovon | (stecovon & stecovstat);
  assign ste_on   = (forstecovon != '0) || (stecovon != '0);
  assign ste_end  = (stecovon != '0 && (stecovon & stecovstat) == '0) ||
                    (tk8hz && stecovtmo != 4'hF && stt == stecovtmo);

  always_ff @(posedge clk1m) begin
    if (rst || !ste_on) begin
      stt <= '0; steclr <= 1'b0;
    end else begin
      steclr <= ste_end;
      if (tk8hz && stt != 4'hF) stt <= stt + 4'd1;
    end
  end

  assign ctimidle = !sweacovon && !ste_on;
endmodule
