// tdacwr: threshold DAC write controller. Four threshold DACs sit in one
// AD5544; only their upper 6 bits are used. A Threshold DAC Load command
// (D[7:6] channel, D[5:0] value) is shifted at once as {channel, value, 10
// zero bits} (36 us); the DAC outputs are loaded (TDACLD pulse) at the next
// CYCLECLK after the shift. A command arriving while a shift is in progress
// is ignored. TDACCLR clears the DACs in reset or with analog power off.
module tdacwr
  import ssf_pkg::*;
(
  input  logic        clk1m,
  input  logic        rst,
  input  logic        afepwr,
  input  logic        cycleclk,
  input  logic [15:0] cmd_data,
  input  logic        tdaccmdlat,
  output dac_ser_t    tdac,
  output logic        tdacld,
  output logic        tdacclr
);
  logic        srst, ld_pend, sh_busy, sh_done, sh_start;
  logic [17:0] sh_word;
  assign srst    = rst | ~afepwr;
  assign tdacclr = srst;
  assign sh_start = tdaccmdlat && !sh_busy;
  assign sh_word  = {cmd_data[7:6], cmd_data[5:0], 10'b0};

  always_ff @(posedge clk1m) begin
    if (srst) begin
      ld_pend <= 1'b0; tdacld <= 1'b0;
    end else begin
      tdacld <= 1'b0;
      if (sh_done) ld_pend <= 1'b1;
      else if (cycleclk && ld_pend && !sh_busy) begin
        ld_pend <= 1'b0; tdacld <= 1'b1;
      end
    end
  end

  ad5544_shift u_shift (
    .clk1m, .rst(srst), .start(sh_start), .word(sh_word),
    .ser(tdac), .busy(sh_busy), .done(sh_done)
  );
endmodule
