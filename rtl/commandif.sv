// commandif: command interface of the SSF.
//
// Receiver: commands arrive as 8-bit ID, 16-bit data and one odd-parity bit,
// MSB first. Each bit is valid on CMDDAT in a CLK1M cycle in which the bit
// strobe CMDCLK is high (25 bits take about 27 us). A frame with bad parity
// is dropped and sets CMDPE; a partial frame is discarded after FRAME_GAP
// clocks without a bit. (The bit-level framing is this design's choice.)
//
// Decode: the command IDs E0..ED write the control registers below. Values
// the command table marks as staged are held in a pending copy and applied
// at CYCLECLK or GAPSTART; the rest take effect at once. Commands handled by
// other subsystems (MCP/STE-bias DAC, threshold DAC, LUT address/data) are
// passed on as a one-cycle select strobe with the data on cmd_data.
//
// Protected commands: ARM (E6) must carry exactly one of D7,D6,D2,D1,D0. It
// arms that signal for ARM_TIMEOUT_S seconds (counted in TK1S); further
// non-zero arms are ignored while armed and an all-zero arm disarms. An
// execute (E3) whose ON bits equal the armed bit queues the set, which is
// applied at the next half-second tick TKHS; any other ON pattern disarms.
// OFF bits (D15,D14,D10,D8) clear at once, need no arm and win over a set in
// the same command. Unarmed D1/D0 execute the STE cover in non-forced mode
// (both together register nothing). Errors (timeout, invalid execute,
// illegal arm, unarmed execute, disarm when idle) set PCE. CPE and PCE are
// cleared by CLRDHSKP after the housekeeping word that carries them is sent.
// AFEPWR off clears the HV enables, shaper chain enables, ENBSWEA and returns
// ADC reset to asserted. ANORM ORs the abnormal conditions of the
// housekeeping register definition.
//
// Timing: strobes and immediate registers change in the cycle after the last
// command bit's CMDCLK cycle.
module commandif
  import ssf_pkg::*;
#(
  parameter int unsigned ARM_TIMEOUT_S = 16,
  parameter int unsigned FRAME_GAP     = 64
) (
  input  logic        clk1m,
  input  logic        rst,
  input  logic        cmddat,
  input  logic        cmdclk,
  input  logic        cycleclk,
  input  logic        gapstart,
  input  logic        tk1s,
  input  logic        tkhs,
  input  logic        afepwr,
  input  logic        ctimidle,
  input  logic        sweaclr,
  input  logic        steclr,
  input  logic        clrdhskp,
  // latched command bus and strobes
  output logic [15:0] cmd_data,
  output logic        mcpcmdlat,
  output logic        stebiascmdlat,
  output logic        tdaccmdlat,
  output logic        lutaddrlat,
  output logic        lutdatlat,
  // Controls/Enables register (E2)
  output logic [3:0]  tlmenb,      // 3 ACounter, 2 HSKPG, 1 STE-PHA, 0 RATES
  output logic        afepwron,
  output logic        afepwroff,
  output logic        enbstetp,
  output logic        enbsweatp,
  output logic [3:0]  schainenb,
  output logic        adcrst,
  output logic        enbswea,
  output logic        tplrmode,
  output logic        s100kdis,
  // other registers
  output logic        swbufsel,
  output logic        enbufsel,
  output logic        opheater,
  output logic [3:0]  swhksel,
  output logic [1:0]  mqsel,
  output logic        mtestmode,
  output logic [7:0]  tmadr,       // MemAddr[16:9] in memory test mode
  output logic [3:0]  stecovtmo,
  // protected signals
  output logic        nrhvenb,
  output logic        mcphvenb,
  output logic        sweacovon,
  output logic [1:0]  forstecovon, // forced STE cover: 1 close, 0 open
  output logic [1:0]  stecovon,    // non-forced STE cover
  output logic        armed,
  // status
  output logic        cmdpe,
  output logic        pce,
  output logic        anorm
);
  // ---------------- serial receiver ----------------
  logic [23:0] sh;
  logic [4:0]  nbits;
  logic [6:0]  gap;
  logic        frame_ok, frame_bad;
  logic [24:0] frame;

  assign frame = {sh[23:0], cmddat};

  always_ff @(posedge clk1m) begin
    if (rst) begin
      sh <= '0; nbits <= '0; gap <= '0;
    end else if (cmdclk) begin
      gap <= '0;
      sh  <= frame[23:0];
      nbits <= (nbits == 5'd24) ? 5'd0 : nbits + 5'd1;
    end else if (nbits != '0) begin
      if (32'(gap) >= FRAME_GAP - 1) begin
        nbits <= '0; gap <= '0;
      end else begin
        gap <= gap + 7'd1;
      end
    end
  end
  assign frame_ok  = cmdclk && nbits == 5'd24 &&  (^frame);
  assign frame_bad = cmdclk && nbits == 5'd24 && !(^frame);

  logic       cv;       // decoded command valid (one cycle)
  logic [7:0] cid;
  always_ff @(posedge clk1m) begin
    if (rst) begin
      cv <= 1'b0; cid <= '0; cmd_data <= '0;
    end else begin
      cv <= frame_ok;
      if (frame_ok) begin
        cid      <= frame[24:17];
        cmd_data <= frame[16:1];
      end
    end
  end

  function automatic logic is(input logic [7:0] id);
    return cv && (cid == id);
  endfunction

  assign mcpcmdlat     = is(CMD_MCPDAC);
  assign stebiascmdlat = is(CMD_STEBIAS);
  assign tdaccmdlat    = is(CMD_TDAC);
  assign lutaddrlat    = is(CMD_LUTADDR);
  assign lutdatlat     = is(CMD_LUTDATA);

  // ---------------- plain and staged registers ----------------
  logic [3:0] tlmenb_p, schainenb_p, swhksel_p;
  logic       enbstetp_p, enbsweatp_p, swbufsel_p, enbufsel_p, opheater_p, mtestmode_p;
  logic       afepwr_q;

  always_ff @(posedge clk1m) afepwr_q <= rst ? 1'b0 : afepwr;

  always_ff @(posedge clk1m) begin
    if (rst) begin
      tlmenb <= '0; tlmenb_p <= '0; afepwron <= 1'b0; afepwroff <= 1'b0;
      enbstetp <= 1'b0; enbstetp_p <= 1'b0; enbsweatp <= 1'b0; enbsweatp_p <= 1'b0;
      schainenb <= '0; schainenb_p <= '0; adcrst <= 1'b1; enbswea <= 1'b0;
      tplrmode <= 1'b0; s100kdis <= 1'b0;
      swbufsel <= 1'b0; swbufsel_p <= 1'b0; enbufsel <= 1'b0; enbufsel_p <= 1'b0;
      opheater <= 1'b0; opheater_p <= 1'b0; swhksel <= '0; swhksel_p <= '0;
      mqsel <= '0; mtestmode <= 1'b0; mtestmode_p <= 1'b0; tmadr <= '0;
      stecovtmo <= '0;
    end else begin
      if (is(CMD_CTRL)) begin
        tlmenb_p    <= cmd_data[15:12];
        afepwron    <= cmd_data[11];
        afepwroff   <= cmd_data[10];
        enbstetp_p  <= cmd_data[9];
        enbsweatp_p <= cmd_data[8];
        schainenb_p <= cmd_data[7:4];
        adcrst      <= cmd_data[3];
        enbswea     <= cmd_data[2];
        tplrmode    <= cmd_data[1];
        s100kdis    <= cmd_data[0];
      end
      if (is(CMD_BUFSEL))  begin swbufsel_p <= cmd_data[1]; enbufsel_p <= cmd_data[0]; end
      if (is(CMD_HEATER))  opheater_p  <= cmd_data[0];
      if (is(CMD_SWHKSEL)) swhksel_p   <= cmd_data[3:0];
      if (is(CMD_MEMQUAD)) mqsel       <= cmd_data[1:0];
      if (is(CMD_MEMTEST)) begin mtestmode_p <= cmd_data[8]; tmadr <= cmd_data[7:0]; end
      if (is(CMD_COVTMO))  stecovtmo   <= cmd_data[3:0];

      if (cycleclk) begin
        tlmenb    <= tlmenb_p;
        enbstetp  <= enbstetp_p;
        enbsweatp <= enbsweatp_p;
        schainenb <= schainenb_p;
        enbufsel  <= enbufsel_p;
        swhksel   <= swhksel_p;
        mtestmode <= mtestmode_p;
      end
      if (gapstart) begin
        swbufsel <= swbufsel_p;
        opheater <= opheater_p;
      end
      // analog power lost: enables drop and stay dropped until commanded
      if (!afepwr && afepwr_q) begin
        schainenb <= '0; schainenb_p <= '0;
        enbswea   <= 1'b0;
        adcrst    <= 1'b1;
      end
    end
  end

  // ---------------- protected commands ----------------
  // one-hot index order of arm/on bits: {D7 NR, D6 MCP, D2 SWEA cover, D1 close, D0 open}
  logic [4:0] arm_sel, pend, onv, armv;
  logic [4:0] arm_tmr;
  logic       err;
  logic       clr_nr, clr_mcp, clr_swc, clr_ste;
  logic       pend_forced;  // queued STE cover set came through an arm

  assign onv     = {cmd_data[7], cmd_data[6], cmd_data[2], cmd_data[1], cmd_data[0]};
  assign armv    = onv;
  assign clr_nr  = is(CMD_PEXEC) && cmd_data[15];
  assign clr_mcp = is(CMD_PEXEC) && cmd_data[14];
  assign clr_swc = is(CMD_PEXEC) && cmd_data[10];
  assign clr_ste = is(CMD_PEXEC) && cmd_data[8];

  always_ff @(posedge clk1m) begin
    if (rst) begin
      armed <= 1'b0; arm_sel <= '0; arm_tmr <= '0; pend <= '0; err <= 1'b0;
      pend_forced <= 1'b0;
      nrhvenb <= 1'b0; mcphvenb <= 1'b0; sweacovon <= 1'b0;
      forstecovon <= '0; stecovon <= '0;
    end else begin
      err <= 1'b0;
      // arm timeout
      if (armed && tk1s) begin
        if (32'(arm_tmr) >= ARM_TIMEOUT_S - 1) begin
          armed <= 1'b0; arm_sel <= '0; err <= 1'b1;
        end else begin
          arm_tmr <= arm_tmr + 5'd1;
        end
      end
      if (is(CMD_ARM)) begin
        if (armed) begin
          if (armv == '0) begin armed <= 1'b0; arm_sel <= '0; end
        end else if (armv != '0 && (armv & (armv - 1'b1)) == '0) begin   // exactly one bit
          armed <= 1'b1; arm_sel <= armv; arm_tmr <= '0;
        end else begin
          err <= 1'b1;                       // illegal arm or disarm when idle
        end
      end
      if (is(CMD_PEXEC) && onv != '0) begin
        if (armed) begin
          armed <= 1'b0; arm_sel <= '0;
          if (onv == arm_sel) begin
            // covers are accepted only while the cover subsystem is idle
            if (!(onv[2:0] != '0 && !ctimidle)) begin
              pend <= pend | onv;
              if (onv[1:0] != '0) pend_forced <= 1'b1;
            end
          end else begin
            err <= 1'b1;
          end
        end else begin
          if (onv[4:2] != '0) err <= 1'b1;     // unarmed execute
          if (onv[1:0] == 2'b01 || onv[1:0] == 2'b10)
            if (ctimidle) pend <= pend | {3'b000, onv[1:0]};
        end
      end
      // setting synchronised to the half-second tick
      if (tkhs && pend != '0) begin
        pend <= '0;
        pend_forced <= 1'b0;
        if (pend[4]) nrhvenb   <= 1'b1;
        if (pend[3]) mcphvenb  <= 1'b1;
        if (pend[2]) sweacovon <= 1'b1;
        if (pend_forced) forstecovon <= pend[1:0];
        else if (pend[1:0] != '0) stecovon <= pend[1:0];
      end
      // clears: immediate and dominant
      if (clr_nr  || !afepwr) begin nrhvenb  <= 1'b0; pend[4] <= 1'b0; end
      if (clr_mcp || !afepwr) begin mcphvenb <= 1'b0; pend[3] <= 1'b0; end
      if (clr_swc || sweaclr) begin sweacovon <= 1'b0; pend[2] <= 1'b0; end
      if (clr_ste || steclr) begin
        forstecovon <= '0; stecovon <= '0; pend[1:0] <= '0; pend_forced <= 1'b0;
      end
    end
  end

  // ---------------- error flags ----------------
  always_ff @(posedge clk1m) begin
    if (rst) begin
      cmdpe <= 1'b0; pce <= 1'b0;
    end else begin
      if (frame_bad) cmdpe <= 1'b1; else if (clrdhskp) cmdpe <= 1'b0;
      if (err)       pce   <= 1'b1; else if (clrdhskp) pce   <= 1'b0;
    end
  end

  assign anorm = afepwron | afepwroff | armed |
                 (tlmenb[2:0] != 3'b111) | (tlmenb[3] != enbswea) |
                 (schainenb != 4'hF);

endmodule
