// tlmmngr: telemetry manager. Builds the SSF telemetry messages and sends
// them on the serial line TDAT.
//
// Messages (header word = {ID[5:0], LENGTH-2}, LENGTH counts the header):
//   30/31 anode counters, 18/19 words: 16 latched anode counts, SAMPLECNT,
//         and for 31 (sweep housekeeping mode) the latest {channel, ADC}.
//         One per SAMPLECLK (336 per cycle) while SWEA and its enable are on.
//   34/35 rates, 13 words: LLD[0..3], ULD[0..3], PULSERESET[0..3] counts;
//         one per SAMCLKINT, ID 35 for the interval ending at CYCLECLK.
//   36    housekeeping, 3 words: {channel, ADC value}, digital housekeeping
//         register; one per HKPGDN (8 per second). CLRDHSKP pulses after it
//         is sent so that the one-shot error bits can be cleared.
//   32/33/3A/3B energy bins, 257 words: the 256 16-bit accumulators of the
//         readable accumulator buffer, once per CYCLECLK; ID bit 0 marks a
//         TESTCYCLECLK, bit 3 memory test mode. Each counter costs two SRAM
//         byte reads, prefetched one word ahead. After the message the buffer
//         is cleared (512 byte writes, one per STEPCLK) and the accumulator
//         buffers are swapped (AB_SWAP); neither happens in test mode.
// Each type needs its telemetry enable; only housekeeping is sent while the
// analog power is off, and anode messages also need SWEA enabled.
// Line format: TDAT is low when idle; a message is a '1' start bit followed
// by all its words, MSB first, one bit per CLK1M (16 us per word); TFRAME is
// high for the whole message. When several messages wait, anode goes first,
// then rates, housekeeping, energy; an energy message starts only within
// the first 1000 us after a SAMCLKINT so the next anode latch is never
// overtaken. Message contents, IDs, lengths and rates follow the
// description; the line format and the scheduling are this design's.
module tlmmngr
  import ssf_pkg::*;
(
  input  logic              clk1m,
  input  logic              rst,
  input  logic              afepwr,
  input  logic              enbswea,
  input  logic [3:0]        tlmenb,
  input  logic              hskpmd,
  input  logic              mtestmode,
  input  logic              cycleclk,
  input  logic              testcycleclk,
  input  logic              stepclk,
  input  logic              samclkint,
  input  logic [8:0]        samplecnt,
  input  logic              acnt_latched,
  input  logic [15:0][13:0] latcnt,
  input  logic              rate_latched,
  input  logic [3:0][8:0]   lldlat,
  input  logic [3:0][3:0]   uldlat,
  input  logic [3:0][2:0]   prlat,
  input  logic              hkpgdn,
  input  logic [15:0]       ahkpg,
  input  logic [15:0]       dhkpg,
  output mem_req_t          mem_rq,
  input  logic              mem_done,
  input  logic [7:0]        mem_rdata,
  output logic              ab_swap,
  output logic              clrdhskp,
  output logic              tdat,
  output logic              tframe,
  output logic [5:0]        cur_id     // ID of the message being sent
);
  typedef enum logic [1:0] {M_ANODE, M_RATES, M_HSKP, M_ENERGY} msg_e;
  typedef enum logic [1:0] {S_IDLE, S_START, S_BITS} ser_e;
  typedef enum logic [1:0] {F_IDLE, F_LO, F_HI} fetch_e;

  logic       p_anode, p_rates, p_hk, p_energy;
  logic       a_hk;             // anode message carries housekeeping (ID 31)
  logic [8:0] a_scnt;
  logic       r_first, cyc_seen;
  logic [15:0] h_a, h_d;
  logic [5:0] e_id;
  logic [12:0] phase;

  ser_e       ss;
  msg_e       mt;
  logic [8:0] wi, len;
  logic [3:0] bi;
  logic [15:0] sh;

  fetch_e     fs;
  logic [8:0] eidx;
  logic [7:0] elo;
  logic [15:0] ebuf;
  logic       ebuf_v;

  logic       clearing;
  logic [9:0] cidx;
  logic       clr_rq;

  logic       en_anode, en_rates, en_hk, en_energy;
  assign en_anode  = tlmenb[3] & enbswea & afepwr;
  assign en_rates  = tlmenb[0] & afepwr;
  assign en_hk     = tlmenb[2];
  assign en_energy = tlmenb[1] & afepwr;

  // ---------------- message requests ----------------
  logic start_msg, end_msg;
  msg_e next_mt;
  logic can_start;

  always_ff @(posedge clk1m) begin
    if (rst) begin
      p_anode <= 1'b0; p_rates <= 1'b0; p_hk <= 1'b0; p_energy <= 1'b0;
      a_hk <= 1'b0; a_scnt <= '0; r_first <= 1'b0; cyc_seen <= 1'b0;
      h_a <= '0; h_d <= '0; e_id <= MSG_ENERGY; phase <= '0;
    end else begin
      phase <= samclkint ? 13'd0 : (phase == '1 ? phase : phase + 13'd1);
      if (cycleclk) cyc_seen <= 1'b1;
      if (acnt_latched && en_anode) begin
        p_anode <= 1'b1; a_hk <= hskpmd; a_scnt <= samplecnt;
      end
      if (rate_latched && en_rates) begin
        p_rates <= 1'b1; r_first <= cyc_seen; cyc_seen <= cycleclk;
      end else if (rate_latched) cyc_seen <= cycleclk;
      if (hkpgdn && en_hk) begin
        p_hk <= 1'b1; h_a <= ahkpg; h_d <= dhkpg;
      end
      if (cycleclk && en_energy && !clearing && !p_energy &&
          !(ss != S_IDLE && mt == M_ENERGY)) begin
        p_energy <= 1'b1;
        e_id <= MSG_ENERGY | {5'b0, testcycleclk};
      end
      // the test-mode bit is taken when the readout starts, after the staged
      // mode change at CYCLECLK, so it always matches the data being read
      if (start_msg && next_mt == M_ENERGY) e_id[3] <= mtestmode;
      if (start_msg) begin
        unique case (next_mt)
          M_ANODE:  p_anode  <= 1'b0;
          M_RATES:  p_rates  <= 1'b0;
          M_HSKP:   p_hk     <= 1'b0;
          M_ENERGY: p_energy <= 1'b0;
        endcase
      end
    end
  end

  always_comb begin
    can_start = 1'b1;
    next_mt   = M_ANODE;
    if (p_anode)      next_mt = M_ANODE;
    else if (p_rates) next_mt = M_RATES;
    else if (p_hk)    next_mt = M_HSKP;
    else if (p_energy && phase < 13'd1000) next_mt = M_ENERGY;
    else can_start = 1'b0;
  end
  assign start_msg = (ss == S_IDLE) && can_start;

  // ---------------- word contents ----------------
  function automatic logic [15:0] word_of(input msg_e t, input logic [8:0] w);
    logic [15:0] v;
    v = '0;
    unique case (t)
      M_ANODE: begin
        if (w == 0)       v = tlm_header(a_hk ? MSG_ANODE_HK : MSG_ANODE, a_hk ? 19 : 18);
        else if (w <= 16) v = {2'b00, latcnt[4'(w - 9'd1)]};
        else if (w == 17) v = {7'b0, a_scnt};
        else              v = ahkpg;
      end
      M_RATES: begin
        if (w == 0)      v = tlm_header(r_first ? MSG_RATES1 : MSG_RATES, 13);
        else if (w <= 4) v = {7'b0, lldlat[2'(w - 9'd1)]};
        else if (w <= 8) v = {12'b0, uldlat[2'(w - 9'd5)]};
        else             v = {13'b0, prlat[2'(w - 9'd9)]};
      end
      M_HSKP: begin
        if (w == 0)      v = tlm_header(MSG_HSKP, 3);
        else if (w == 1) v = h_a;
        else             v = h_d;
      end
      M_ENERGY: begin
        if (w == 0) v = tlm_header(e_id, 257);
        else        v = ebuf;
      end
    endcase
    return v;
  endfunction

  function automatic logic [8:0] len_of(input msg_e t);
    unique case (t)
      M_ANODE:  return a_hk ? 9'd19 : 9'd18;
      M_RATES:  return 9'd13;
      M_HSKP:   return 9'd3;
      default:  return 9'd257;
    endcase
  endfunction

  // ---------------- serializer ----------------
  logic load_next;
  assign load_next = (ss == S_BITS) && (bi == 4'd0) && (wi != len - 9'd1);
  assign end_msg   = (ss == S_BITS) && (bi == 4'd0) && (wi == len - 9'd1);

  always_ff @(posedge clk1m) begin
    if (rst) begin
      ss <= S_IDLE; mt <= M_ANODE; wi <= '0; len <= '0; bi <= '0; sh <= '0;
      clrdhskp <= 1'b0;
    end else begin
      clrdhskp <= 1'b0;
      unique case (ss)
        S_IDLE: if (start_msg) begin
          mt <= next_mt; len <= len_of(next_mt); ss <= S_START;
        end
        S_START: begin
          sh <= word_of(mt, 9'd0); wi <= '0; bi <= 4'd15; ss <= S_BITS;
        end
        S_BITS: begin
          if (bi != 4'd0) begin
            sh <= {sh[14:0], 1'b0};
            bi <= bi - 4'd1;
          end else if (load_next) begin
            sh <= word_of(mt, wi + 9'd1);
            wi <= wi + 9'd1;
            bi <= 4'd15;
          end else begin
            ss <= S_IDLE;
            if (mt == M_HSKP) clrdhskp <= 1'b1;
          end
        end
        default: ss <= S_IDLE;
      endcase
    end
  end

  assign tframe = (ss != S_IDLE);
  assign tdat   = (ss == S_START) ? 1'b1 : (ss == S_BITS) ? sh[15] : 1'b0;
  assign cur_id = (ss == S_IDLE) ? 6'd0 : word_of(mt, 9'd0)[15:10];

  // ---------------- energy counter prefetch and accumulator clear ----------------
  logic e_active;
  assign e_active = (ss != S_IDLE) && mt == M_ENERGY;

  always_ff @(posedge clk1m) begin
    if (rst) begin
      fs <= F_IDLE; eidx <= '0; elo <= '0; ebuf <= '0; ebuf_v <= 1'b0;
      clearing <= 1'b0; cidx <= '0; clr_rq <= 1'b0; ab_swap <= 1'b0;
    end else begin
      ab_swap <= 1'b0;
      if (load_next && mt == M_ENERGY) ebuf_v <= 1'b0;
      if (ss == S_IDLE && start_msg && next_mt == M_ENERGY) begin
        eidx <= '0; ebuf_v <= 1'b0; fs <= F_IDLE;
      end else begin
        unique case (fs)
          F_IDLE: if (e_active && !ebuf_v && !(load_next) && eidx < 9'd256) fs <= F_LO;
          F_LO:   if (mem_done) begin elo <= mem_rdata; fs <= F_HI; end
          F_HI:   if (mem_done) begin
            ebuf <= {mem_rdata, elo}; ebuf_v <= 1'b1; eidx <= eidx + 9'd1; fs <= F_IDLE;
          end
          default: fs <= F_IDLE;
        endcase
      end
      // block clear of the buffer just read, one byte per STEPCLK
      if (end_msg && mt == M_ENERGY && !mtestmode) begin
        clearing <= 1'b1; cidx <= '0;
      end
      if (clearing) begin
        if (stepclk) clr_rq <= 1'b1;
        if (clr_rq && mem_done) begin
          clr_rq <= 1'b0;
          if (cidx == 10'd511) begin
            clearing <= 1'b0; ab_swap <= 1'b1;
          end else cidx <= cidx + 10'd1;
        end
      end
    end
  end

  always_comb begin
    mem_rq = '0;
    if (fs == F_LO || fs == F_HI) begin
      mem_rq.req  = 1'b1;
      mem_rq.addr = {10'b0, eidx[7:0], fs == F_HI};
    end else if (clr_rq) begin
      mem_rq.req  = 1'b1;
      mem_rq.we   = 1'b1;
      mem_rq.addr = {10'b0, cidx[8:0]};
    end
  end

  a_word_ready: assert property (@(posedge clk1m) disable iff (rst)
    (load_next && mt == M_ENERGY) |-> ebuf_v);

endmodule
