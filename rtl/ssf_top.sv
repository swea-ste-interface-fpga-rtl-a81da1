// ssf_top: the SWEA/STE Interface FPGA (SSF). One design serves the
// SWEA/STE-D and the STE-U instruments; subsystems not needed are disabled by
// command.
//
// The chip runs entirely from the 1 MHz spacecraft clock. timcntl cuts each
// 2 s cycle (started by the spacecraft 1 s tick) into 1.45 ms steps, 5.8 ms
// sample intervals and a 51.2 ms GAP. commandif receives the serial
// commands and holds all control registers. Three AD5544 quad serial DACs
// are driven: the sweep DACs by dacsweep from a table in SRAM, the MCP / STE
// bias / STE pulser DACs through mpdacwr (fed by mcpdac and stetestpulse),
// and the threshold DACs by tdacwr. acounters and mrcounters count anode
// and shaper-chain pulses; evproc accepts STE events, reads the ADCs and
// histograms them in SRAM; hskpr scans the housekeeping ADC; memcntl
// arbitrates the 512K x 8 SRAM; tlmmngr builds and sends telemetry.
// latchupprot controls the analog supply (AFEPWR) and covercntl the covers.
//
// Pins that the design floats while AFEPWR is off are brought out as values
// plus the enable afe_oe (= AFEPWR); the 100 kHz synchs have syn_oe.
// HWRSTL is the active-low external reset, synchronised here to CLK1M.
module ssf_top
  import ssf_pkg::*;
(
  input  logic        clk1m,
  input  logic        hwrstl,
  // spacecraft timing and commands
  input  logic        tk1s,
  input  logic        secs0,
  input  logic        cmddat,
  input  logic        cmdclk,
  // analog front end power
  input  logic        afeshdn,
  output logic        afepwr,
  output logic        afe_oe,
  // SWEA anodes and test pulsers
  input  logic [15:0] apulse,
  output logic        atestpulse_o,
  output logic        stetestpulse_n,
  // STE shaper chains and ADCs
  input  logic [3:0]  lld,
  input  logic [3:0]  uld,
  input  logic [3:0]  peak,
  input  logic [3:0]  pulserst,
  input  logic [3:0]  adcbusy,
  input  logic [11:0] adcdat,
  output logic [3:0]  adcsoc,
  output logic [3:0]  adcread,
  output logic        adcrst,
  output logic [3:0]  schainenb,
  // housekeeping ADC and mux
  input  logic        hadcbusy,
  output logic        hadcsoc,
  output logic        hadcread,
  output logic [2:0]  amuxsel,
  output logic [1:0]  amuxenb,
  // DACs
  output dac_ser_t    swdac,
  output logic        swdacld,
  output logic        swdacclr,
  output dac_ser_t    mpdac,
  output logic        mpdacld,
  output logic        mpdacclr,
  output dac_ser_t    tdac,
  output logic        tdacld,
  output logic        tdacclr,
  // supplies, covers, heater
  output logic        syn100k,
  output logic        syn100kn,
  output logic        syn_oe,
  output logic        nrhvenb,
  output logic        mcphvenb,
  output logic        sweacovsw,
  input  logic        sweacovstat,
  output logic [1:0]  stecovsw,
  input  logic [1:0]  stecovstat,
  output logic        opheater,
  // SRAM
  output logic [18:0] memadr,
  output logic [7:0]  memdout,
  input  logic [7:0]  memdin,
  output logic        memcs_n,
  output logic        memoe_n,
  output logic        memwr_n,
  // telemetry
  output logic        tdat,
  output logic        tframe
);
  // reset synchroniser
  logic [1:0] rsync;
  logic       rst;
  always_ff @(posedge clk1m or negedge hwrstl) begin
    if (!hwrstl) rsync <= 2'b11;
    else         rsync <= {rsync[0], 1'b0};
  end
  assign rst = rsync[1];

  // timing
  logic        cycleclk, stepclk, gapstart, ingap, sampleclk, samclkint;
  logic        tk8hz, tkhs, testcycleclk, hskpmd;
  logic [10:0] lowcnt, stepidx;
  logic [8:0]  samplecnt;

  // command interface
  logic [15:0] cmd_data;
  logic        mcpcmdlat, stebiascmdlat, tdaccmdlat, lutaddrlat, lutdatlat;
  logic [3:0]  tlmenb, swhksel, stecovtmo;
  logic        afepwron, afepwroff, enbstetp, enbsweatp, enbswea, tplrmode, s100kdis;
  logic        swbufsel, enbufsel, mtestmode, armed, cmdpe, pce, anorm;
  logic [1:0]  mqsel, forstecovon, stecovon;
  logic [7:0]  tmadr;
  logic        sweacovon, ctimidle, sweaclr, steclr, clrdhskp;

  timcntl u_timcntl (
    .clk1m, .rst, .tk1s, .secs0, .enbswea, .afepwr, .s100kdis,
    .cycleclk, .stepclk, .gapstart, .ingap, .lowcnt, .stepidx, .sampleclk,
    .samplecnt, .samclkint, .tk8hz, .tkhs, .testcycleclk, .hskpmd,
    .syn100k, .syn100kn, .syn_oe
  );

  commandif u_commandif (
    .clk1m, .rst, .cmddat, .cmdclk, .cycleclk, .gapstart, .tk1s, .tkhs, .afepwr,
    .ctimidle, .sweaclr, .steclr, .clrdhskp,
    .cmd_data, .mcpcmdlat, .stebiascmdlat, .tdaccmdlat, .lutaddrlat, .lutdatlat,
    .tlmenb, .afepwron, .afepwroff, .enbstetp, .enbsweatp, .schainenb, .adcrst,
    .enbswea, .tplrmode, .s100kdis, .swbufsel, .enbufsel, .opheater, .swhksel,
    .mqsel, .mtestmode, .tmadr, .stecovtmo, .nrhvenb, .mcphvenb, .sweacovon,
    .forstecovon, .stecovon, .armed, .cmdpe, .pce, .anorm
  );

  latchupprot u_latchupprot (.clk1m, .rst, .afeshdn, .afepwron, .afepwroff, .afepwr);
  assign afe_oe = afepwr;

  covercntl u_covercntl (
    .clk1m, .rst, .tk8hz, .sweacovon, .stecovon, .forstecovon, .stecovstat,
    .stecovtmo, .sweacovsw, .stecovsw, .sweaclr, .steclr, .ctimidle
  );

  // memory
  mem_req_t   tlm_rq, swp_rq, evp_rq;
  logic       tlm_done, swp_done, evp_done, ab_swap, arbufsel, lutwr_busy;
  logic [7:0] mem_rdata;

  memcntl u_memcntl (
    .clk1m, .rst, .cmd_data, .lutaddrlat, .lutdatlat, .swbufsel, .enbufsel,
    .mqsel, .mtestmode, .tmadr, .ab_swap, .arbufsel,
    .tlm_rq, .tlm_done, .swp_rq, .swp_done, .evp_rq, .evp_done,
    .rdata(mem_rdata), .lutwr_busy,
    .memadr, .memdout, .memdin, .memcs_n, .memoe_n, .memwr_n
  );

  // sweep DACs
  logic sdcidle;
  dacsweep u_dacsweep (
    .clk1m, .rst, .enbswea, .afepwr, .stepclk, .stepidx,
    .mem_rq(swp_rq), .mem_done(swp_done), .mem_rdata,
    .swdac, .swdacld, .swdacclr, .sdcidle
  );

  // MCP / STE bias / STE pulser DAC
  logic        mcpdacrq, mwrdn, pwrdn, pdacrq, pdacld, dacwron, ramping;
  logic [15:0] mcpdat, pdat;
  logic [1:0]  dacsel;

  mcpdac u_mcpdac (
    .clk1m, .rst, .afepwr, .cmd_data, .mcpcmdlat, .stebiascmdlat, .mwrdn,
    .mcpdacrq, .mcpdat, .dacsel
  );
  stetestpulse u_stetestpulse (
    .clk1m, .rst, .afepwr, .enbstetp, .tplrmode, .testcycleclk, .lowcnt, .pwrdn,
    .pdacrq, .pdat, .pdacld, .testpulse_n(stetestpulse_n), .dacwron, .ramping
  );
  mpdacwr u_mpdacwr (
    .clk1m, .rst, .afepwr, .pdacrq, .pdat, .pdacld, .dacwron, .mcpdacrq, .mcpdat,
    .dacsel, .pwrdn, .mwrdn, .mpdac, .mpdacld, .mpdacclr
  );

  tdacwr u_tdacwr (
    .clk1m, .rst, .afepwr, .cycleclk, .cmd_data, .tdaccmdlat, .tdac, .tdacld, .tdacclr
  );

  atestpulse u_atestpulse (
    .clk1m, .rst, .afepwr, .enbswea, .enbsweatp, .samplecnt, .testpulse(atestpulse_o)
  );

  // counters
  logic [15:0][13:0] latcnt;
  logic              acnt_latched, rate_latched;
  logic [3:0][8:0]   lldlat;
  logic [3:0][3:0]   uldlat;
  logic [3:0][2:0]   prlat;
  logic              allprstl;
  logic [3:0]        iprstcnt;

  acounters u_acounters (
    .clk1m, .rst, .enbswea, .afepwr, .sampleclk, .apulse, .latcnt, .latched(acnt_latched)
  );
  mrcounters u_mrcounters (
    .clk1m, .rst, .afepwr, .samclkint, .lld, .uld, .pulserst, .allprstl, .iprstcnt,
    .lldlat, .uldlat, .prlat, .latched(rate_latched)
  );

  // events and housekeeping
  logic        hskprq, hkpgdn, evdone;
  logic [3:0]  evdrop;
  logic [15:0] ahkpg, dhkpg;

  evproc u_evproc (
    .clk1m, .rst, .afepwr, .adcrst, .schainenb, .lld, .peak, .pulserst, .adcbusy,
    .adcsoc, .adcread, .adcdat, .hskprq, .hadcread, .allprstl, .iprstcnt,
    .mem_rq(evp_rq), .mem_done(evp_done), .mem_rdata, .evdone, .evdrop
  );
  hskpr u_hskpr (
    .clk1m, .rst, .afepwr, .adcrst, .cycleclk, .sampleclk, .tk8hz, .hskpmd, .swhksel,
    .hadcbusy, .hadcrd(hadcread), .adcdat, .hadcsoc, .hskprq, .amuxsel, .amuxenb,
    .ahkpg, .hkpgdn
  );

  // digital housekeeping register
  assign dhkpg = {pce, enbswea, enbsweatp, enbstetp, hskpmd, nrhvenb, mcphvenb, anorm,
                  stecovsw, stecovstat, sweacovstat, afeshdn, afepwr, cmdpe};

  logic [5:0] cur_id;
  tlmmngr u_tlmmngr (
    .clk1m, .rst, .afepwr, .enbswea, .tlmenb, .hskpmd, .mtestmode, .cycleclk,
    .testcycleclk, .stepclk, .samclkint, .samplecnt, .acnt_latched, .latcnt,
    .rate_latched, .lldlat, .uldlat, .prlat, .hkpgdn, .ahkpg, .dhkpg,
    .mem_rq(tlm_rq), .mem_done(tlm_done), .mem_rdata, .ab_swap, .clrdhskp,
    .tdat, .tframe, .cur_id
  );

endmodule
