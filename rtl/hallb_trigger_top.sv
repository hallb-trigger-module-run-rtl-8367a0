// hallb_trigger_top: the Hall B (CLAS) trigger module.
// Detector signals of the six sectors (start counter ST[1:24], TOF, EC inner
// and total for photons and electrons, Cherenkov CC) and the MORA/MORB
// inputs are delayed, combined per sector into STOF, ECP and ECC, and fed to
// twelve programmable trigger bits whose LUTs can be reloaded at any time.
// Each trigger bit can also require the MOR condition and an ST multiplicity
// window, is stretched and prescaled, and leaves the board inverted on
// trigger_n[11:0] (TRIGGER[1:12]; low = trigger, high = idle or disabled).
// Level-2 latch bits L2LATCHBITS[0:9] are formed from the triggers and the
// sector outputs. A scope records 103 deskewed internal signals around a
// pattern trigger, and every stage has a scaler. All of it is configured and
// read through the register bus that the board's VME bridge drives.
// Timing: one 200 MHz clock. With all delays at zero an input pin reaches
// trigger_n 10 cycles (50 ns) later; trigger_n to l2latch_bits is 7 cycles
// (35 ns) with the minimum level-2 delay. The structure and register map
// follow the board description; pipeline depths, the bus protocol, the
// ST-to-sector wiring (ST 4s+1..4s+4 in sector s+1) and the scope signal
// order are this design's choices.
module hallb_trigger_top
  import trig_pkg::*;
#(
  parameter logic [31:0] REVISION = 32'h0001_0310
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [N_ST-1:0]      st,       // bit i = ST[i+1]
  input  logic [N_SECTORS-1:0] tof,      // bit s = sector s+1
  input  logic [N_SECTORS-1:0] ecinp,
  input  logic [N_SECTORS-1:0] ectotp,
  input  logic [N_SECTORS-1:0] ecine,
  input  logic [N_SECTORS-1:0] ectote,
  input  logic [N_SECTORS-1:0] cc,
  input  logic                 mora,
  input  logic                 morb,
  output logic [N_TRIG-1:0]    trigger_n,    // bit t = TRIGGER[t+1], inverted
  output logic [9:0]           l2latch_bits,
  // register bus from the VME bridge
  input  logic                 bus_we,
  input  logic                 bus_re,
  input  logic [15:0]          bus_addr,
  input  logic [31:0]          bus_wdata,
  output logic [31:0]          bus_rdata,
  output logic                 bus_rvalid,
  input  logic [31:0]          board_ids
);
  // The scope pattern registers are 4 x 32 bits; bits 127:103 have no
  // signal behind them and are not used.
  localparam int SCOPE_W = 103;

  sector_cfg_t sector_cfg [N_SECTORS];
  trig_cfg_t   trig_cfg   [N_TRIG];
  common_cfg_t common_cfg;
  l2_cfg_t     l2_cfg;
  logic        scaler_en;
  logic [N_TRIG-1:0] ecc_lut_we, ecp_lut_we;
  logic        l2_lut_we;
  logic [8:0]  lut_waddr;
  logic [31:0] lut_wdata;
  logic [31:0] scaler [N_SCALER_WORDS];
  logic [127:0] scope_value, scope_ignore;
  logic        scope_arm, scope_rd;
  logic [31:0] scope_rdata, scope_status;

  logic [N_SECTORS-1:0] stof, ecp, ecc;
  logic [N_ST-1:0]      st_dly;
  logic [5:0]           in_dly [N_SECTORS];
  logic                 mora_d, morb_d;
  logic [31:0]          in_count [N_SECTORS][10];
  logic [31:0]          sts_count [N_SECTORS], ecp_count [N_SECTORS], ece_count [N_SECTORS];
  logic [15:0]          stof_count [N_SECTORS], ecc_count [N_SECTORS];

  trig_regs #(.REVISION(REVISION)) u_regs (
    .clk, .rst, .bus_we, .bus_re, .bus_addr, .bus_wdata, .bus_rdata, .bus_rvalid,
    .board_ids, .sector_cfg, .trig_cfg, .common_cfg, .l2_cfg, .scaler_en,
    .ecc_lut_we, .ecp_lut_we, .l2_lut_we, .lut_waddr, .lut_wdata, .scaler,
    .scope_value, .scope_ignore, .scope_arm, .scope_rd, .scope_rdata, .scope_status);

  // ---------------- sectors ----------------
  for (genvar s = 0; s < N_SECTORS; s++) begin : g_sec
    sector_logic u_sec (
      .clk, .rst, .cfg(sector_cfg[s]), .scaler_en,
      .st(st[4*s +: 4]), .tof(tof[s]), .ecinp(ecinp[s]), .ectotp(ectotp[s]),
      .ecine(ecine[s]), .ectote(ectote[s]), .cc(cc[s]),
      .stof(stof[s]), .ecp(ecp[s]), .ecc(ecc[s]), .st_dly(st_dly[4*s +: 4]), .in_dly(in_dly[s]),
      .in_count(in_count[s]), .sts_count(sts_count[s]), .ecp_count(ecp_count[s]),
      .ece_count(ece_count[s]), .stof_count(stof_count[s]), .ecc_count(ecc_count[s]));
  end

  // ---------------- common logic ----------------
  logic mora_al, morb_al, stmult_al;
  logic [31:0] mora_count, morb_count, morab_count, stmult_count;

  common_logic u_common (
    .clk, .rst, .cfg(common_cfg), .scaler_en, .mora, .morb, .st_dly, .mora_dly(mora_d), .morb_dly(morb_d),
    .mora_al, .morb_al, .stmult_al, .mora_count, .morb_count, .morab_count, .stmult_count);

  // ---------------- trigger bits ----------------
  logic [N_TRIG-1:0] trig;
  logic [15:0] lut_count [N_TRIG], lutmor_count [N_TRIG];
  logic [15:0] persist_count [N_TRIG], prescale_count [N_TRIG];

  for (genvar t = 0; t < N_TRIG; t++) begin : g_trig
    trig_bit u_trig (
      .clk, .rst, .cfg(trig_cfg[t]), .scaler_en, .stof, .ecp, .ecc,
      .mora_al, .morb_al, .stmult_al,
      .ecp_we(ecp_lut_we[t]), .ecc_we(ecc_lut_we[t]),
      .lut_waddr(lut_waddr[6:0]), .lut_wdata,
      .trig(trig[t]), .lut_count(lut_count[t]), .lutmor_count(lutmor_count[t]),
      .persist_count(persist_count[t]), .prescale_count(prescale_count[t]));
  end

  // output register; the trigger lines are inverted for the Trigger Supervisor
  always_ff @(posedge clk) begin
    if (rst) trigger_n <= '1;
    else     trigger_n <= ~trig;
  end

  // ---------------- level-2 latch bits ----------------
  l2_latch u_l2 (
    .clk, .rst, .cfg(l2_cfg), .trig, .stof, .ecp, .ecc,
    .lut_we(l2_lut_we), .lut_waddr, .lut_wdata, .l2bits(l2latch_bits));

  // ---------------- scalers into the register map ----------------
  always_comb begin
    for (int i = 0; i < N_SCALER_WORDS; i++) scaler[i] = '0;
    scaler[IDX_MORA] = mora_count;
    scaler[IDX_MORB] = morb_count;
    for (int s = 0; s < N_SECTORS; s++) begin
      for (int k = 0; k < 4; k++) scaler[IDX_ST + 4 * s + k] = in_count[s][k];
      scaler[IDX_TOF + s]    = in_count[s][4];
      scaler[IDX_ECINP + s]  = in_count[s][5];
      scaler[IDX_ECTOTP + s] = in_count[s][6];
      scaler[IDX_ECINE + s]  = in_count[s][7];
      scaler[IDX_ECTOTE + s] = in_count[s][8];
      scaler[IDX_CC + s]     = in_count[s][9];
      scaler[SIDX_STS + s]   = sts_count[s];
      scaler[SIDX_STOF + s]  = 32'(stof_count[s]);
      scaler[SIDX_ECP + s]   = ecp_count[s];
      scaler[SIDX_ECE + s]   = ece_count[s];
      scaler[SIDX_ECC + s]   = 32'(ecc_count[s]);
    end
    for (int t = 0; t < N_TRIG; t++) begin
      scaler[SIDX_LUT + t]      = 32'(lut_count[t]);
      scaler[SIDX_LUTMOR + t]   = 32'(lutmor_count[t]);
      scaler[SIDX_PERSIST + t]  = 32'(persist_count[t]);
      scaler[SIDX_PRESCALE + t] = 32'(prescale_count[t]);
    end
    scaler[SIDX_MORAB]  = morab_count;
    scaler[SIDX_STMULT] = stmult_count;
  end

  // ---------------- scope with deskew ----------------
  // Every signal is delayed to the clock column of the trigger decision it
  // feeds: delay-line outputs by 8 cycles, sector outputs by 6, ST_MULT by 3.
  // The level-2 bits come after the triggers and are recorded as they leave.
  logic [N_ST-1:0] st_sc;
  logic [6*N_SECTORS-1:0] sec_in_d, sec_in_sc;
  always_comb
    for (int s = 0; s < N_SECTORS; s++)
      for (int k = 0; k < 6; k++) sec_in_d[k*N_SECTORS + s] = in_dly[s][k];
  logic [1:0]  mor_sc;
  logic [3*N_SECTORS-1:0] sec_out_sc;
  logic        stmult_sc;
  logic [SCOPE_W-1:0] scope_sig;

  localparam int LAT_TRIG = LAT_SECTOR + LAT_LUT + 4;  // delay out -> trig

  fixed_delay #(.DW(N_ST), .N(LAT_TRIG)) u_sk_st (.clk, .din(st_dly), .dout(st_sc));
  fixed_delay #(.DW(6*N_SECTORS), .N(LAT_TRIG)) u_sk_in (.clk, .din(sec_in_d), .dout(sec_in_sc));
  fixed_delay #(.DW(2), .N(LAT_TRIG)) u_sk_mor (.clk, .din({morb_d, mora_d}), .dout(mor_sc));
  fixed_delay #(.DW(3*N_SECTORS), .N(LAT_TRIG - LAT_SECTOR)) u_sk_sec (
    .clk, .din({ecc, ecp, stof}), .dout(sec_out_sc));
  fixed_delay #(.DW(1), .N(LAT_TRIG - LAT_STMULT)) u_sk_mult (.clk, .din(stmult_al), .dout(stmult_sc));

  // bit order: ST1-24, TOF1-6, ECinP1-6, ECtotP1-6, ECinE1-6, ECtotE1-6,
  // CC1-6, MORA, MORB, STOF1-6, ECP1-6, ECC1-6, STMULT, TRIG1-12, L2 bits 0-9
  assign scope_sig = {l2latch_bits, trig, stmult_sc, sec_out_sc, mor_sc, sec_in_sc, st_sc};

  trig_scope #(.SIGW(SCOPE_W), .PRE(60), .POST(60), .DEPTH(128)) u_scope (
    .clk, .rst, .sig(scope_sig), .value(scope_value[SCOPE_W-1:0]),
    .ignore(scope_ignore[SCOPE_W-1:0]), .arm(scope_arm), .rd(scope_rd),
    .rdata(scope_rdata), .status(scope_status));
endmodule
