// sector_logic: trigger logic of one CLAS sector.
// Ten sector inputs (ST0..ST3, TOF, ECinP, ECtotP, ECinE, ECtotE, CC) each
// pass through their own 0-155 ns programmable delay and a 32-bit scaler.
// The four start-counter signals are ORed into STS and the EC pairs ANDed
// into ECP and ECE (each with a 32-bit scaler). Two programmable stages then
// form the sector outputs, as in the register notes:
//   STOF = (STS | STS_DIS) & (TOF | TOF_DIS) & STOF_EN   (modes AND/STS/TOF/1/0)
//   ECC  = (ECE | ECE_DIS) & (CC  | CC_DIS)  & ECC_EN    (modes AND/ECE/CC/0)
// STOF and ECC have 16-bit saturating scalers. The logic follows the sector
// block diagram; the pipeline registers are this design's own: STOF, ECP and
// ECC appear LAT_SECTOR (2) cycles after the delay-line outputs, i.e. 3
// cycles after the pins with zero delay. `st_dly` gives the delayed ST
// signals to the multiplicity logic and `in_dly` the other delayed inputs.
module sector_logic
  import trig_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  sector_cfg_t cfg,
  input  logic        scaler_en,
  input  logic [3:0]  st,
  input  logic        tof,
  input  logic        ecinp,
  input  logic        ectotp,
  input  logic        ecine,
  input  logic        ectote,
  input  logic        cc,
  output logic        stof,
  output logic        ecp,
  output logic        ecc,
  output logic [3:0]  st_dly,
  output logic [5:0]  in_dly,   // delayed TOF, ECinP, ECtotP, ECinE, ECtotE, CC
  // scalers: [0..3] ST0-3, [4] TOF, [5] ECinP, [6] ECtotP, [7] ECinE,
  // [8] ECtotE, [9] CC, all after their delays
  output logic [31:0] in_count [10],
  output logic [31:0] sts_count,
  output logic [31:0] ecp_count,
  output logic [31:0] ece_count,
  output logic [15:0] stof_count,
  output logic [15:0] ecc_count
);
  logic [9:0]      raw, dly;
  logic [9:0][4:0] dsel;

  assign raw  = {cc, ectote, ecine, ectotp, ecinp, tof, st};
  assign dsel = {cfg.cc_delay, cfg.ectote_delay, cfg.ecine_delay, cfg.ectotp_delay,
                 cfg.ecinp_delay, cfg.tof_delay, cfg.st_delay};

  for (genvar i = 0; i < 10; i++) begin : g_in
    prog_delay #(.DW(1), .SELW(5), .MIN_DELAY(0)) u_dly (
      .clk, .sel(dsel[i]), .din(raw[i]), .dout(dly[i]));
    edge_scaler #(.W(32)) u_scal (
      .clk, .rst, .enable(scaler_en), .sig(dly[i]), .count(in_count[i]));
  end

  assign st_dly = dly[3:0];
  assign in_dly = dly[9:4];

  // stage A: OR of start counters, AND of EC pairs
  logic sts_q, tof_q, ecp_q, ece_q, cc_q;
  always_ff @(posedge clk) begin
    if (rst) {sts_q, tof_q, ecp_q, ece_q, cc_q} <= '0;
    else begin
      sts_q <= |dly[3:0];
      tof_q <= dly[4];
      ecp_q <= dly[5] & dly[6];
      ece_q <= dly[7] & dly[8];
      cc_q  <= dly[9];
    end
  end

  // stage B: programmable sector outputs
  always_ff @(posedge clk) begin
    if (rst) {stof, ecp, ecc} <= '0;
    else begin
      stof <= (sts_q | cfg.sts_dis) & (tof_q | cfg.tof_dis) & cfg.stof_en;
      ecp  <= ecp_q;
      ecc  <= (ece_q | cfg.ece_dis) & (cc_q | cfg.cc_dis) & cfg.ecc_en;
    end
  end

  edge_scaler #(.W(32)) u_sts  (.clk, .rst, .enable(scaler_en), .sig(sts_q), .count(sts_count));
  edge_scaler #(.W(32)) u_ecp  (.clk, .rst, .enable(scaler_en), .sig(ecp_q), .count(ecp_count));
  edge_scaler #(.W(32)) u_ece  (.clk, .rst, .enable(scaler_en), .sig(ece_q), .count(ece_count));
  edge_scaler #(.W(16), .SATURATE(1'b1)) u_stof (
    .clk, .rst, .enable(scaler_en), .sig(stof), .count(stof_count));
  edge_scaler #(.W(16), .SATURATE(1'b1)) u_ecc (
    .clk, .rst, .enable(scaler_en), .sig(ecc), .count(ecc_count));
endmodule
