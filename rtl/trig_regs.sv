// trig_regs: register file behind the board's VME bridge.
// It decodes the board's register map on a simple synchronous local bus:
// a one-cycle `bus_we` writes `bus_wdata` to byte address `bus_addr`; a
// one-cycle `bus_re` returns the word in `bus_rdata` with `bus_rvalid` on the
// next cycle. It holds all configuration (input delays, sector modes, MOR and
// multiplicity settings, persistence, prescale, level-2 settings, scope
// pattern), drives the LUT write strobes for the 24 trigger LUTs and the L2
// LUT, returns scalers (zero-extended to 32 bits), and forwards scope reads.
// TS_ENABLE_SCALERS gates all scalers; the reference scaler here counts
// 25 ns ticks (every fifth clock) while they are enabled, as its register
// note says. The addresses and bit fields follow the register listing; the
// local bus protocol, reset values (all zero: triggers disabled) and
// write-only LUTs are this design's own choices.
module trig_regs
  import trig_pkg::*;
#(
  parameter logic [31:0] REVISION = 32'h0001_0310
) (
  input  logic        clk,
  input  logic        rst,
  // local bus
  input  logic        bus_we,
  input  logic        bus_re,
  input  logic [15:0] bus_addr,
  input  logic [31:0] bus_wdata,
  output logic [31:0] bus_rdata,
  output logic        bus_rvalid,
  input  logic [31:0] board_ids,
  // configuration
  output sector_cfg_t sector_cfg [N_SECTORS],
  output trig_cfg_t   trig_cfg   [N_TRIG],
  output common_cfg_t common_cfg,
  output l2_cfg_t     l2_cfg,
  output logic        scaler_en,
  // LUT loading
  output logic [N_TRIG-1:0] ecc_lut_we,
  output logic [N_TRIG-1:0] ecp_lut_we,
  output logic        l2_lut_we,
  output logic [8:0]  lut_waddr,
  output logic [31:0] lut_wdata,
  // scalers, index = (address - 0x1000) / 4, all but REF
  input  logic [31:0] scaler [N_SCALER_WORDS],
  // scope
  output logic [127:0] scope_value,
  output logic [127:0] scope_ignore,
  output logic        scope_arm,
  output logic        scope_rd,
  input  logic [31:0] scope_rdata,
  input  logic [31:0] scope_status
);
  logic [4:0]  delay    [N_INPUTS];
  logic [2:0]  persist  [N_TRIG];
  logic [9:0]  prescale [N_TRIG];
  logic [5:0]  stof_en, tof_dis, sts_dis, ece_dis, cc_dis, ecc_en;
  logic [11:0] mora_en, morb_en, mor_dis, stmult_dis;
  logic [9:0]  stmult_thr;
  logic [31:0] ref_count;
  logic [2:0]  ref_div;
  logic        en_q;

  wire [15:0] a = bus_addr;

  // word index of the address within each register group
  wire [5:0] i_delay    = 6'((a - A_DELAY_BASE) >> 2);
  wire [3:0] i_persist  = 4'((a - A_PERSIST_BASE) >> 2);
  wire [3:0] i_prescale = 4'((a - A_PRESCALE_BASE) >> 2);
  wire [7:0] i_scaler   = 8'((a - A_SCALER_BASE) >> 2);

  // ---------------- writes ----------------
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < N_INPUTS; i++) delay[i] <= '0;
      for (int i = 0; i < N_TRIG; i++) begin
        persist[i]  <= '0;
        prescale[i] <= '0;
      end
      {stof_en, tof_dis, sts_dis, ece_dis, cc_dis, ecc_en} <= '0;
      {mora_en, morb_en, mor_dis, stmult_dis} <= '0;
      stmult_thr   <= '0;
      l2_cfg       <= '0;
      scaler_en    <= 1'b0;
      scope_value  <= '0;
      scope_ignore <= '1;
    end else if (bus_we) begin
      if (a >= A_DELAY_BASE && a < A_DELAY_BASE + 16'(4 * N_INPUTS))
        delay[i_delay] <= bus_wdata[4:0];
      if (a >= A_PERSIST_BASE && a < A_PERSIST_BASE + 16'(4 * N_TRIG))
        persist[i_persist] <= bus_wdata[2:0];
      if (a >= A_PRESCALE_BASE && a < A_PRESCALE_BASE + 16'(4 * N_TRIG))
        prescale[i_prescale] <= bus_wdata[9:0];
      if (a >= A_TRIG_VALUE3 && a < A_TRIG_IGNORE3)
        scope_value[(3 - ((a - A_TRIG_VALUE3) >> 2)) * 32 +: 32] <= bus_wdata;
      if (a >= A_TRIG_IGNORE3 && a <= A_TRIG_IGNORE3 + 16'hC)
        scope_ignore[(3 - ((a - A_TRIG_IGNORE3) >> 2)) * 32 +: 32] <= bus_wdata;
      unique case (a)
        A_ENABLE_SCALERS: scaler_en  <= bus_wdata[0];
        A_STOF_EN:        stof_en    <= bus_wdata[5:0];
        A_TOF_DIS:        tof_dis    <= bus_wdata[5:0];
        A_STS_DIS:        sts_dis    <= bus_wdata[5:0];
        A_ECE_DIS:        ece_dis    <= bus_wdata[5:0];
        A_CC_DIS:         cc_dis     <= bus_wdata[5:0];
        A_ECC_EN:         ecc_en     <= bus_wdata[5:0];
        A_MORA_EN:        mora_en    <= bus_wdata[11:0];
        A_MORB_EN:        morb_en    <= bus_wdata[11:0];
        A_MOR_DIS:        mor_dis    <= bus_wdata[11:0];
        A_STMULT_THR:     stmult_thr <= bus_wdata[9:0];
        A_STMULT_DIS:     stmult_dis <= bus_wdata[11:0];
        A_L2_SECLOGIC:    l2_cfg.seclogic <= bus_wdata[7:0];
        A_L2_OUTDELAY:    l2_cfg.outdelay <= bus_wdata[9:0];
        A_L2_OUTWIDTH:    l2_cfg.outwidth <= bus_wdata[7:0];
        default: ;
      endcase
    end
  end

  // scope arm: writing 1 to bit 0 of TS_TRIG_STATUS
  assign scope_arm = bus_we && a == A_TRIG_STATUS && bus_wdata[0];
  // scope read: the FIFO port or the block-transfer window 0x0000-0x0FFC
  assign scope_rd  = bus_re && (a == A_TRIG_BUFFER || a < A_SCALER_BASE);

  // LUT strobes: 0x4000-0x57FC ECC1-12, 0x5800-0x6FFC ECP1-12, 0x7000-0x77FC L2
  always_comb begin
    ecc_lut_we = '0;
    ecp_lut_we = '0;
    l2_lut_we  = 1'b0;
    lut_wdata  = bus_wdata;
    // word within the table: 128 words for a trigger LUT, 512 for L2
    lut_waddr  = (a >= A_LUT_L2_BASE) ? a[10:2] : {2'b00, a[8:2]};
    if (bus_we) begin
      if (a >= A_LUT_ECC_BASE && a < A_LUT_ECP_BASE)
        ecc_lut_we[4'((a - A_LUT_ECC_BASE) >> 9)] = 1'b1;
      else if (a >= A_LUT_ECP_BASE && a < A_LUT_L2_BASE)
        ecp_lut_we[4'((a - A_LUT_ECP_BASE) >> 9)] = 1'b1;
      else if (a >= A_LUT_L2_BASE && a < A_LUT_L2_BASE + 16'h800)
        l2_lut_we = 1'b1;
    end
  end

  // ---------------- configuration views ----------------
  always_comb begin
    for (int s = 0; s < N_SECTORS; s++) begin
      for (int k = 0; k < 4; k++) sector_cfg[s].st_delay[k] = delay[IDX_ST + 4 * s + k];
      sector_cfg[s].tof_delay    = delay[IDX_TOF + s];
      sector_cfg[s].ecinp_delay  = delay[IDX_ECINP + s];
      sector_cfg[s].ectotp_delay = delay[IDX_ECTOTP + s];
      sector_cfg[s].ecine_delay  = delay[IDX_ECINE + s];
      sector_cfg[s].ectote_delay = delay[IDX_ECTOTE + s];
      sector_cfg[s].cc_delay     = delay[IDX_CC + s];
      sector_cfg[s].stof_en      = stof_en[s];
      sector_cfg[s].tof_dis      = tof_dis[s];
      sector_cfg[s].sts_dis      = sts_dis[s];
      sector_cfg[s].ece_dis      = ece_dis[s];
      sector_cfg[s].cc_dis       = cc_dis[s];
      sector_cfg[s].ecc_en       = ecc_en[s];
    end
    for (int t = 0; t < N_TRIG; t++) begin
      trig_cfg[t].persist    = persist[t];
      trig_cfg[t].prescale   = prescale[t];
      trig_cfg[t].mora_en    = mora_en[t];
      trig_cfg[t].morb_en    = morb_en[t];
      trig_cfg[t].mor_dis    = mor_dis[t];
      trig_cfg[t].stmult_dis = stmult_dis[t];
    end
    common_cfg.mora_delay = delay[IDX_MORA];
    common_cfg.morb_delay = delay[IDX_MORB];
    common_cfg.stmult_min = stmult_thr[4:0];
    common_cfg.stmult_max = stmult_thr[9:5];
  end

  // ---------------- reference scaler (25 ns ticks) ----------------
  always_ff @(posedge clk) begin
    if (rst) begin
      ref_count <= '0;
      ref_div   <= '0;
      en_q      <= 1'b0;
    end else begin
      en_q <= scaler_en;
      if (scaler_en && !en_q) begin
        ref_count <= '0;
        ref_div   <= '0;
      end else if (scaler_en) begin
        ref_div <= (ref_div == 3'd4) ? 3'd0 : ref_div + 3'd1;
        if (ref_div == 3'd4) ref_count <= ref_count + 1'b1;
      end
    end
  end

  // ---------------- reads ----------------
  logic [31:0] rmux;
  always_comb begin
    rmux = '0;
    if (a >= A_SCALER_BASE && a <= A_SCALER_LAST)
      rmux = (a == A_SCALER_BASE + 16'(4 * SIDX_REF)) ? ref_count
                                                      : scaler[i_scaler];
    else if (a >= A_DELAY_BASE && a < A_DELAY_BASE + 16'(4 * N_INPUTS))
      rmux = 32'(delay[i_delay]);
    else if (a >= A_PERSIST_BASE && a < A_PERSIST_BASE + 16'(4 * N_TRIG))
      rmux = 32'(persist[i_persist]);
    else if (a >= A_PRESCALE_BASE && a < A_PRESCALE_BASE + 16'(4 * N_TRIG))
      rmux = 32'(prescale[i_prescale]);
    else if (a >= A_TRIG_VALUE3 && a < A_TRIG_IGNORE3)
      rmux = scope_value[(3 - ((a - A_TRIG_VALUE3) >> 2)) * 32 +: 32];
    else if (a >= A_TRIG_IGNORE3 && a <= A_TRIG_IGNORE3 + 16'hC)
      rmux = scope_ignore[(3 - ((a - A_TRIG_IGNORE3) >> 2)) * 32 +: 32];
    else if (a == A_TRIG_BUFFER || a < A_SCALER_BASE)
      rmux = scope_rdata;
    else begin
      unique case (a)
        A_BOARDIDS:       rmux = board_ids;
        A_REVISION:       rmux = REVISION;
        A_ENABLE_SCALERS: rmux = 32'(scaler_en);
        A_STOF_EN:        rmux = 32'(stof_en);
        A_TOF_DIS:        rmux = 32'(tof_dis);
        A_STS_DIS:        rmux = 32'(sts_dis);
        A_ECE_DIS:        rmux = 32'(ece_dis);
        A_CC_DIS:         rmux = 32'(cc_dis);
        A_ECC_EN:         rmux = 32'(ecc_en);
        A_MORA_EN:        rmux = 32'(mora_en);
        A_MORB_EN:        rmux = 32'(morb_en);
        A_MOR_DIS:        rmux = 32'(mor_dis);
        A_STMULT_THR:     rmux = 32'(stmult_thr);
        A_STMULT_DIS:     rmux = 32'(stmult_dis);
        A_L2_SECLOGIC:    rmux = 32'(l2_cfg.seclogic);
        A_L2_OUTDELAY:    rmux = 32'(l2_cfg.outdelay);
        A_L2_OUTWIDTH:    rmux = 32'(l2_cfg.outwidth);
        A_TRIG_STATUS:    rmux = scope_status;
        default:          rmux = '0;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      bus_rdata  <= '0;
      bus_rvalid <= 1'b0;
    end else begin
      bus_rvalid <= bus_re;
      if (bus_re) bus_rdata <= rmux;
    end
  end

  // a bus cycle is either a read or a write
  assert property (@(posedge clk) disable iff (rst) !(bus_we && bus_re));
endmodule
