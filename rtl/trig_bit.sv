// trig_bit: one of the twelve programmable global trigger bits.
// Two 4096 x 1 LUTs look at all six sectors: the "ECP" LUT addressed by
// {ECP[6:1], STOF[6:1]} and the "ECC" LUT by {ECC[6:1], STOF[6:1]} (STOF on
// address bits 0-5, as in the LUT figures). Their OR is ANDed with the MOR
// condition
//   MOR = (MORA_EN & MORA) | (MORB_EN & MORB) | MOR_DIS
// giving LUT_MOR, which is then gated by the ST multiplicity window unless
// STMULT_DIS is set. The result is stretched by 0-7 cycles (0-35 ns) and
// prescaled by 0-1023 (0 disables the bit). 16-bit saturating scalers watch
// the LUT OR, LUT_MOR, persistence and prescaler outputs.
// Pipeline (this design's choice): LUT read and OR take LAT_LUT (2) cycles,
// then AND MOR, multiplicity gate, persistence and prescaler one cycle each,
// so `trig` follows the sector outputs by 6 cycles. MORA/MORB must arrive
// aligned with the LUT OR and ST_MULT one cycle later (see common_logic).
module trig_bit
  import trig_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst,
  input  trig_cfg_t            cfg,
  input  logic                 scaler_en,
  input  logic [N_SECTORS-1:0] stof,
  input  logic [N_SECTORS-1:0] ecp,
  input  logic [N_SECTORS-1:0] ecc,
  input  logic                 mora_al,
  input  logic                 morb_al,
  input  logic                 stmult_al,
  // LUT loading from the register bus (128 words each)
  input  logic                 ecp_we,
  input  logic                 ecc_we,
  input  logic [6:0]           lut_waddr,
  input  logic [31:0]          lut_wdata,
  output logic                 trig,
  output logic [15:0]          lut_count,
  output logic [15:0]          lutmor_count,
  output logic [15:0]          persist_count,
  output logic [15:0]          prescale_count
);
  logic ecp_hit, ecc_hit, lut_or, lut_mor, gated, persisted;

  trig_lut #(.AW(12), .DW(1)) u_ecp_lut (
    .clk, .we(ecp_we), .waddr(lut_waddr), .wdata(lut_wdata),
    .a({ecp, stof}), .d(ecp_hit));
  trig_lut #(.AW(12), .DW(1)) u_ecc_lut (
    .clk, .we(ecc_we), .waddr(lut_waddr), .wdata(lut_wdata),
    .a({ecc, stof}), .d(ecc_hit));

  wire mor = (cfg.mora_en & mora_al) | (cfg.morb_en & morb_al) | cfg.mor_dis;

  always_ff @(posedge clk) begin
    if (rst) {lut_or, lut_mor, gated} <= '0;
    else begin
      lut_or  <= ecp_hit | ecc_hit;
      lut_mor <= lut_or & mor;
      gated   <= lut_mor & (stmult_al | cfg.stmult_dis);
    end
  end

  pulse_persist #(.W(3)) u_persist (.clk, .rst, .len(cfg.persist), .din(gated), .dout(persisted));
  prescaler     #(.W(10)) u_presc  (.clk, .rst, .n(cfg.prescale), .din(persisted), .dout(trig));

  edge_scaler #(.W(16), .SATURATE(1'b1)) u_s0 (.clk, .rst, .enable(scaler_en), .sig(lut_or),    .count(lut_count));
  edge_scaler #(.W(16), .SATURATE(1'b1)) u_s1 (.clk, .rst, .enable(scaler_en), .sig(lut_mor),   .count(lutmor_count));
  edge_scaler #(.W(16), .SATURATE(1'b1)) u_s2 (.clk, .rst, .enable(scaler_en), .sig(persisted), .count(persist_count));
  edge_scaler #(.W(16), .SATURATE(1'b1)) u_s3 (.clk, .rst, .enable(scaler_en), .sig(trig),      .count(prescale_count));
endmodule
