// common_logic: logic shared by all twelve trigger bits.
// MORA and MORB each pass through a 0-155 ns programmable delay and a 32-bit
// scaler; their OR has a scaler of its own. The ST multiplicity is the number
// of the 24 delayed start-counter signals that are high; ST_MULT is true when
// it lies in the window [min, max] (both inclusive) and has a 32-bit scaler.
// Both results are pipelined so that they reach the trigger bits in step with
// the sector signals: MORA/MORB meet the LUT OR stage (LAT_MOR cycles after the
// delay lines) and ST_MULT the following stage (LAT_STMULT), so an ST pattern
// delayed correctly for the sector trigger is also in time for the
// multiplicity condition. The window test and the delay compensation follow
// the document; the pipeline depths are this design's own.
module common_logic
  import trig_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  common_cfg_t       cfg,
  input  logic              scaler_en,
  input  logic              mora,
  input  logic              morb,
  input  logic [N_ST-1:0]   st_dly,   // from the sector delay lines
  output logic              mora_dly, // delay-line outputs
  output logic              morb_dly,
  output logic              mora_al,  // aligned with the LUT OR stage
  output logic              morb_al,
  output logic              stmult_al,// aligned with the LUT_MOR stage
  output logic [31:0]       mora_count,
  output logic [31:0]       morb_count,
  output logic [31:0]       morab_count,
  output logic [31:0]       stmult_count
);
  logic mora_d, morb_d, morab_q, stmult_q;
  logic [4:0] mult;

  prog_delay #(.DW(1), .SELW(5)) u_dlya (.clk, .sel(cfg.mora_delay), .din(mora), .dout(mora_d));
  prog_delay #(.DW(1), .SELW(5)) u_dlyb (.clk, .sel(cfg.morb_delay), .din(morb), .dout(morb_d));

  always_comb begin
    mult = '0;
    for (int i = 0; i < N_ST; i++) mult = mult + 5'(st_dly[i]);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      morab_q  <= 1'b0;
      stmult_q <= 1'b0;
    end else begin
      morab_q  <= mora_d | morb_d;
      stmult_q <= (mult >= cfg.stmult_min) && (mult <= cfg.stmult_max);
    end
  end

  // alignment pipelines (stmult_q is already one stage down)
  logic [LAT_MOR-1:0][1:0]  mor_pipe;
  logic [LAT_STMULT-2:0]    mult_pipe;
  always_ff @(posedge clk) begin
    if (rst) begin
      mor_pipe  <= '0;
      mult_pipe <= '0;
    end else begin
      mor_pipe  <= {mor_pipe[LAT_MOR-2:0], {morb_d, mora_d}};
      mult_pipe <= {mult_pipe[LAT_STMULT-3:0], stmult_q};
    end
  end
  assign mora_dly  = mora_d;
  assign morb_dly  = morb_d;
  assign mora_al   = mor_pipe[LAT_MOR-1][0];
  assign morb_al   = mor_pipe[LAT_MOR-1][1];
  assign stmult_al = mult_pipe[LAT_STMULT-2];

  edge_scaler #(.W(32)) u_sa (.clk, .rst, .enable(scaler_en), .sig(mora_d),   .count(mora_count));
  edge_scaler #(.W(32)) u_sb (.clk, .rst, .enable(scaler_en), .sig(morb_d),   .count(morb_count));
  edge_scaler #(.W(32)) u_so (.clk, .rst, .enable(scaler_en), .sig(morab_q),  .count(morab_count));
  edge_scaler #(.W(32)) u_sm (.clk, .rst, .enable(scaler_en), .sig(stmult_q), .count(stmult_count));
endmodule
