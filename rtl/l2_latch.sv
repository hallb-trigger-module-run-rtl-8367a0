// l2_latch: builds the ten level-2 latch bits read out by an external latch.
// The twelve trigger decisions and the eighteen sector outputs (STOF, ECP,
// ECC of each sector) are first stretched by a common persistence of
// 0-255 cycles (0-1275 ns). A 4096 x 4 "L2TRG" LUT addressed by
// TRIGGER[12:1] gives bits 6-9; for each sector x a shared 8-entry "L2SEC"
// LUT addressed by {ECC_x, ECP_x, STOF_x} gives bit x-1. All ten bits then
// pass a common delay of 2-1023 cycles (10-5115 ns).
// Latency from `trig` to `l2bits` with the minimum delay is 8 cycles: input
// register, persistence, LUT, LUT output register, delay line (1 + 2) and
// output register. The structure follows the level-2 block diagram; the
// register stages are this design's own, chosen so that, with the trigger
// output register of the top level, TRIGGER pin to L2 pin is 7 cycles
// (35 ns), the board's nominal figure.
module l2_latch
  import trig_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst,
  input  l2_cfg_t              cfg,
  input  logic [N_TRIG-1:0]    trig,
  input  logic [N_SECTORS-1:0] stof,
  input  logic [N_SECTORS-1:0] ecp,
  input  logic [N_SECTORS-1:0] ecc,
  input  logic                 lut_we,
  input  logic [8:0]           lut_waddr,
  input  logic [31:0]          lut_wdata,
  output logic [9:0]           l2bits
);
  localparam int NIN = N_TRIG + 3 * N_SECTORS;

  logic [NIN-1:0] in_q, held;
  logic [3:0]     trg_bits;
  logic [5:0]     sec_bits;
  logic [9:0]     pre_dly, pre_q, post_dly;

  always_ff @(posedge clk) begin
    if (rst) in_q <= '0;
    else     in_q <= {ecc, ecp, stof, trig};
  end

  pulse_persist #(.W(8), .DW(NIN)) u_persist (
    .clk, .rst, .len(cfg.outwidth), .din(in_q), .dout(held));

  trig_lut #(.AW(12), .DW(4)) u_l2trg (
    .clk, .we(lut_we), .waddr(lut_waddr), .wdata(lut_wdata),
    .a(held[N_TRIG-1:0]), .d(trg_bits));

  always_ff @(posedge clk) begin
    for (int x = 0; x < N_SECTORS; x++)
      sec_bits[x] <= cfg.seclogic[{held[N_TRIG + 2*N_SECTORS + x],
                                   held[N_TRIG + N_SECTORS + x],
                                   held[N_TRIG + x]}];
  end

  assign pre_dly = {trg_bits, sec_bits};

  always_ff @(posedge clk) begin
    if (rst) pre_q <= '0;
    else     pre_q <= pre_dly;
  end

  prog_delay #(.DW(10), .SELW(10), .MIN_DELAY(2)) u_dly (
    .clk, .sel(cfg.outdelay), .din(pre_q), .dout(post_dly));

  always_ff @(posedge clk) begin
    if (rst) l2bits <= '0;
    else     l2bits <= post_dly;
  end
endmodule
