// prog_delay: programmable digital delay line for logic signals.
// Every input is first registered (this register is the input sampling
// stage), then shifted through a chain of 2**SELW-1 further registers; the
// output is the tap selected by `sel`. A setting of N therefore delays the
// signal by N clock cycles (N * 5 ns at 200 MHz) on top of the one-cycle
// sampling stage, which gives the board's 0-155 ns input delays (SELW=5) and,
// with SELW=10 and MIN_DELAY=2, the 10-5115 ns level-2 latch delay. Settings
// below MIN_DELAY are raised to MIN_DELAY. The range and step follow the
// register descriptions; the shift-register structure is this design's own.
module prog_delay #(
  parameter int DW        = 1,   // signals delayed together
  parameter int SELW      = 5,   // width of the delay setting
  parameter int MIN_DELAY = 0    // smallest delay the setting can select
) (
  input  logic            clk,
  input  logic [SELW-1:0] sel,
  input  logic [DW-1:0]   din,
  output logic [DW-1:0]   dout
);
  localparam int DEPTH = 1 << SELW;

  logic [DW-1:0] taps [DEPTH];
  logic [SELW-1:0] sel_eff;

  always_ff @(posedge clk) begin
    taps[0] <= din;
    for (int i = 1; i < DEPTH; i++) taps[i] <= taps[i-1];
  end

  always_comb begin
    sel_eff = sel;
    if (MIN_DELAY > 0 && int'(sel) < MIN_DELAY) sel_eff = SELW'(MIN_DELAY);
    dout    = taps[sel_eff];
  end
endmodule
