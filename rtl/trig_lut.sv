// trig_lut: programmable look-up table, 2**AW entries of DW bits.
// The table is loaded from the register bus one 32-bit word at a time: word
// `waddr` holds entries waddr*(32/DW) .. waddr*(32/DW)+32/DW-1, entry k of the
// word in bits k*DW +: DW. So a 4096 x 1 LUT is 128 words and a 4096 x 4 LUT
// 512 words, as in the register map. The lookup address is the signal vector
// `a` (bit a_i = input i of the LUT figure); the result `d` is registered, one
// cycle of latency. Table contents start at zero. Sizes follow the register
// map; the packing of entries inside a word is this design's choice.
module trig_lut #(
  parameter int AW = 12,
  parameter int DW = 1
) (
  input  logic                        clk,
  input  logic                        we,
  input  logic [AW-$clog2(32/DW)-1:0] waddr,
  input  logic [31:0]                 wdata,
  input  logic [AW-1:0]               a,
  output logic [DW-1:0]               d
);
  localparam int PER_WORD = 32 / DW;
  localparam int WORDS    = (1 << AW) / PER_WORD;

  logic [31:0] mem [WORDS];

  initial for (int i = 0; i < WORDS; i++) mem[i] = '0;

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    d <= mem[a[AW-1:$clog2(PER_WORD)]][a[$clog2(PER_WORD)-1:0]*DW +: DW];
  end
endmodule
