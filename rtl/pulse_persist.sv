// pulse_persist: persistence (pulse stretcher). Each bit of the output is
// high while its input is high and for `len` further clock cycles after the
// input falls, so a pulse is lengthened by len * 5 ns. With W=3 this is the
// 0-35 ns trigger stretcher; with W=8 the 0-1275 ns level-2 persistence.
// The output is registered: one cycle of latency. The stretch amount and
// ranges follow the register notes; the down-counter is this design's own.
module pulse_persist #(
  parameter int W  = 3,   // width of the stretch setting
  parameter int DW = 1    // independent signals sharing one setting
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [W-1:0]  len,
  input  logic [DW-1:0] din,
  output logic [DW-1:0] dout
);
  logic [W-1:0] cnt [DW];

  always_ff @(posedge clk) begin
    for (int i = 0; i < DW; i++) begin
      if (rst) begin
        cnt[i]  <= '0;
        dout[i] <= 1'b0;
      end else if (din[i]) begin
        cnt[i]  <= len;
        dout[i] <= 1'b1;
      end else if (cnt[i] != '0) begin
        cnt[i]  <= cnt[i] - 1'b1;
        dout[i] <= 1'b1;
      end else begin
        dout[i] <= 1'b0;
      end
    end
  end
endmodule
