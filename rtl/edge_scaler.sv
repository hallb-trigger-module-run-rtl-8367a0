// edge_scaler: event counter ("scaler") for one logic signal.
// It counts rising edges of `sig`, so a signal toggling every clock (5 ns
// high, 5 ns low) is counted at the full 100 MHz pulse rate. Counting runs
// while `enable` is high; it stops when `enable` is low so that software can
// read a frozen value, and the counter is cleared on the cycle `enable`
// returns high, as the register map describes. A 32-bit scaler wraps; a
// 16-bit scaler (SATURATE=1) holds at its maximum, as the 65535 reading of a
// 16-bit scaler on the board shows. Edge counting and saturation are read
// from the board's description; the clear-on-enable edge is its register note.
module edge_scaler #(
  parameter int W        = 32,
  parameter bit SATURATE = 1'b0
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         enable,
  input  logic         sig,
  output logic [W-1:0] count
);
  logic sig_q, en_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      sig_q <= 1'b0;
      en_q  <= 1'b0;
      count <= '0;
    end else begin
      sig_q <= sig;
      en_q  <= enable;
      if (enable && !en_q)
        count <= '0;
      else if (enable && sig && !sig_q && !(SATURATE && (&count)))
        count <= count + 1'b1;
    end
  end
endmodule
