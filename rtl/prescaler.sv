// prescaler: passes one trigger pulse out of every N. It counts rising
// edges of `din`; the pulse that brings the count to N is passed through
// whole (the output follows the input until it falls) and the count restarts.
// N=1 passes every pulse, N=0 blocks all of them, which disables the trigger
// bit. The 10-bit range and the meaning of 0 follow the register notes;
// which pulse of the N is passed (the N-th) is this design's choice.
// The output is registered: one cycle of latency.
module prescaler #(
  parameter int W = 10
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] n,
  input  logic         din,
  output logic         dout
);
  logic [W-1:0] cnt;
  logic         din_q, pass;

  wire rise = din && !din_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt   <= '0;
      din_q <= 1'b0;
      pass  <= 1'b0;
      dout  <= 1'b0;
    end else begin
      din_q <= din;
      if (n == '0) begin
        cnt  <= '0;
        pass <= 1'b0;
        dout <= 1'b0;
      end else if (rise) begin
        if (cnt + 1'b1 >= n) begin
          cnt  <= '0;
          pass <= 1'b1;
          dout <= 1'b1;
        end else begin
          cnt  <= cnt + 1'b1;
          pass <= 1'b0;
          dout <= 1'b0;
        end
      end else begin
        if (!din) pass <= 1'b0;
        dout <= din && pass;
      end
    end
  end
endmodule
