// fixed_delay: a chain of N registers (N >= 1) delaying a DW-bit vector by
// exactly N clock cycles. Used to deskew the scope signals so that every
// signal is seen in the clock column of the trigger decision it feeds.
module fixed_delay #(
  parameter int DW = 1,
  parameter int N  = 1
) (
  input  logic          clk,
  input  logic [DW-1:0] din,
  output logic [DW-1:0] dout
);
  logic [DW-1:0] stage [N];

  always_ff @(posedge clk) begin
    stage[0] <= din;
    for (int i = 1; i < N; i++) stage[i] <= stage[i-1];
  end
  assign dout = stage[N-1];
endmodule
