// tb_pulse_persist: random pulses and random stretch settings; an
// independent model keeps the time of the last high input sample and
// expects out(t) = 1 when the input was high within the last len+1 samples
// (one cycle of register latency). A second, 2-bit-wide instance with an
// 8-bit setting checks the long level-2 persistence.
module tb_pulse_persist;
  logic clk = 0;
  always #2.5 clk = ~clk;

  int checks = 0, failures = 0;
  logic rst;
  logic [2:0] len;
  logic [7:0] len8;
  logic din;
  logic [1:0] din2, dout2;
  logic dout;
  int last_hi, last_hi2 [2];
  int t;

  pulse_persist #(.W(3), .DW(1)) dut  (.clk, .rst, .len, .din, .dout);
  pulse_persist #(.W(8), .DW(2)) dut2 (.clk, .rst, .len(len8), .din(din2), .dout(dout2));

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp1;
    rst = 1; len = 0; len8 = 0; din = 0; din2 = 0;
    last_hi = -1000; last_hi2 = '{-1000, -1000};
    repeat (3) @(negedge clk);
    rst = 0;
    t = 0;
    for (int i = 0; i < 8000; i++) begin
      if (i % 500 == 0) begin len = 3'($urandom); len8 = 8'($urandom % 40); end
      din  = ($urandom % 12) == 0;
      din2 = {($urandom % 60) == 0, ($urandom % 30) == 0};
      @(posedge clk);
      if (din) last_hi = t;
      for (int k = 0; k < 2; k++) if (din2[k]) last_hi2[k] = t;
      @(negedge clk);
      // the output now reflects samples up to time t
      if (i % 500 > 40) begin
        exp1 = (t - last_hi) <= int'(len);
        checks++;
        if (dout !== exp1) begin
          failures++;
          if (failures < 5) $display("t=%0d len=%0d last=%0d dout=%b", t, len, last_hi, dout);
        end
        for (int k = 0; k < 2; k++) begin
          checks++;
          if (dout2[k] !== ((t - last_hi2[k]) <= int'(len8))) failures++;
        end
      end
      t++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
