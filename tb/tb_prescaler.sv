// tb_prescaler: feeds trains of pulses of random width and spacing for a
// set of prescale factors (including 0 = disabled and 1 = pass all) and
// checks that exactly floor(pulses / N) pulses come out, each a copy of the
// N-th input pulse delayed by one clock.
module tb_prescaler;
  logic clk = 0;
  always #2.5 clk = ~clk;

  int checks = 0, failures = 0;
  logic rst, din, dout;
  logic [9:0] n;
  logic exp_q;

  prescaler #(.W(10)) dut (.clk, .rst, .n, .din, .dout);

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int nvals [7] = '{1, 0, 2, 3, 7, 1023, 5};

  initial begin
    int cnt, outs, ins;
    logic passing, d_prev;
    rst = 1; din = 0; n = 1;
    repeat (3) @(negedge clk);
    rst = 0;
    foreach (nvals[j]) begin
      n = 10'(nvals[j]);
      rst = 1; @(negedge clk); rst = 0;
      cnt = 0; outs = 0; ins = 0; passing = 0; exp_q = 0; d_prev = 0;
      for (int p = 0; p < ((nvals[j] == 1023) ? 2100 : 60); p++) begin
        int w, g;
        w = 1 + $urandom % 4;
        g = 1 + $urandom % 4;
        for (int c = 0; c < w + g; c++) begin
          din = (c < w);
          @(posedge clk);
          #0.1;
          if (din && !d_prev) begin
            ins++;
            if (n != 0 && ++cnt == int'(n)) begin cnt = 0; passing = 1; outs++; end
            else passing = 0;
          end
          exp_q = (n != 0) && din && passing;
          // the registered output reflects this edge's input
          checks++;
          if (dout !== exp_q) begin
            failures++;
            if (failures < 5) $display("n=%0d p=%0d c=%0d dout=%b exp=%b", n, p, c, dout, exp_q);
          end
          d_prev = din;
          @(negedge clk);
        end
      end
      checks++;
      if (outs != ((n == 0) ? 0 : ins / int'(n))) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
