// tb_prog_delay: checks the programmable delay line against a reference
// history of its input. A random bit stream is applied while the delay
// setting is changed now and then; after settling, output(t) must equal
// input(t - 1 - max(sel, MIN_DELAY)). A second instance checks the minimum-
// delay clamp used for the level-2 delay.
module tb_prog_delay;
  logic clk = 0;
  always #2.5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [4:0] sel;
  logic [3:0] sel2;
  logic din, dout, dout2;
  logic hist [0:4095];
  int t = 0;

  prog_delay #(.DW(1), .SELW(5), .MIN_DELAY(0)) dut (.clk, .sel, .din, .dout);
  prog_delay #(.DW(1), .SELW(4), .MIN_DELAY(2)) dut2 (.clk, .sel(sel2), .din, .dout(dout2));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int settle, d2;
    sel = 0; sel2 = 0; din = 0;
    for (int i = 0; i < 40; i++) begin @(negedge clk); hist[t] = din; t++; end
    settle = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      // compare output of the previous edge
      if (settle > 35) begin
        checks++;
        if (dout !== hist[t-1-sel]) begin
          failures++;
          if (failures < 5) $display("delay mismatch sel=%0d t=%0d", sel, t);
        end
        d2 = (sel2 < 2) ? 2 : sel2;
        checks++;
        if (dout2 !== hist[t-1-d2]) failures++;
      end
      if (i % 200 == 199) begin sel = 5'($urandom); sel2 = 4'($urandom); settle = 0; end
      else settle++;
      if (i == 1000) begin sel = 31; settle = 0; end
      if (i == 1400) begin sel = 0; sel2 = 0; settle = 0; end
      din = 1'($urandom);
      hist[t] = din;
      t++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
