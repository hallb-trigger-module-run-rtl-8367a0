// tb_edge_scaler: drives random pulse trains into a 32-bit wrapping scaler
// and a 4-bit saturating one (standing in for the 16-bit scalers), counts
// rising edges independently while enabled, and checks the clear on
// re-enable, the freeze while disabled and saturation. A signal toggling
// every clock (the 100 MHz maximum rate) must count one per two cycles.
module tb_edge_scaler;
  logic clk = 0;
  always #2.5 clk = ~clk;

  int checks = 0, failures = 0;
  logic rst, enable, sig;
  logic [31:0] count;
  logic [3:0]  count4;
  longint model;
  logic prev;

  edge_scaler #(.W(32), .SATURATE(1'b0)) dut  (.clk, .rst, .enable, .sig, .count);
  edge_scaler #(.W(4),  .SATURATE(1'b1)) dut4 (.clk, .rst, .enable, .sig, .count(count4));

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_now(string what);
    checks++;
    if (count !== 32'(model)) begin
      failures++;
      $display("%s: count=%0d model=%0d", what, count, model);
    end
    checks++;
    if (count4 !== ((model > 15) ? 4'd15 : 4'(model))) begin
      failures++;
      $display("%s: count4=%0d model=%0d", what, count4, model);
    end
  endtask

  initial begin
    rst = 1; enable = 0; sig = 0; prev = 0; model = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int run = 0; run < 6; run++) begin
      // enable (clears), then count
      @(negedge clk); enable = 1; model = 0;
      @(negedge clk); prev = sig;
      for (int i = 0; i < 400; i++) begin
        sig = (run == 2) ? ~sig : 1'($urandom);   // run 2: full 100 MHz rate
        @(negedge clk);
        if (sig && !prev) model++;
        prev = sig;
      end
      @(negedge clk);
      check_now("running");
      if (run == 2) begin
        checks++;
        if (model != 200) begin failures++; $display("rate model=%0d", model); end
      end
      // disable: freeze
      enable = 0;
      @(negedge clk);
      if (sig && !prev) model++;
      for (int i = 0; i < 50; i++) begin sig = 1'($urandom); @(negedge clk); end
      check_now("frozen");
      prev = sig;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
