// tb_trig_lut: loads a 4096 x 1 and a 4096 x 4 table with random words
// through the 32-bit write port, keeps a copy, and looks up random and
// boundary addresses, expecting entry k of word w in bits k*DW +: DW one
// clock after the address is applied. Also reloads words while reading.
module tb_trig_lut;
  logic clk = 0;
  always #2.5 clk = ~clk;

  int checks = 0, failures = 0;
  logic we1, we4;
  logic [6:0] waddr1;
  logic [8:0] waddr4;
  logic [31:0] wdata;
  logic [11:0] a;
  logic d1;
  logic [3:0] d4;
  logic [31:0] img1 [128];
  logic [31:0] img4 [512];

  trig_lut #(.AW(12), .DW(1)) dut1 (.clk, .we(we1), .waddr(waddr1), .wdata, .a, .d(d1));
  trig_lut #(.AW(12), .DW(4)) dut4 (.clk, .we(we4), .waddr(waddr4), .wdata, .a, .d(d4));

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we1 = 0; we4 = 0; a = 0; wdata = 0; waddr1 = 0; waddr4 = 0;
    @(negedge clk);
    for (int w = 0; w < 512; w++) begin
      wdata = $urandom;
      if (w < 128) begin we1 = 1; waddr1 = 7'(w); img1[w] = wdata; end
      we4 = 1; waddr4 = 9'(w); img4[w] = wdata;
      @(negedge clk);
      we1 = 0; we4 = 0;
    end
    for (int i = 0; i < 6000; i++) begin
      a = (i < 4096) ? 12'(i) : 12'($urandom);
      if (i % 97 == 0) begin
        wdata = $urandom; waddr1 = 7'($urandom); waddr4 = 9'($urandom);
        we1 = 1; we4 = 1;
      end
      @(posedge clk);
      #0.1;
      checks++;
      if (d1 !== img1[a[11:5]][a[4:0]]) begin
        failures++;
        if (failures < 5) $display("a=%0d d1=%b", a, d1);
      end
      checks++;
      if (d4 !== img4[a[11:3]][a[2:0]*4 +: 4]) failures++;
      if (we1) img1[waddr1] = wdata;
      if (we4) img4[waddr4] = wdata;
      @(negedge clk);
      we1 = 0; we4 = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
