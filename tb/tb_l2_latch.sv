// tb_l2_latch: random trigger and sector patterns through the level-2
// latch logic with a random 4096 x 4 L2TRG table, random 3:1 L2SEC table,
// random common persistence and delay (including settings below the 2-cycle
// minimum and the 1023-cycle maximum). The model stretches the recorded
// inputs, looks both tables up and delays the result; it checks all ten
// bits every cycle and the 8-cycle latency at the minimum delay.
module tb_l2_latch;
  import trig_pkg::*;
  logic clk = 0;
  always #2.5 clk = ~clk;

  int checks = 0, failures = 0;
  logic rst;
  l2_cfg_t cfg;
  logic [N_TRIG-1:0] trig;
  logic [5:0] stof, ecp, ecc;
  logic lut_we;
  logic [8:0] lut_waddr;
  logic [31:0] lut_wdata;
  logic [9:0] l2bits;

  l2_latch dut (.*);

  logic [31:0] img [512];
  localparam int T = 8 * 2400 + 2100;
  logic [29:0] hx [T];   // {ecc, ecp, stof, trig}

  initial begin
    repeat (T + 6000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [9:0] model(int k);
    logic [29:0] h = '0;
    logic [9:0] r;
    int d = (cfg.outdelay < 2) ? 2 : int'(cfg.outdelay);
    for (int j = 0; j <= int'(cfg.outwidth); j++) h |= hx[k - 5 - d - j];
    r[9:6] = img[h[11:3]][h[2:0]*4 +: 4];
    for (int x = 0; x < 6; x++)
      r[x] = cfg.seclogic[{h[24 + x], h[18 + x], h[12 + x]}];
    return r;
  endfunction

  int delays [8] = '{2, 0, 1, 17, 1023, 5, 300, 2};
  int widths [8] = '{0, 3, 0, 255, 0, 10, 1, 40};

  initial begin
    int k, k0, d;
    logic [9:0] e;
    rst = 1; cfg = '0; {trig, stof, ecp, ecc} = '0;
    {lut_we, lut_waddr, lut_wdata} = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int w = 0; w < 512; w++) begin
      lut_we = 1; lut_waddr = 9'(w); lut_wdata = $urandom; img[w] = lut_wdata;
      @(negedge clk);
    end
    lut_we = 0;
    for (int i = 0; i < 2000; i++) hx[i] = '0;
    k = 2000;
    for (int ph = 0; ph < 8; ph++) begin
      cfg.outdelay = 10'(delays[ph]);
      cfg.outwidth = 8'(widths[ph]);
      cfg.seclogic = (ph == 0) ? 8'd170 : 8'($urandom);
      d = (delays[ph] < 2) ? 2 : delays[ph];
      k0 = k;
      for (int c = 0; c < 2400; c++) begin
        logic [29:0] v;
        v = '0;
        if (c < 2400 - 1100) begin
          // sparse enough that the long persistence does not saturate
          for (int i = 0; i < 30; i++) v[i] = ($urandom % ((widths[ph] > 20) ? 200 : 5)) == 0;
        end
        {ecc, ecp, stof, trig} = v;
        @(posedge clk);
        hx[k] = v;
        #0.1;
        if (k - k0 > 5 + d + widths[ph] + 2) begin
          e = model(k);
          checks++;
          if (l2bits !== e) begin
            failures++;
            if (failures < 6) $display("ph=%0d c=%0d l2=%b exp=%b sec=%h held=%h", ph, c, l2bits, e, cfg.seclogic, dut.held);
          end
        end
        k++;
        @(negedge clk);
      end
    end
    // latency at the minimum delay: trigger 1 alone, L2SEC off, table
    // entry 1 -> bit 6
    cfg.outdelay = 2; cfg.outwidth = 0; cfg.seclogic = 8'h00;
    lut_we = 1; lut_waddr = 0; lut_wdata = 32'h0000_0010; @(negedge clk); lut_we = 0;
    repeat (20) @(negedge clk);
    trig = 12'h001; @(negedge clk); trig = 0;
    begin
      int lat = 1;
      while (!l2bits[6] && lat < 30) begin @(negedge clk); lat++; end
      checks++;
      if (lat != 8) begin failures++; $display("latency %0d", lat); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
