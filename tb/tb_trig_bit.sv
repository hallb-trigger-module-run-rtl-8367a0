// tb_trig_bit: one trigger bit with both 4096-entry LUTs loaded at random
// (plus one phase with an ECC table of ones except at address 0), random sector patterns, MOR
// inputs and ST multiplicity, and random persistence, prescale and
// MOR/STMULT settings per phase. The model recomputes LUT OR, AND MOR,
// the multiplicity gate, the stretcher and the prescaler from recorded
// inputs and compares the trigger every cycle and the four scalers at the
// end of each phase. It also measures the 6-cycle latency from the sector
// signals to the trigger.
module tb_trig_bit;
  import trig_pkg::*;
  logic clk = 0;
  always #2.5 clk = ~clk;

  int checks = 0, failures = 0;
  logic rst, scaler_en;
  trig_cfg_t cfg;
  logic [5:0] stof, ecp, ecc;
  logic mora_al, morb_al, stmult_al;
  logic ecp_we, ecc_we;
  logic [6:0] lut_waddr;
  logic [31:0] lut_wdata;
  logic trig;
  logic [15:0] lut_count, lutmor_count, persist_count, prescale_count;

  trig_bit dut (.*);

  logic [31:0] img_ecp [128], img_ecc [128];
  localparam int T = 10 * 700 + 200;
  logic [17:0] hs [T];       // {ecc, ecp, stof}
  logic [2:0]  hm [T];       // {stmult, morb, mora}
  logic        g [T], p [T], lo [T], lm [T];

  initial begin
    repeat (T + 5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic lut(logic [31:0] img [128], logic [11:0] a);
    return img[a[11:5]][a[4:0]];
  endfunction

  task automatic load(bit ones);
    for (int w = 0; w < 128; w++) begin
      @(negedge clk);
      lut_waddr = 7'(w);
      lut_wdata = $urandom & $urandom & $urandom;  // sparse tables
      if (w == 0) lut_wdata[0] = 1'b0;   // quiet inputs never trigger
      img_ecp[w] = lut_wdata; ecp_we = 1; ecc_we = 0;
      @(negedge clk);
      lut_wdata = ones ? '1 : ($urandom & $urandom & $urandom);
      if (w == 0) lut_wdata[0] = 1'b0;
      img_ecc[w] = lut_wdata; ecp_we = 0; ecc_we = 1;
    end
    @(negedge clk);
    ecp_we = 0; ecc_we = 0;
  endtask

  initial begin
    int k, k0, cnt, c_lo, c_lm, c_p, c_t;
    logic mor, passing, exp_t, pin_prev, exp_prev;
    logic [17:0] v;
    rst = 1; scaler_en = 0; cfg = '0;
    {stof, ecp, ecc, mora_al, morb_al, stmult_al} = '0;
    {ecp_we, ecc_we, lut_waddr, lut_wdata} = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 20; i++) begin hs[i] = '0; hm[i] = '0; g[i] = 0; p[i] = 0; lo[i] = 0; lm[i] = 0; end
    k = 20;
    for (int ph = 0; ph < 10; ph++) begin
      load(ph == 3);
      cfg.persist    = 3'($urandom);
      cfg.prescale   = (ph == 0) ? 10'd1 : (ph == 5) ? 10'd0 : 10'(1 + $urandom % 4);
      {cfg.mora_en, cfg.morb_en, cfg.mor_dis, cfg.stmult_dis} = (ph == 0) ? 4'b0011 : 4'($urandom);
      scaler_en = 0;
      rst = 1;                  // restart the prescaler count
      @(negedge clk);
      rst = 0;
      scaler_en = 1;
      k0 = k; cnt = 0; passing = 0; pin_prev = 0; exp_t = 0; exp_prev = 0;
      {c_lo, c_lm, c_p, c_t} = '0;
      for (int c = 0; c < 700; c++) begin
        v = '0;
        if (c > 2 && c < 600) v = 18'($urandom) & 18'($urandom);
        {ecc, ecp, stof} = v;
        {stmult_al, morb_al, mora_al} = (c > 2 && c < 600) ? 3'($urandom) : 3'b0;
        @(posedge clk);
        hs[k] = v; hm[k] = {stmult_al, morb_al, mora_al};
        #0.1;
        // model state after edge k
        lo[k] = lut(img_ecp, {hs[k-1][11:6], hs[k-1][5:0]}) | lut(img_ecc, {hs[k-1][17:12], hs[k-1][5:0]});
        mor   = (cfg.mora_en & hm[k][0]) | (cfg.morb_en & hm[k][1]) | cfg.mor_dis;
        lm[k] = lo[k-1] & mor;
        g[k]  = lm[k-1] & (hm[k][2] | cfg.stmult_dis);
        p[k]  = 0;
        for (int j = 0; j <= int'(cfg.persist); j++) if (k-1-j >= k0) p[k] |= g[k-1-j];
        if (k - k0 >= 1) begin
          if (p[k-1] && !pin_prev) begin
            if (cfg.prescale != 0 && ++cnt >= int'(cfg.prescale)) begin cnt = 0; passing = 1; end
            else passing = 0;
          end
          exp_t = (cfg.prescale != 0) && p[k-1] && passing;
          pin_prev = p[k-1];
        end
        if (k - k0 > 12) begin
          checks++;
          if (trig !== exp_t) begin
            failures++;
            if (failures < 10) $display("ph=%0d c=%0d trig=%b exp=%b cfg=%p", ph, c, trig, exp_t, cfg);
          end
        end
        if (k - k0 >= 1) begin
          if (lo[k] && !lo[k-1]) c_lo++;
          if (lm[k] && !lm[k-1]) c_lm++;
          if (p[k] && !p[k-1]) c_p++;
          if (exp_t && !exp_prev) c_t++;
          exp_prev = exp_t;
        end
        k++;
        @(negedge clk);
      end
      checks += 4;
      if (lut_count != 16'(c_lo)) begin failures++; $display("ph=%0d lut_count %0d %0d", ph, lut_count, c_lo); end
      if (lutmor_count != 16'(c_lm)) begin failures++; $display("ph=%0d lutmor_count %0d %0d", ph, lutmor_count, c_lm); end
      if (persist_count != 16'(c_p)) begin failures++; $display("ph=%0d persist_count %0d %0d", ph, persist_count, c_p); end
      if (prescale_count != 16'(c_t)) begin failures++; $display("ph=%0d prescale_count %0d %0d", ph, prescale_count, c_t); end
    end
    // latency: everything open, one sector-1 STOF+ECC pulse with the
    // ECC table that only accepts ECC1 alone (address 64)
    for (int w = 0; w < 128; w++) begin
      @(negedge clk); lut_waddr = 7'(w); lut_wdata = (w == 2) ? 32'h1 : 32'h0; ecc_we = 1;
    end
    @(negedge clk); ecc_we = 0;
    cfg = '0; cfg.prescale = 1; cfg.mor_dis = 1; cfg.stmult_dis = 1;
    repeat (20) @(negedge clk);
    ecc = 6'b000001; @(negedge clk); ecc = 0;
    begin
      int lat = 1;
      while (!trig && lat < 20) begin @(negedge clk); lat++; end
      checks++;
      if (lat != 6) begin failures++; $display("latency %0d", lat); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
