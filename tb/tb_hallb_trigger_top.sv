// tb_hallb_trigger_top: end-to-end test of the whole trigger module at its
// default parameters, configured only through the register bus.
// The test loads all 24 trigger LUTs and the L2 LUT with tables computed
// here, sets random input delays and applies isolated detector events: each
// input of an event is presented early by (largest delay - its own delay),
// so all inputs meet after the delay lines only if every delay works. For
// each event a model computes the sector signals, LUT decisions, MOR and ST
// multiplicity gates, persistence and prescale of all 12 trigger bits and
// the ten level-2 bits, and every output is compared cycle by cycle over the
// event window. Two phases use different sector modes (a mode switch), the
// second with a long level-2 delay and persistence. The scope is armed on
// TRIG1 and its record checked for deskew, and scalers are read at the end.
// Each mechanism is counted and must occur at least once.
module tb_hallb_trigger_top;
  import trig_pkg::*;
  logic clk = 0;
  always #2.5 clk = ~clk;

  int checks = 0, failures = 0;
  logic rst;
  logic [N_ST-1:0] st;
  logic [5:0] tof, ecinp, ectotp, ecine, ectote, cc;
  logic mora, morb;
  logic [N_TRIG-1:0] trigger_n;
  logic [9:0] l2latch_bits;
  logic bus_we, bus_re, bus_rvalid;
  logic [15:0] bus_addr;
  logic [31:0] bus_wdata, bus_rdata, board_ids;

  hallb_trigger_top dut (.*);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- bus helpers ----------------
  task automatic wr(logic [15:0] a, logic [31:0] d);
    bus_addr = a; bus_wdata = d; bus_we = 1;
    @(negedge clk);
    bus_we = 0;
  endtask
  task automatic rd(logic [15:0] a, output logic [31:0] d);
    bus_addr = a; bus_re = 1;
    @(negedge clk);
    bus_re = 0;
    d = bus_rdata;
  endtask

  // ---------------- configuration kept by the test ----------------
  int   dly [N_INPUTS];
  int   pers [N_TRIG], presc [N_TRIG];
  logic mora_en [N_TRIG], morb_en [N_TRIG], mor_dis [N_TRIG], mult_dis [N_TRIG];
  int   mult_min = 2, mult_max = 4;
  int   l2d, l2p;
  logic tof_dis, ece_dis;          // same for all sectors
  int   pcount [N_TRIG];
  int   n_hit [N_TRIG], n_fire [N_TRIG], n_stof [6], n_st [N_ST];

  // mechanism counters
  int m_delay, m_mor_block, m_mor_pass, m_mult_block, m_mult_pass, m_presc_drop,
      m_presc_fire, m_disabled, m_persist, m_l2trg, m_l2sec, m_scope, m_mode_switch,
      m_l2_long;

  // LUT contents as functions of the 12-bit address
  function automatic logic ecp_lut(int t, logic [11:0] a);
    case (t)
      0:       return |(a[5:0] & a[11:6]);  // STOF and ECP in one sector
      3, 4:    return |a[11:6];             // any ECP
      default: return 1'b0;
    endcase
  endfunction
  function automatic logic ecc_lut(int t, logic [11:0] a);
    case (t)
      1, 2:    return |(a[5:0] & a[11:6]);  // STOF and ECC in one sector
      0, 3, 4: return 1'b0;
      default: return $countones(a[5:0]) >= 2;   // two STOF sectors
    endcase
  endfunction
  function automatic logic [3:0] l2_lut(logic [11:0] a);
    return {|a[11:5], a[3], a[1] & a[2], a[0]};
  endfunction

  // ---------------- one event ----------------
  logic [N_INPUTS-1:0] ev;
  int   W;
  logic [5:0] s_stof, s_ecp, s_ecc;
  logic fires [N_TRIG];
  int   scope_k = -1;      // event window index where the scope trigger fired
  logic [N_ST-1:0] scope_st;
  logic [5:0] scope_stof;
  bit   scope_armed = 0;

  function automatic logic trigw(int t, int k);
    return fires[t] && k >= 8 && k < 8 + W + pers[t];
  endfunction
  function automatic logic secw(int k);
    return k >= 2 && k < 2 + W;
  endfunction

  task automatic apply_event();
    int dmax = 0, e_ofs;
    logic [N_ST-1:0] stv;
    logic [5:0] sts;
    logic [N_TRIG-1:0] tn_got [1400];
    logic [9:0] l2_got [1400];
    int win;
    for (int i = 0; i < N_INPUTS; i++) if (ev[i] && dly[i] > dmax) dmax = dly[i];
    for (int i = 0; i < N_INPUTS; i++) if (ev[i] && dly[i] != dmax) begin m_delay++; break; end
    // model: sector signals
    stv = ev[IDX_ST +: N_ST];
    for (int s = 0; s < 6; s++) begin
      sts[s]    = |stv[4*s +: 4];
      s_stof[s] = sts[s] & (ev[IDX_TOF + s] | tof_dis);
      s_ecp[s]  = ev[IDX_ECINP + s] & ev[IDX_ECTOTP + s];
      s_ecc[s]  = ((ev[IDX_ECINE + s] & ev[IDX_ECTOTE + s]) | ece_dis) & ev[IDX_CC + s];
      if (s_stof[s]) n_stof[s]++;
    end
    for (int i = 0; i < N_ST; i++) if (stv[i]) n_st[i]++;
    // model: trigger bits
    for (int t = 0; t < N_TRIG; t++) begin
      logic hit, mor, mult, pass;
      int n;
      hit  = ecp_lut(t, {s_ecp, s_stof}) | ecc_lut(t, {s_ecc, s_stof});
      mor  = (mora_en[t] & ev[IDX_MORA]) | (morb_en[t] & ev[IDX_MORB]) | mor_dis[t];
      n    = $countones(stv);
      mult = (n >= mult_min && n <= mult_max) || mult_dis[t];
      pass = hit & mor & mult;
      if (hit) n_hit[t]++;
      if (hit && !mor) m_mor_block++;
      if (hit && mor && !mor_dis[t]) m_mor_pass++;
      if (hit && mor && !mult) m_mult_block++;
      if (hit && mor && mult && !mult_dis[t]) m_mult_pass++;
      fires[t] = 0;
      if (pass) begin
        if (presc[t] == 0) m_disabled++;
        else if (++pcount[t] >= presc[t]) begin
          pcount[t] = 0; fires[t] = 1; n_fire[t]++;
          if (presc[t] > 1) m_presc_fire++;
          if (pers[t] > 0) m_persist++;
        end else m_presc_drop++;
      end
    end
    // drive: input i is high for W cycles starting dmax - dly[i] edges
    // after the first one, so all meet at edge index e_ofs = dmax
    e_ofs = dmax;
    win = dmax + 30 + W + 7 + l2d + l2p;
    for (int c = 0; c < win; c++) begin
      logic [N_INPUTS-1:0] v;
      for (int i = 0; i < N_INPUTS; i++)
        v[i] = ev[i] && c >= dmax - dly[i] && c < dmax - dly[i] + W;
      mora = v[IDX_MORA]; morb = v[IDX_MORB];
      tof = v[IDX_TOF +: 6]; ecinp = v[IDX_ECINP +: 6]; ecine = v[IDX_ECINE +: 6];
      ectotp = v[IDX_ECTOTP +: 6]; ectote = v[IDX_ECTOTE +: 6]; cc = v[IDX_CC +: 6];
      st = v[IDX_ST +: N_ST];
      @(posedge clk);
      #0.1;
      tn_got[c] = trigger_n;
      l2_got[c] = l2latch_bits;
      if (scope_armed && scope_k < 0 && dut.u_scope.triggered) begin
        scope_k = c - e_ofs; scope_st = stv; scope_stof = s_stof;
      end
      @(negedge clk);
    end
    // compare every cycle of the window (k = edge index relative to e)
    for (int c = 0; c < win; c++) begin
      int k = c - e_ofs;
      logic [N_TRIG-1:0] tn_exp;
      logic [9:0] l2_exp;
      logic [N_TRIG-1:0] th;
      logic [17:0] sh;
      for (int t = 0; t < N_TRIG; t++) tn_exp[t] = !trigw(t, k - 1);
      th = '0; sh = '0;
      for (int j = 0; j <= l2p; j++) begin
        for (int t = 0; t < N_TRIG; t++) th[t] |= trigw(t, k - 6 - l2d - j);
        if (secw(k - 6 - l2d - j)) sh |= {s_ecc, s_ecp, s_stof};
      end
      l2_exp[9:6] = l2_lut(th);
      for (int s = 0; s < 6; s++) l2_exp[s] = sh[s];      // L2SEC = 170: STOF
      checks += 2;
      if (tn_got[c] !== tn_exp) begin
        failures++;
        if (failures < 8) $display("k=%0d trigger_n=%b exp=%b", k, tn_got[c], tn_exp);
      end
      if (l2_got[c] !== l2_exp) begin
        failures++;
        if (failures < 8) $display("k=%0d l2=%b exp=%b", k, l2_got[c], l2_exp);
      end
      if (l2_exp[9:6] != 0 && k == 14 + l2d) m_l2trg++;
      if (l2_exp[5:0] != 0 && k == 8 + l2d) m_l2sec++;
      if (l2_exp != 0 && l2d > 50) m_l2_long++;
    end
  endtask

  task automatic random_event();
    ev = '0;
    W = 1 + $urandom % 4;
    for (int n = 0; n < 1 + $urandom % 3; n++) begin
      int s = $urandom % 6;
      for (int k = 0; k < 4; k++) ev[IDX_ST + 4*s + k] = ($urandom % 3) == 0;
      ev[IDX_TOF + s]    = ($urandom % 4) != 0;
      ev[IDX_ECINP + s]  = ($urandom % 4) != 0;
      ev[IDX_ECTOTP + s] = ($urandom % 4) != 0;
      ev[IDX_ECINE + s]  = ($urandom % 4) != 0;
      ev[IDX_ECTOTE + s] = ($urandom % 4) != 0;
      ev[IDX_CC + s]     = ($urandom % 4) != 0;
    end
    ev[IDX_MORA] = $urandom % 2;
    ev[IDX_MORB] = $urandom % 2;
  endtask

  // ---------------- main sequence ----------------
  initial begin
    logic [31:0] d;
    rst = 1; {st, tof, ecinp, ectotp, ecine, ectote, cc, mora, morb} = '0;
    bus_we = 0; bus_re = 0; bus_addr = 0; bus_wdata = 0; board_ids = 32'h0000_0302;
    {m_delay, m_mor_block, m_mor_pass, m_mult_block, m_mult_pass, m_presc_drop,
     m_presc_fire, m_disabled, m_persist, m_l2trg, m_l2sec, m_scope, m_mode_switch,
     m_l2_long} = '0;
    repeat (5) @(negedge clk);
    rst = 0;
    repeat (40) @(negedge clk);      // flush the delay lines
    rd(A_REVISION, d);
    checks++;
    if (d != 32'h0001_0310) failures++;
    // ---- LUTs ----
    for (int t = 0; t < N_TRIG; t++)
      for (int w = 0; w < 128; w++) begin
        logic [31:0] vp, vc;
        for (int b = 0; b < 32; b++) begin
          vp[b] = ecp_lut(t, 12'(w * 32 + b));
          vc[b] = ecc_lut(t, 12'(w * 32 + b));
        end
        wr(A_LUT_ECP_BASE + 16'(t * 'h200 + 4 * w), vp);
        wr(A_LUT_ECC_BASE + 16'(t * 'h200 + 4 * w), vc);
      end
    for (int w = 0; w < 512; w++) begin
      logic [31:0] v;
      for (int b = 0; b < 8; b++) v[4*b +: 4] = l2_lut(12'(w * 8 + b));
      wr(A_LUT_L2_BASE + 16'(4 * w), v);
    end
    // ---- trigger bits ----
    for (int t = 0; t < N_TRIG; t++) begin
      pers[t] = (t >= 5) ? t % 8 : 0;
      presc[t] = 1;
      {mora_en[t], morb_en[t], mor_dis[t], mult_dis[t]} = 4'b0011;
      pcount[t] = 0; n_hit[t] = 0; n_fire[t] = 0;
    end
    mora_en[1] = 1; mor_dis[1] = 0;                   // TRIG2 needs MORA
    mult_dis[2] = 0;                                  // TRIG3 needs ST multiplicity
    morb_en[3] = 1; mor_dis[3] = 0; presc[3] = 3; pers[3] = 7;  // TRIG4
    presc[4] = 0;                                     // TRIG5 disabled
    for (int t = 0; t < N_TRIG; t++) begin
      wr(A_PERSIST_BASE + 16'(4 * t), 32'(pers[t]));
      wr(A_PRESCALE_BASE + 16'(4 * t), 32'(presc[t]));
    end
    wr(A_MORA_EN, 32'(12'b0000_0000_0010));
    wr(A_MORB_EN, 32'(12'b0000_0000_1000));
    begin
      logic [11:0] md, sd;
      md = '1; sd = '1;
      md[1] = 0; md[3] = 0; sd[2] = 0;
      wr(A_MOR_DIS, 32'(md));
      wr(A_STMULT_DIS, 32'(sd));
    end
    wr(A_STMULT_THR, 32'((mult_max << 5) | mult_min));
    // ---- delays ----
    for (int i = 0; i < N_INPUTS; i++) begin
      dly[i] = $urandom % 32;
      wr(A_DELAY_BASE + 16'(4 * i), 32'(dly[i]));
    end
    // ---- sectors: STOF = STS and TOF, ECC = ECE and CC ----
    tof_dis = 0; ece_dis = 0;
    wr(A_STOF_EN, 6'h3F); wr(A_TOF_DIS, 0); wr(A_STS_DIS, 0);
    wr(A_ECE_DIS, 0); wr(A_CC_DIS, 0); wr(A_ECC_EN, 6'h3F);
    // ---- level 2: minimum delay, no persistence, L2SEC = STOF ----
    l2d = 2; l2p = 0;
    wr(A_L2_SECLOGIC, 170); wr(A_L2_OUTDELAY, 0); wr(A_L2_OUTWIDTH, 0);
    for (int s = 0; s < 6; s++) n_stof[s] = 0;
    for (int i = 0; i < N_ST; i++) n_st[i] = 0;
    wr(A_ENABLE_SCALERS, 1);
    repeat (40) @(negedge clk);

    // ---- phase A ----
    for (int n = 0; n < 60; n++) begin
      if (n == 10) begin
        // scope: trigger on TRIG1 (bit 81) = 1, everything else ignored
        logic [127:0] val, ign;
        val = '0; ign = '1;
        val[81] = 1; ign[81] = 0;
        for (int w = 0; w < 4; w++) begin
          wr(A_TRIG_VALUE3 + 16'(4 * w), val[(3 - w) * 32 +: 32]);
          wr(A_TRIG_IGNORE3 + 16'(4 * w), ign[(3 - w) * 32 +: 32]);
        end
        wr(A_TRIG_STATUS, 1);
        repeat (70) @(negedge clk);
        scope_armed = 1;
      end
      random_event();
      apply_event();
      repeat (10) @(negedge clk);
    end
    // ---- scope readout ----
    rd(A_TRIG_STATUS, d);
    checks++;
    if (d[2:1] != 2'b11 || scope_k < 0) begin
      failures++; $display("scope did not trigger: status %h", d);
    end else begin
      logic [127:0] smp [121];
      for (int s = 0; s < 121; s++)
        for (int w = 0; w < 4; w++) begin
          rd(A_TRIG_BUFFER, d);
          smp[s][w*32 +: 32] = d;
        end
      checks += 4;
      if (smp[60][81] !== 1'b1) failures++;
      if (smp[59][81] !== 1'b0) failures++;
      // deskew: the ST and STOF bits that made TRIG1 are in the same column
      if (smp[60][23:0] !== scope_st) begin failures++; $display("scope ST %h exp %h", smp[60][23:0], scope_st); end
      if (smp[60][67:62] !== scope_stof) begin failures++; $display("scope STOF %b exp %b", smp[60][67:62], scope_stof); end
      m_scope++;
    end

    // ---- phase B: mode switch (STOF = STS, ECC = CC), long L2 delay ----
    tof_dis = 1; ece_dis = 1;
    wr(A_TOF_DIS, 6'h3F); wr(A_ECE_DIS, 6'h3F);
    l2d = 200; l2p = 20;
    wr(A_L2_OUTDELAY, 200); wr(A_L2_OUTWIDTH, 20);
    repeat (300) @(negedge clk);
    m_mode_switch++;
    for (int n = 0; n < 40; n++) begin
      random_event();
      apply_event();
      repeat (10) @(negedge clk);
    end

    // ---- scalers (frozen for readout) ----
    wr(A_ENABLE_SCALERS, 0);
    for (int s = 0; s < 6; s++) begin
      rd(A_SCALER_BASE + 16'(4 * (SIDX_STOF + s)), d);
      checks++;
      if (d != 32'(n_stof[s])) begin failures++; $display("STOF%0d scaler %0d exp %0d", s + 1, d, n_stof[s]); end
    end
    for (int i = 0; i < N_ST; i++) begin
      rd(A_SCALER_BASE + 16'(4 * (IDX_ST + i)), d);
      checks++;
      if (d != 32'(n_st[i])) begin failures++; $display("ST%0d scaler %0d exp %0d", i + 1, d, n_st[i]); end
    end
    for (int t = 0; t < N_TRIG; t++) begin
      rd(A_SCALER_BASE + 16'(4 * (SIDX_PRESCALE + t)), d);
      checks++;
      if (d != 32'(n_fire[t])) begin failures++; $display("TRIG%0d scaler %0d exp %0d", t + 1, d, n_fire[t]); end
      rd(A_SCALER_BASE + 16'(4 * (SIDX_LUT + t)), d);
      checks++;
      if (d != 32'(n_hit[t])) begin failures++; $display("LUT%0d scaler %0d exp %0d", t + 1, d, n_hit[t]); end
    end

    $display("mechanisms: delay=%0d mor_block=%0d mor_pass=%0d mult_block=%0d mult_pass=%0d",
             m_delay, m_mor_block, m_mor_pass, m_mult_block, m_mult_pass);
    $display("  presc_drop=%0d presc_fire=%0d disabled=%0d persist=%0d l2trg=%0d l2sec=%0d",
             m_presc_drop, m_presc_fire, m_disabled, m_persist, m_l2trg, m_l2sec);
    $display("  l2_long=%0d scope=%0d mode_switch=%0d", m_l2_long, m_scope, m_mode_switch);
    foreach (n_fire[t]) $display("  TRIG%0d: %0d LUT hits, %0d triggers", t + 1, n_hit[t], n_fire[t]);
    begin
      int m [14];
      m = '{m_delay, m_mor_block, m_mor_pass, m_mult_block, m_mult_pass, m_presc_drop,
                     m_presc_fire, m_disabled, m_persist, m_l2trg, m_l2sec, m_scope,
                     m_mode_switch, m_l2_long};
      foreach (m[i]) begin
        checks++;
        if (m[i] == 0) begin failures++; $display("mechanism %0d never happened", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
