// tb_trig_regs: exercises the register map through the local bus. It
// writes every configuration register with random values and checks both
// the read-back and the configuration structs handed to the logic (delay
// index order, sector bit order, MOR and multiplicity fields, L2 fields),
// checks the LUT write strobes and word addresses for all 25 tables, reads
// scalers, board ID, revision and scope words, and checks the reference
// scaler's 25 ns tick count and its clear on re-enable.
module tb_trig_regs;
  import trig_pkg::*;
  logic clk = 0;
  always #2.5 clk = ~clk;

  int checks = 0, failures = 0;
  logic rst, bus_we, bus_re, bus_rvalid;
  logic [15:0] bus_addr;
  logic [31:0] bus_wdata, bus_rdata, board_ids;
  sector_cfg_t sector_cfg [N_SECTORS];
  trig_cfg_t   trig_cfg [N_TRIG];
  common_cfg_t common_cfg;
  l2_cfg_t     l2_cfg;
  logic scaler_en, l2_lut_we, scope_arm, scope_rd;
  logic [N_TRIG-1:0] ecc_lut_we, ecp_lut_we;
  logic [8:0] lut_waddr;
  logic [31:0] lut_wdata, scope_rdata, scope_status;
  logic [31:0] scaler [N_SCALER_WORDS];
  logic [127:0] scope_value, scope_ignore;

  trig_regs dut (.*);

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(logic [15:0] a, logic [31:0] d);
    bus_addr = a; bus_wdata = d; bus_we = 1;
    @(negedge clk);
    bus_we = 0;
  endtask

  task automatic rd(logic [15:0] a, output logic [31:0] d);
    bus_addr = a; bus_re = 1;
    @(negedge clk);
    bus_re = 0;
    if (!bus_rvalid) begin failures++; $display("no rvalid"); end
    d = bus_rdata;
  endtask

  task automatic expect_rd(logic [15:0] a, logic [31:0] e);
    logic [31:0] d;
    rd(a, d);
    checks++;
    if (d !== e) begin
      failures++;
      if (failures < 8) $display("read %h = %h, expected %h", a, d, e);
    end
  endtask

  task automatic expect_eq(logic [31:0] got, logic [31:0] e, string what);
    checks++;
    if (got !== e) begin
      failures++;
      if (failures < 8) $display("%s = %h, expected %h", what, got, e);
    end
  endtask

  logic [4:0]  dly [N_INPUTS];
  logic [11:0] r12 [4];
  logic [5:0]  r6 [6];

  initial begin
    logic [31:0] d, v;
    bit seen;
    rst = 1; bus_we = 0; bus_re = 0; bus_addr = 0; bus_wdata = 0;
    board_ids = 32'h0000_0302; scope_rdata = 32'hA5A5_0001; scope_status = 32'h6;
    for (int i = 0; i < N_SCALER_WORDS; i++) scaler[i] = 32'h1000_0000 + 32'(i);
    repeat (3) @(negedge clk);
    rst = 0;
    // ---- delays ----
    for (int i = 0; i < N_INPUTS; i++) begin
      dly[i] = 5'($urandom);
      wr(A_DELAY_BASE + 16'(4 * i), {$urandom, 5'b0} | 32'(dly[i]));
    end
    for (int i = 0; i < N_INPUTS; i++) expect_rd(A_DELAY_BASE + 16'(4 * i), 32'(dly[i]));
    for (int s = 0; s < N_SECTORS; s++) begin
      for (int k2 = 0; k2 < 4; k2++) expect_eq(32'(sector_cfg[s].st_delay[k2]), 32'(dly[IDX_ST + 4*s + k2]), "st_delay");
      expect_eq(32'(sector_cfg[s].tof_delay),    32'(dly[2 + s]),  "tof_delay");
      expect_eq(32'(sector_cfg[s].ecinp_delay),  32'(dly[8 + s]),  "ecinp_delay");
      expect_eq(32'(sector_cfg[s].ecine_delay),  32'(dly[14 + s]), "ecine_delay");
      expect_eq(32'(sector_cfg[s].ectotp_delay), 32'(dly[20 + s]), "ectotp_delay");
      expect_eq(32'(sector_cfg[s].ectote_delay), 32'(dly[26 + s]), "ectote_delay");
      expect_eq(32'(sector_cfg[s].cc_delay),     32'(dly[32 + s]), "cc_delay");
    end
    expect_eq(32'(common_cfg.mora_delay), 32'(dly[0]), "mora_delay");
    expect_eq(32'(common_cfg.morb_delay), 32'(dly[1]), "morb_delay");
    // ---- persistence and prescale ----
    for (int t = 0; t < N_TRIG; t++) begin
      wr(A_PERSIST_BASE + 16'(4 * t), 32'(t % 8));
      wr(A_PRESCALE_BASE + 16'(4 * t), 32'(1000 + t));
    end
    for (int t = 0; t < N_TRIG; t++) begin
      expect_eq(32'(trig_cfg[t].persist), 32'(t % 8), "persist");
      expect_eq(32'(trig_cfg[t].prescale), 32'(1000 + t), "prescale");
      expect_rd(A_PRESCALE_BASE + 16'(4 * t), 32'(1000 + t));
    end
    // ---- sector registers: bit s -> sector s+1 ----
    for (int r = 0; r < 6; r++) begin
      r6[r] = 6'($urandom);
      wr(A_STOF_EN + 16'(4 * r), 32'(r6[r]));
    end
    for (int r = 0; r < 6; r++) expect_rd(A_STOF_EN + 16'(4 * r), 32'(r6[r]));
    for (int s = 0; s < N_SECTORS; s++) begin
      expect_eq(sector_cfg[s].stof_en, r6[0][s], "stof_en");
      expect_eq(sector_cfg[s].tof_dis, r6[1][s], "tof_dis");
      expect_eq(sector_cfg[s].sts_dis, r6[2][s], "sts_dis");
      expect_eq(sector_cfg[s].ece_dis, r6[3][s], "ece_dis");
      expect_eq(sector_cfg[s].cc_dis,  r6[4][s], "cc_dis");
      expect_eq(sector_cfg[s].ecc_en,  r6[5][s], "ecc_en");
    end
    // ---- MOR and multiplicity: bit t -> trigger t+1 ----
    for (int r = 0; r < 3; r++) begin r12[r] = 12'($urandom); wr(A_MORA_EN + 16'(4 * r), 32'(r12[r])); end
    r12[3] = 12'($urandom); wr(A_STMULT_DIS, 32'(r12[3]));
    wr(A_STMULT_THR, (32'd20 << 5) | 32'd3);
    for (int t = 0; t < N_TRIG; t++) begin
      expect_eq(trig_cfg[t].mora_en, r12[0][t], "mora_en");
      expect_eq(trig_cfg[t].morb_en, r12[1][t], "morb_en");
      expect_eq(trig_cfg[t].mor_dis, r12[2][t], "mor_dis");
      expect_eq(trig_cfg[t].stmult_dis, r12[3][t], "stmult_dis");
    end
    expect_eq(32'(common_cfg.stmult_min), 3, "stmult_min");
    expect_eq(32'(common_cfg.stmult_max), 20, "stmult_max");
    expect_rd(A_STMULT_THR, (32'd20 << 5) | 32'd3);
    // ---- level 2 ----
    wr(A_L2_SECLOGIC, 170); wr(A_L2_OUTDELAY, 1023); wr(A_L2_OUTWIDTH, 255);
    expect_eq(32'(l2_cfg.seclogic), 170, "seclogic");
    expect_eq(32'(l2_cfg.outdelay), 1023, "outdelay");
    expect_eq(32'(l2_cfg.outwidth), 255, "outwidth");
    expect_rd(A_L2_OUTDELAY, 1023);
    // ---- LUT strobes ----
    for (int t = 0; t < 25; t++) begin
      logic [15:0] base;
      int wmax, w;
      base = (t < 12) ? A_LUT_ECC_BASE + 16'(t * 'h200)
                        : (t < 24) ? A_LUT_ECP_BASE + 16'((t - 12) * 'h200) : A_LUT_L2_BASE;
      wmax = (t < 24) ? 128 : 512;
      w = $urandom % wmax;
      v = $urandom;
      bus_addr = base + 16'(4 * w); bus_wdata = v; bus_we = 1;
      #0.1;
      seen = (t < 12) ? (ecc_lut_we == 12'(1 << t)) && ecp_lut_we == 0 && !l2_lut_we
           : (t < 24) ? (ecp_lut_we == 12'(1 << (t - 12))) && ecc_lut_we == 0 && !l2_lut_we
           : l2_lut_we && ecc_lut_we == 0 && ecp_lut_we == 0;
      expect_eq(32'(seen), 1, "lut strobe");
      expect_eq(32'(lut_waddr), 32'(w), "lut word");
      expect_eq(lut_wdata, v, "lut data");
      @(negedge clk); bus_we = 0;
    end
    // ---- read-only words ----
    expect_rd(A_BOARDIDS, 32'h0000_0302);
    expect_rd(A_REVISION, 32'h0001_0310);
    expect_rd(16'h1000, 32'h1000_0000);
    expect_rd(16'h1098, 32'h1000_0000 + 'h98 / 4);                 // ST1
    expect_rd(16'h1268, 32'h1000_0000 + 'h268 / 4);                // STMULT
    expect_rd(A_TRIG_STATUS, 32'h6);
    // scope: arm strobe, reads of the FIFO port and the block window
    bus_addr = A_TRIG_STATUS; bus_wdata = 1; bus_we = 1; #0.1;
    expect_eq(32'(scope_arm), 1, "scope_arm");
    @(negedge clk); bus_we = 0;
    bus_addr = A_TRIG_BUFFER; bus_re = 1; #0.1;
    expect_eq(32'(scope_rd), 1, "scope_rd");
    @(negedge clk); bus_re = 0;
    expect_eq(bus_rdata, 32'hA5A5_0001, "scope word");
    expect_rd(16'h0040, 32'hA5A5_0001);
    wr(A_TRIG_VALUE3, 32'hDEAD_BEEF); wr(16'h3010, 32'h1234_5678);
    wr(16'h3020, 32'h0000_FFFF);
    expect_eq(scope_value[127:96], 32'hDEAD_BEEF, "value3");
    expect_eq(scope_value[31:0], 32'h1234_5678, "value0");
    expect_eq(scope_ignore[31:0], 32'h0000_FFFF, "ignore0");
    // ---- reference scaler: 25 ns ticks ----
    wr(A_ENABLE_SCALERS, 1);
    expect_eq(32'(scaler_en), 1, "scaler_en");
    repeat (500) @(negedge clk);
    wr(A_ENABLE_SCALERS, 0);
    repeat (50) @(negedge clk);
    expect_rd(16'h1260, 32'd100);
    wr(A_ENABLE_SCALERS, 1);
    repeat (3) @(negedge clk);
    rd(16'h1260, d);
    checks++;
    if (d > 1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
