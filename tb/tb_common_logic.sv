// tb_common_logic: random start-counter patterns of varying density and
// random MORA/MORB pulses with random delays and multiplicity windows.
// The model counts the set ST bits itself and checks ST_MULT (min <= count
// <= max) LAT_STMULT cycles after the ST pattern leaves the delay lines, and
// MORA/MORB LAT_MOR cycles after their own delay lines. Scalers are checked
// at the end of each phase against edge counts of the model signals.
module tb_common_logic;
  import trig_pkg::*;
  logic clk = 0;
  always #2.5 clk = ~clk;

  int checks = 0, failures = 0;
  logic rst, scaler_en, mora, morb;
  common_cfg_t cfg;
  logic [N_ST-1:0] st_dly;
  logic mora_dly, morb_dly, mora_al, morb_al, stmult_al;
  logic [31:0] mora_count, morb_count, morab_count, stmult_count;

  common_logic dut (.*);

  localparam int T = 12 * 400 + 200;
  logic [N_ST-1:0] hs [T];
  logic ha [T], hb [T];
  int hits_in_window = 0, hits_outside = 0;

  initial begin
    repeat (T + 2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit win(logic [N_ST-1:0] v);
    int n = $countones(v);
    return n >= int'(cfg.stmult_min) && n <= int'(cfg.stmult_max);
  endfunction

  initial begin
    int k, k0, sa, sb, dens;
    logic ma, mb, mm, p_a, p_b, p_ab, p_m;
    int c_a, c_b, c_ab, c_m;
    rst = 1; scaler_en = 0; cfg = '0; st_dly = '0; mora = 0; morb = 0;
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (40) @(negedge clk);   // flush the delay lines
    // history before the first phase is quiet
    for (int i = 0; i < 100; i++) begin hs[i] = '0; ha[i] = 0; hb[i] = 0; end
    k = 100;
    for (int ph = 0; ph < 12; ph++) begin
      cfg.mora_delay = 5'($urandom); cfg.morb_delay = 5'($urandom);
      if (ph == 0) begin cfg.mora_delay = 0; cfg.morb_delay = 31; end
      cfg.stmult_min = 5'(1 + $urandom % 8);
      cfg.stmult_max = cfg.stmult_min + 5'($urandom % 10);
      sa = cfg.mora_delay; sb = cfg.morb_delay;
      dens = 2 + ph % 6;
      scaler_en = 0;
      @(negedge clk);
      scaler_en = 1;
      k0 = k;
      {c_a, c_b, c_ab, c_m} = '0;
      {p_a, p_b, p_ab, p_m} = '0;
      for (int c = 0; c < 400; c++) begin
        st_dly = '0; mora = 0; morb = 0;
        if (c > 2 && c < 300) begin
          for (int i = 0; i < N_ST; i++) st_dly[i] = ($urandom % dens) == 0;
          mora = ($urandom % 3) == 0;
          morb = ($urandom % 3) == 0;
        end
        @(posedge clk);
        hs[k] = st_dly; ha[k] = mora; hb[k] = morb;
        #0.1;
        if (k - k0 > 40) begin
          mm = win(hs[k - LAT_STMULT + 1]);
          ma = ha[k - LAT_MOR - sa];
          mb = hb[k - LAT_MOR - sb];
          checks += 3;
          if (stmult_al !== mm) begin
            failures++;
            if (failures < 5) $display("ph=%0d c=%0d stmult=%b exp=%b", ph, c, stmult_al, mm);
          end
          if (mora_al !== ma) begin failures++; $display("ph=%0d c=%0d mora_al", ph, c); end
          if (morb_al !== mb) begin failures++; $display("ph=%0d c=%0d morb_al", ph, c); end
          if (mm) hits_in_window++; else if ($countones(hs[k - LAT_STMULT + 1]) != 0) hits_outside++;
        end
        if (k - k0 >= 2) begin
          // scaler views: delay-line outputs and the registered OR / window
          ma = ha[k - 1 - sa]; mb = hb[k - 1 - sb];
          mm = win(hs[k - 1]);
          if (ma && !p_a) c_a++;  p_a = ma;
          if (mb && !p_b) c_b++;  p_b = mb;
          if ((ha[k-2-sa] | hb[k-2-sb]) && !p_ab) c_ab++; p_ab = ha[k-2-sa] | hb[k-2-sb];
          if (mm && !p_m) c_m++;  p_m = mm;
        end
        k++;
        @(negedge clk);
      end
      checks += 4;
      if (mora_count != 32'(c_a)) begin failures++; $display("mora_count %0d %0d", mora_count, c_a); end
      if (morb_count != 32'(c_b)) begin failures++; $display("morb_count %0d %0d", morb_count, c_b); end
      if (morab_count != 32'(c_ab)) begin failures++; $display("ph=%0d sa=%0d sb=%0d morab_count %0d %0d", ph, sa, sb, morab_count, c_ab); end
      if (stmult_count != 32'(c_m)) begin failures++; $display("stmult_count %0d %0d", stmult_count, c_m); end
    end
    checks++;
    if (hits_in_window == 0 || hits_outside == 0) failures++;
    $display("window hits %0d, outside %0d", hits_in_window, hits_outside);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
