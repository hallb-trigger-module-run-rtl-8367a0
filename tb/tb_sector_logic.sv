// tb_sector_logic: one sector driven with random detector pulses under
// every combination of the six mode bits and random input delays. The
// reference model delays each recorded input by (its setting + 1) cycles,
// applies the STOF/ECC equations of the register description and expects
// the outputs LAT_SECTOR cycles later. Each phase starts and ends with the
// inputs quiet so that scalers can be checked as counts of rising edges of
// the model's signals.
module tb_sector_logic;
  import trig_pkg::*;
  logic clk = 0;
  always #2.5 clk = ~clk;

  int checks = 0, failures = 0;
  logic rst, scaler_en;
  sector_cfg_t cfg;
  logic [3:0] st, st_dly;
  logic tof, ecinp, ectotp, ecine, ectote, cc;
  logic stof, ecp, ecc;
  logic [5:0] in_dly;
  logic [31:0] in_count [10];
  logic [31:0] sts_count, ecp_count, ece_count;
  logic [15:0] stof_count, ecc_count;

  sector_logic dut (.*);

  localparam int T = 16 * 300 + 100;
  logic [9:0] h [T];         // inputs sampled at each edge
  int sel [10];

  initial begin
    repeat (T + 2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic dl(int i, int k);   // delayed input i after edge k
    return (k - sel[i] >= 0) ? h[k - sel[i]][i] : 1'b0;
  endfunction

  initial begin
    int k, ph_start;
    logic sts_m, ece_m, ecp_m, stof_m, ecc_m;
    int c_in [10], c_sts, c_ecp, c_ece, c_stof, c_ecc;
    logic p_in [10], p_sts, p_ecp, p_ece, p_stof, p_ecc;
    logic [9:0] v;
    rst = 1; scaler_en = 0; cfg = '0;
    {st, tof, ecinp, ectotp, ecine, ectote, cc} = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    k = 0;
    for (int ph = 0; ph < 16; ph++) begin
      // new configuration, inputs quiet
      cfg = '0;
      for (int i = 0; i < 4; i++) cfg.st_delay[i] = 5'($urandom);
      cfg.tof_delay = 5'($urandom);   cfg.ecinp_delay = 5'($urandom);
      cfg.ectotp_delay = 5'($urandom); cfg.ecine_delay = 5'($urandom);
      cfg.ectote_delay = 5'($urandom); cfg.cc_delay = 5'($urandom);
      if (ph == 0) cfg = '0;
      {cfg.stof_en, cfg.tof_dis, cfg.sts_dis} = 3'(ph);
      {cfg.ecc_en, cfg.ece_dis, cfg.cc_dis}   = 3'(ph >> 1) ^ 3'(ph);
      for (int i = 0; i < 4; i++) sel[i] = cfg.st_delay[i];
      sel[4] = cfg.tof_delay; sel[5] = cfg.ecinp_delay; sel[6] = cfg.ectotp_delay;
      sel[7] = cfg.ecine_delay; sel[8] = cfg.ectote_delay; sel[9] = cfg.cc_delay;
      scaler_en = 0;
      @(negedge clk);
      scaler_en = 1;
      ph_start = k;
      for (int i = 0; i < 10; i++) begin c_in[i] = 0; p_in[i] = 0; end
      {c_sts, c_ecp, c_ece, c_stof, c_ecc} = '0;
      {p_sts, p_ecp, p_ece} = '0;
      p_stof = stof;   // a constant mode output is already high
      p_ecc  = ecc;
      for (int c = 0; c < 300; c++) begin
        v = '0;
        if (c > 2 && c < 220)
          for (int i = 0; i < 10; i++) v[i] = ($urandom % 3) != 0;
        {cc, ectote, ecine, ectotp, ecinp, tof, st} = v;
        @(posedge clk);
        h[k] = v;
        #0.1;
        // outputs after edge k come from delay outputs after edge k-2
        if (k - ph_start >= 2) begin
          sts_m  = dl(0, k-2) | dl(1, k-2) | dl(2, k-2) | dl(3, k-2);
          ecp_m  = dl(5, k-2) & dl(6, k-2);
          ece_m  = dl(7, k-2) & dl(8, k-2);
          stof_m = (sts_m | cfg.sts_dis) & (dl(4, k-2) | cfg.tof_dis) & cfg.stof_en;
          ecc_m  = (ece_m | cfg.ece_dis) & (dl(9, k-2) | cfg.cc_dis) & cfg.ecc_en;
          checks += 3;
          if (stof !== stof_m) failures++;
          if (ecp  !== ecp_m)  failures++;
          if (ecc  !== ecc_m)  failures++;
          if (stof !== stof_m || ecc !== ecc_m || ecp !== ecp_m)
            if (failures < 6) $display("ph=%0d c=%0d stof=%b/%b ecp=%b/%b ecc=%b/%b",
                                       ph, c, stof, stof_m, ecp, ecp_m, ecc, ecc_m);
          // edge counts of the model signals
          for (int i = 0; i < 10; i++) begin
            if (dl(i, k-2) && !p_in[i]) c_in[i]++;
            p_in[i] = dl(i, k-2);
          end
          if (sts_m && !p_sts) c_sts++;   p_sts = sts_m;
          if (ecp_m && !p_ecp) c_ecp++;   p_ecp = ecp_m;
          if (ece_m && !p_ece) c_ece++;   p_ece = ece_m;
          if (stof_m && !p_stof) c_stof++; p_stof = stof_m;
          if (ecc_m && !p_ecc) c_ecc++;   p_ecc = ecc_m;
        end
        k++;
        @(negedge clk);
      end
      // inputs have been quiet for 80 cycles: compare the scalers
      for (int i = 0; i < 10; i++) begin
        checks++;
        if (in_count[i] != 32'(c_in[i])) begin
          failures++; $display("ph=%0d in_count[%0d]=%0d model=%0d", ph, i, in_count[i], c_in[i]);
        end
      end
      checks += 5;
      if (sts_count != 32'(c_sts)) failures++;
      if (ecp_count != 32'(c_ecp)) failures++;
      if (ece_count != 32'(c_ece)) failures++;
      if (stof_count != 16'(c_stof)) begin failures++; $display("stof_count %0d %0d", stof_count, c_stof); end
      if (ecc_count != 16'(c_ecc)) failures++;
    end
    // zero-delay latency: a single TOF pulse with STOF mode = TOF reaches
    // STOF 3 clock edges after it is presented (sample, stage A, stage B)
    cfg = '0; cfg.stof_en = 1; cfg.sts_dis = 1;
    repeat (40) @(negedge clk);
    tof = 1; @(negedge clk); tof = 0;
    begin
      int lat = 1;
      while (!stof && lat < 10) begin @(negedge clk); lat++; end
      checks++;
      if (lat != 3) begin failures++; $display("latency %0d", lat); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
