// tb_latency_paths: measures the board's delay-path table on the complete
// trigger module at its default parameters.
// For every input class of every sector (each of the four ST paddles, TOF,
// ECinP, ECtotP, ECinE, ECtotE, CC) and for MORA and MORB, the test sets the
// sector modes and trigger-1 LUTs through the register bus so that trigger 1
// depends on that one input, holds the other inputs of the equation high,
// and raises the input just after a clock edge. It counts clock edges until
// TRIGGER1 goes active (low), and then until level-2 latch bit 6 (set by the
// L2TRG LUT for TRIGGER1 alone) rises. All programmable delays stay at their
// minimum: 0 for the inputs and 2 (10 ns) for the level-2 delay.
// Expected, for this design: 10 clocks (50 ns) from every input to TRIGGER
// and 7 clocks (35 ns) from TRIGGER to the level-2 bits. The board's nominal
// table gives 52 ns (59 ns for TOF) and 35 ns; the test prints both. It also
// checks that each output returns to idle when the input falls.
module tb_latency_paths;
  import trig_pkg::*;
  logic clk = 0;
  always #2.5 clk = ~clk;

  localparam int EXP_TRIG = 10;   // clocks, input pin to TRIGGER pin
  localparam int EXP_L2   = 7;    // clocks, TRIGGER pin to L2 latch pin

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
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(logic [15:0] a, logic [31:0] d);
    bus_addr = a; bus_wdata = d; bus_we = 1;
    @(negedge clk);
    bus_we = 0;
  endtask

  // LUT kinds for trigger 1: sector s alone, or sector s with its ECP/ECC
  typedef enum int {L_ZERO, L_STOF, L_STOF_AND_HI} lut_kind_e;

  function automatic logic lut_bit(lut_kind_e k, int s, int a);
    case (k)
      L_STOF:        return a[s];
      L_STOF_AND_HI: return a[s] && a[s + 6];
      default:       return 1'b0;
    endcase
  endfunction

  task automatic load_lut(logic [15:0] base, lut_kind_e k, int s);
    for (int w = 0; w < 128; w++) begin
      logic [31:0] d;
      for (int b = 0; b < 32; b++) d[b] = lut_bit(k, s, 32 * w + b);
      wr(base + 16'(4 * w), d);
    end
  endtask

  task automatic all_low();
    st = '0; tof = '0; ecinp = '0; ectotp = '0; ecine = '0; ectote = '0;
    cc = '0; mora = 0; morb = 0;
  endtask

  // path classes; the input under test is named by (class, sector, paddle)
  typedef enum int {P_ST, P_TOF, P_ECINP, P_ECTOTP, P_ECINE, P_ECTOTE, P_CC,
                    P_MORA, P_MORB} path_e;

  task automatic set_input(path_e p, int s, int k, logic v);
    case (p)
      P_ST:     st[4 * s + k] = v;
      P_TOF:    tof[s]    = v;
      P_ECINP:  ecinp[s]  = v;
      P_ECTOTP: ectotp[s] = v;
      P_ECINE:  ecine[s]  = v;
      P_ECTOTE: ectote[s] = v;
      P_CC:     cc[s]     = v;
      P_MORA:   mora      = v;
      P_MORB:   morb      = v;
      default: ;
    endcase
  endtask

  int n_meas [path_e];
  int worst_trig, best_trig;

  // configure for path p of sector s, hold the partner inputs high
  task automatic setup(path_e p, int s);
    logic [5:0] m = 6'(1 << s);
    all_low();
    wr(A_MOR_DIS, 32'h1);
    wr(A_MORA_EN, 32'h0);
    wr(A_MORB_EN, 32'h0);
    case (p)
      P_ST, P_TOF: begin                       // STOF mode AND
        wr(A_STOF_EN, 32'(m)); wr(A_STS_DIS, 0); wr(A_TOF_DIS, 0);
        wr(A_ECC_EN, 0);
        load_lut(A_LUT_ECP_BASE, L_STOF, s);
        load_lut(A_LUT_ECC_BASE, L_ZERO, s);
        if (p == P_ST) tof[s] = 1; else st[4 * s] = 1;
      end
      P_ECINP, P_ECTOTP: begin                 // STOF mode 1, ECP LUT
        wr(A_STOF_EN, 32'(m)); wr(A_STS_DIS, 32'(m)); wr(A_TOF_DIS, 32'(m));
        wr(A_ECC_EN, 0);
        load_lut(A_LUT_ECP_BASE, L_STOF_AND_HI, s);
        load_lut(A_LUT_ECC_BASE, L_ZERO, s);
        if (p == P_ECINP) ectotp[s] = 1; else ecinp[s] = 1;
      end
      P_ECINE, P_ECTOTE, P_CC: begin           // STOF mode 1, ECC mode AND
        wr(A_STOF_EN, 32'(m)); wr(A_STS_DIS, 32'(m)); wr(A_TOF_DIS, 32'(m));
        wr(A_ECC_EN, 32'(m)); wr(A_ECE_DIS, 0); wr(A_CC_DIS, 0);
        load_lut(A_LUT_ECP_BASE, L_ZERO, s);
        load_lut(A_LUT_ECC_BASE, L_STOF_AND_HI, s);
        ecine[s] = 1; ectote[s] = 1; cc[s] = 1;
        set_input(p, s, 0, 0);
      end
      P_MORA, P_MORB: begin                    // STOF mode 1, MOR required
        wr(A_STOF_EN, 32'(m)); wr(A_STS_DIS, 32'(m)); wr(A_TOF_DIS, 32'(m));
        wr(A_ECC_EN, 0);
        load_lut(A_LUT_ECP_BASE, L_STOF, s);
        load_lut(A_LUT_ECC_BASE, L_ZERO, s);
        wr(A_MOR_DIS, 0);
        if (p == P_MORA) wr(A_MORA_EN, 1); else wr(A_MORB_EN, 1);
      end
      default: ;
    endcase
    repeat (60) @(negedge clk);
  endtask

  // raise the input after a clock edge, count edges to TRIGGER1 and to L2 bit 6
  task automatic measure(path_e p, int s, int k);
    int n_trig = -1, n_l2 = -1;
    checks++;
    if (trigger_n !== '1 || l2latch_bits !== '0) begin
      failures++;
      $display("%s sector %0d: outputs not idle before the pulse", p.name(), s + 1);
    end
    @(posedge clk);
    #0.1 set_input(p, s, k, 1);
    for (int n = 1; n <= 40 && n_l2 < 0; n++) begin
      @(posedge clk);
      #0.1;
      if (n_trig < 0 && trigger_n[0] == 1'b0) n_trig = n;
      if (n_trig >= 0 && l2latch_bits[6]) n_l2 = n - n_trig;
    end
    checks += 3;
    if (n_trig != EXP_TRIG) begin
      failures++;
      $display("%s sector %0d: input to TRIGGER %0d clocks, expected %0d",
               p.name(), s + 1, n_trig, EXP_TRIG);
    end
    if (n_l2 != EXP_L2) begin
      failures++;
      $display("%s sector %0d: TRIGGER to L2 %0d clocks, expected %0d",
               p.name(), s + 1, n_l2, EXP_L2);
    end
    if (trigger_n[N_TRIG-1:1] !== '1) begin
      failures++;
      $display("%s sector %0d: a trigger other than TRIGGER1 fired", p.name(), s + 1);
    end
    if (n_trig > worst_trig) worst_trig = n_trig;
    if (n_trig < best_trig) best_trig = n_trig;
    n_meas[p]++;
    // release and check that both outputs go idle again
    set_input(p, s, k, 0);
    repeat (40) @(posedge clk);
    #0.1;
    checks++;
    if (trigger_n !== '1 || l2latch_bits !== '0) begin
      failures++;
      $display("%s sector %0d: outputs stuck after the pulse", p.name(), s + 1);
    end
    @(negedge clk);
  endtask

  initial begin
    rst = 1; bus_we = 0; bus_re = 0; bus_addr = '0; bus_wdata = '0;
    board_ids = 32'h0302_0100;
    worst_trig = 0; best_trig = 1000;
    all_low();
    repeat (4) @(negedge clk);
    rst = 0;
    @(negedge clk);
    // trigger 1 only: prescale 1, no stretch, no multiplicity condition
    wr(A_PRESCALE_BASE, 1);
    wr(A_STMULT_DIS, 32'hFFF);
    // level 2: L2TRG entry for TRIGGER1 alone (address 1) sets bit 6
    // (entry 1 is nibble 1 of word 0); minimum delay, no stretch; no L2SEC
    wr(A_LUT_L2_BASE, 32'h0000_0010);
    wr(A_L2_OUTDELAY, 2);
    wr(A_L2_OUTWIDTH, 0);
    wr(A_L2_SECLOGIC, 0);

    for (int s = 0; s < N_SECTORS; s++) begin
      setup(P_ST, s);
      for (int k = 0; k < 4; k++) measure(P_ST, s, k);
      setup(P_TOF, s);
      measure(P_TOF, s, 0);
      setup(P_ECINP, s);
      measure(P_ECINP, s, 0);
      setup(P_ECTOTP, s);
      measure(P_ECTOTP, s, 0);
      setup(P_ECINE, s);
      measure(P_ECINE, s, 0);
      setup(P_ECTOTE, s);
      measure(P_ECTOTE, s, 0);
      setup(P_CC, s);
      measure(P_CC, s, 0);
    end
    setup(P_MORA, 0);
    measure(P_MORA, 0, 0);
    setup(P_MORB, 0);
    measure(P_MORB, 0, 0);

    // every path class must have been measured
    for (path_e p = p.first(); ; p = p.next()) begin
      checks++;
      if (n_meas[p] == 0) begin
        failures++;
        $display("path %s never measured", p.name());
      end
      if (p == p.last()) break;
    end
    $display("input -> TRIGGER: %0d..%0d clocks = %0d..%0d ns (board nominal 52 ns, TOF 59 ns)",
             best_trig, worst_trig, best_trig * CLOCK_PERIOD_NS, worst_trig * CLOCK_PERIOD_NS);
    $display("TRIGGER -> L2 latch bits: %0d clocks = %0d ns (board nominal 35 ns)",
             EXP_L2, EXP_L2 * CLOCK_PERIOD_NS);
    foreach (n_meas[p]) $display("  %-9s measured %0d times", p.name(), n_meas[p]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
