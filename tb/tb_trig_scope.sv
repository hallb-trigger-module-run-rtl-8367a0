// tb_trig_scope: random 103-bit signal traffic into the scope. For several
// captures the test arms the scope, plants the trigger pattern once before
// the pre-trigger buffer is full (it must be ignored) and once later, then
// reads the whole record word by word and compares each sample with the
// recorded traffic: 60 samples before the trigger sample, the trigger
// sample and 60 after. Status bits and an all-ignore (immediate) trigger
// are checked too.
module tb_trig_scope;
  logic clk = 0;
  always #2.5 clk = ~clk;

  localparam int W = 103;
  int checks = 0, failures = 0;
  logic rst, arm, rd;
  logic [W-1:0] sig, value, ignore;
  logic [31:0] rdata, status;

  trig_scope dut (.*);

  logic [W-1:0] hist [20000];
  int k = 0;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] rnd();
    logic [127:0] v;
    for (int i = 0; i < 4; i++) v[i*32 +: 32] = $urandom;
    return v[W-1:0];
  endfunction

  task automatic step(logic [W-1:0] v);
    sig = v;
    @(posedge clk);
    hist[k] = v;
    k++;
    @(negedge clk);
  endtask

  initial begin
    int k_arm, k_trig, plant_early, plant_late;
    logic [W-1:0] pat, expv;
    logic [127:0] got;
    rst = 1; arm = 0; rd = 0; sig = '0; value = '0; ignore = '1;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int cap = 0; cap < 6; cap++) begin
      pat = rnd();
      value = pat;
      ignore = rnd() | rnd();           // about a quarter of the bits matter
      if (cap == 5) ignore = '1;        // trigger on the first armed sample
      plant_early = 20 + $urandom % 30;
      plant_late  = 70 + $urandom % 100;
      // arm
      arm = 1; step(rnd()); arm = 0;
      k_arm = k - 1;
      checks++;
      if (status[0] !== 1'b1 || status[2] !== 1'b0) failures++;
      k_trig = -1;
      for (int c = 1; c < 400; c++) begin
        logic [W-1:0] v;
        v = rnd();
        // keep random traffic from matching by accident
        if (((v ^ pat) & ~ignore) == '0)
          for (int b = 0; b < W; b++) if (!ignore[b]) begin v[b] = ~pat[b]; break; end
        if (c == plant_early || c == plant_late) v = pat;
        if (k_trig < 0 && c >= 61 && ((v ^ pat) & ~ignore) == '0) k_trig = k;
        step(v);
      end
      checks += 2;
      if (status[2:1] !== 2'b11) begin failures++; $display("cap %0d status %b", cap, status[2:0]); end
      if (cap < 5 && k_trig != k_arm + plant_late) begin failures++; $display("cap %0d planted trigger missed", cap); end
      // read out 121 samples x 4 words
      for (int s = 0; s < 121; s++) begin
        for (int w = 0; w < 4; w++) begin
          got[w*32 +: 32] = rdata;
          rd = 1; @(negedge clk); rd = 0;
        end
        expv = hist[k_trig - 60 + s];
        checks++;
        if (got[W-1:0] !== expv || got[127:W] != '0) begin
          failures++;
          if (failures < 5) $display("cap %0d sample %0d mismatch", cap, s);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
