// tb_mit_core -- checks the device core: the spacing of test loops (exactly
// TAU0_MAX enabled idle ticks before each start pulse), the signature issued
// (T(k) from memory 1 with k advancing modulo KMAX), waiting for the NTUs'
// busy flags, and that the loop halts while test_en or self_healthy is low.
// The NTUs are modelled by a busy pulse of random length after each start.
module tb_mit_core;
  localparam int unsigned SIG_W = 16, KMAX = 4, TAU0_MAX = 8, NNB = 3;

  logic clk = 0, rst_n = 0;
  logic test_en = 0, self_healthy = 1;
  logic [NNB-1:0] ntu_busy = '0;
  logic sig_we = 0;
  logic [1:0] sig_addr = '0;
  logic [SIG_W-1:0] sig_wdata = '0;
  logic start, loop_active;
  logic [SIG_W-1:0] test_sig;
  logic [1:0] k_idx;

  int checks = 0, failures = 0;
  int loops = 0, wraps = 0, halted_cycles = 0;
  int en_count = 0, exp_k = 0, busy_left = 0;
  logic [SIG_W-1:0] ref_mem [KMAX];

  mit_core #(.SIG_W(SIG_W), .KMAX(KMAX), .TAU0_MAX(TAU0_MAX), .NNB(NNB)) dut (
    .clk, .rst_n, .test_en, .self_healthy, .ntu_busy, .sig_we, .sig_addr, .sig_wdata,
    .start, .test_sig, .k_idx, .loop_active);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, msg);
    end
  endtask

  // Reference model, evaluated at each falling edge (all signals stable).
  always @(negedge clk) if (rst_n) begin
    if (start) begin
      loops++;
      check(en_count == TAU0_MAX, $sformatf("loop after %0d idle ticks", en_count));
      check(test_sig == ref_mem[exp_k], $sformatf("T(k) %h exp %h", test_sig, ref_mem[exp_k]));
      check(k_idx == 2'(exp_k), $sformatf("k %0d exp %0d", k_idx, exp_k));
      check(loop_active, "loop_active with start");
      if (exp_k == KMAX - 1) wraps++;
      exp_k = (exp_k + 1) % KMAX;
      en_count = 0;
      busy_left = 2 + $urandom_range(0, 4);
    end else begin
      if (busy_left > 0) check(loop_active, "loop ended while NTUs busy");
      if (test_en && self_healthy && !loop_active) en_count++;
      if (!self_healthy || !test_en) halted_cycles++;
    end
    ntu_busy <= (busy_left > 0) ? NNB'($urandom_range(1, (1 << NNB) - 1)) : '0;
    if (busy_left > 0) busy_left--;
  end

  initial begin
    for (int k = 0; k < KMAX; k++) ref_mem[k] = SIG_W'($urandom);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < KMAX; k++) begin
      sig_we = 1; sig_addr = 2'(k); sig_wdata = ref_mem[k];
      @(negedge clk);
    end
    sig_we = 0;
    test_en = 1;
    repeat (150) @(negedge clk);
    // Unit judged faulty by its testers: no loop may start.
    self_healthy = 0;
    begin
      automatic int n0 = loops;
      repeat (60) @(negedge clk);
      check(loops == n0, "loop started while unit faulty");
    end
    self_healthy = 1;
    repeat (70) @(negedge clk);
    test_en = 0;
    begin
      automatic int n0 = loops;
      repeat (40) @(negedge clk);
      check(loops == n0, "loop started while test_en low");
    end
    test_en = 1;
    repeat (100) @(negedge clk);
    check(loops >= 12, $sformatf("only %0d loops", loops));
    check(wraps >= 2, "k never wrapped");
    check(halted_cycles > 0, "halt never exercised");
    $display("loops=%0d k_wraps=%0d halted_cycles=%0d", loops, wraps, halted_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
