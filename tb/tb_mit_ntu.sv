// tb_mit_ntu -- checks one neighbour test unit: the one-cycle t_valid with the
// signature, the TAU_RESP-cycle busy window, capture of the first response,
// comparison with the reference from memory 11, and the sticky faulty flag
// for a wrong response, a missing response and a response in the last cycle
// of the window.
module tb_mit_ntu;
  localparam int unsigned SIG_W = 16, KMAX = 4, TAU_RESP = 6;

  logic clk = 0, rst_n = 0;
  logic start = 0;
  logic [SIG_W-1:0] test_sig = '0;
  logic [1:0] k_idx = '0;
  logic ref_we = 0;
  logic [1:0] ref_addr = '0;
  logic [SIG_W-1:0] ref_wdata = '0;
  logic t_valid, busy, healthy, check, check_fail;
  logic [SIG_W-1:0] t_data;
  logic r_valid = 0;
  logic [SIG_W-1:0] r_data = '0;

  int checks = 0, failures = 0;
  logic [SIG_W-1:0] refs [KMAX];

  mit_ntu #(.SIG_W(SIG_W), .KMAX(KMAX), .TAU_RESP(TAU_RESP)) dut (
    .clk, .rst_n, .start, .test_sig, .k_idx, .ref_we, .ref_addr, .ref_wdata,
    .t_valid, .t_data, .r_valid, .r_data, .busy, .healthy, .check, .check_fail);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, msg);
    end
  endtask

  // One test thread. delay < 0: no response; second >= 0: a later, different
  // response that must be ignored.
  task automatic run(input int k, input int delay, input logic [SIG_W-1:0] resp,
                     input int second, input bit exp_fail, input bit exp_healthy);
    logic [SIG_W-1:0] sig;
    int busy_cycles = 0, c = 0;
    sig = SIG_W'($urandom);
    @(negedge clk);
    start = 1; test_sig = sig; k_idx = 2'(k);
    @(negedge clk);
    start = 0;
    chk(t_valid && t_data == sig, "t_valid/t_data after start");
    forever begin
      r_valid = (c == delay) || (c == second);
      r_data  = (c == second) ? ~resp : resp;  // correct value even when not valid
      if (busy) busy_cycles++;
      if (c > 0) chk(!t_valid, "t_valid longer than one cycle");
      @(negedge clk);
      c++;
      if (check) break;
      if (c > 4 * TAU_RESP) break;
    end
    r_valid = 0;
    chk(check, "no check pulse");
    chk(busy_cycles == TAU_RESP, $sformatf("busy %0d cycles", busy_cycles));
    chk(!busy, "still busy after check");
    chk(check_fail == exp_fail, $sformatf("check_fail=%b exp %b", check_fail, exp_fail));
    chk(healthy == exp_healthy, $sformatf("healthy=%b exp %b", healthy, exp_healthy));
  endtask

  initial begin
    for (int k = 0; k < KMAX; k++) refs[k] = SIG_W'($urandom);
    repeat (2) @(negedge clk);
    rst_n = 1;
    chk(healthy && !busy, "reset state");
    for (int k = 0; k < KMAX; k++) begin
      ref_we = 1; ref_addr = 2'(k); ref_wdata = refs[k];
      @(negedge clk);
    end
    ref_we = 0;
    // Correct responses at every legal delay and every k.
    for (int d = 0; d < TAU_RESP; d++) run(d % KMAX, d, refs[d % KMAX], -1, 0, 1);
    // First response captured, a later one ignored.
    run(1, 1, refs[1], 3, 0, 1);
    // Right value of the wrong k is a mismatch.
    run(2, 2, refs[3], -1, 1, 0);
    // Flag stays cleared even for a correct answer afterwards.
    run(0, 0, refs[0], -1, 0, 0);
    // Missing response.
    rst_n = 0; @(negedge clk); rst_n = 1;
    chk(healthy, "healthy after reset");
    run(3, -1, refs[3], -1, 1, 0);
    // Response too late (after the window) is missing.
    rst_n = 0; @(negedge clk); rst_n = 1;
    run(1, TAU_RESP + 1, refs[1], -1, 1, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
