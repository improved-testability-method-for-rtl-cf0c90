// tb_mit_test_hw -- checks the test hardware of one unit of a 2-D mesh (three
// NTUs). Three tested neighbours are modelled; each answers a signature with
// its own response function after its own delay. The testbench checks that all
// NTUs send the same T(k) together, the loop period
// TAU0_MAX + TAU_RESP + 2 cycles, the per-NTU reference memories (addressed by
// cfg_sel), detection of a neighbour that answers wrongly and of one that stops
// answering, and that the loop stops when the unit itself is judged faulty.
module tb_mit_test_hw;
  localparam int unsigned D = 2, NNB = 3, SIG_W = 16, KMAX = 4;
  localparam int unsigned TAU0_MAX = 8, TAU_RESP = 6;
  localparam int unsigned PERIOD = TAU0_MAX + TAU_RESP + 2;

  logic clk = 0, rst_n = 0, test_en = 0, self_healthy = 1;
  logic cfg_we = 0;
  logic [1:0] cfg_sel = '0, cfg_addr = '0;
  logic [SIG_W-1:0] cfg_data = '0;
  logic [NNB-1:0] t_valid, r_valid, nb_healthy, check, check_fail;
  logic [NNB-1:0][SIG_W-1:0] t_data, r_data;
  logic loop_start, loop_active;
  logic [1:0] loop_k;

  int checks = 0, failures = 0;
  int loops = 0, ntu_checks = 0, ntu_fails = 0;
  logic [SIG_W-1:0] sigs [KMAX];
  bit bad [NNB];
  bit dead [NNB];
  int exp_k = 0, last_start = -1, cyc = 0;

  mit_test_hw #(.D(D), .SIG_W(SIG_W), .KMAX(KMAX), .TAU0_MAX(TAU0_MAX),
                .TAU_RESP(TAU_RESP)) dut (
    .clk, .rst_n, .test_en, .self_healthy, .cfg_we, .cfg_sel, .cfg_addr, .cfg_data,
    .t_valid, .t_data, .r_valid, .r_data, .nb_healthy, .loop_start, .loop_active,
    .loop_k, .check, .check_fail);

  always #5 clk = ~clk;

  function automatic logic [SIG_W-1:0] resp_fn(input int j, input logic [SIG_W-1:0] t);
    return {t[SIG_W-4:0], t[SIG_W-1:SIG_W-3]} ^ SIG_W'(16'h3C5A + 16'(j * 257));
  endfunction

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, msg);
    end
  endtask

  // Tested-neighbour models.
  for (genvar j = 0; j < NNB; j++) begin : g_nb
    int cnt = -1;
    logic [SIG_W-1:0] held;
    always @(posedge clk) begin
      r_valid[j] <= 1'b0;
      if (t_valid[j]) begin
        held <= resp_fn(j, t_data[j]) ^ (bad[j] ? 16'h0100 : 16'h0);
        cnt  <= j + 1;                      // delays 1..3 < TAU_RESP - 1
      end else if (cnt == 0) begin
        cnt <= -1;
        if (!dead[j]) begin
          r_valid[j] <= 1'b1;
          r_data[j]  <= held;
        end
      end else if (cnt > 0) cnt <= cnt - 1;
    end
  end

  // Loop checker.
  always @(negedge clk) begin
    cyc++;
    if (rst_n) begin
      if (loop_start) begin
        loops++;
        if (last_start >= 0)
          chk(cyc - last_start == PERIOD, $sformatf("period %0d", cyc - last_start));
        last_start = cyc;
        chk(loop_k == 2'(exp_k), "loop_k");
        chk(self_healthy && test_en, "loop while halted");
        exp_k = (exp_k + 1) % KMAX;
      end
      if (t_valid != '0) begin
        chk(t_valid == '1, "NTUs did not send together");
        for (int j = 0; j < NNB; j++)
          chk(t_data[j] == sigs[(exp_k + KMAX - 1) % KMAX], "t_data is not T(k)");
      end
      for (int j = 0; j < NNB; j++) if (check[j]) begin
        ntu_checks++;
        chk(check_fail[j] == (bad[j] || dead[j]), $sformatf("NTU%0d verdict", j + 1));
        if (check_fail[j]) ntu_fails++;
      end
    end
  end

  initial begin
    for (int k = 0; k < KMAX; k++) sigs[k] = SIG_W'($urandom);
    for (int j = 0; j < NNB; j++) begin bad[j] = 0; dead[j] = 0; end
    r_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s <= NNB; s++)
      for (int k = 0; k < KMAX; k++) begin
        cfg_we = 1; cfg_sel = 2'(s); cfg_addr = 2'(k);
        cfg_data = (s == 0) ? sigs[k] : resp_fn(s - 1, sigs[k]);
        @(negedge clk);
      end
    cfg_we = 0;
    test_en = 1;
    repeat (6 * PERIOD) @(negedge clk);
    chk(nb_healthy == '1, "healthy neighbours flagged");
    bad[1] = 1;
    repeat (2 * PERIOD) @(negedge clk);
    chk(nb_healthy == 3'b101, $sformatf("after wrong answers %b", nb_healthy));
    dead[2] = 1;
    repeat (2 * PERIOD) @(negedge clk);
    chk(nb_healthy == 3'b001, $sformatf("after silent neighbour %b", nb_healthy));
    self_healthy = 0;
    last_start = -1;
    begin
      automatic int n0 = loops;
      repeat (3 * PERIOD) @(negedge clk);
      chk(loops == n0, "loops continued while unit faulty");
    end
    chk(loops >= 10, $sformatf("only %0d loops", loops));
    chk(ntu_fails >= 3, "failures not seen");
    $display("loops=%0d ntu_checks=%0d ntu_fails=%0d", loops, ntu_checks, ntu_fails);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
