// tb_mit_mesh_2d -- the end-to-end scenario of tb_mit_mesh on a
// two-dimensional mesh of 3 columns by 4 rows, where every unit has exactly
// three testing neighbours (the left, lower-left and lower neighbours with
// wrap-around) and the majority of three decides. Shorter signature lists and
// wait times keep the run short. Phase 1 runs all units healthy past a wrap of
// the signature pointer; phase 2 makes the core of unit A answer wrongly, the
// core of unit B fall silent and one reference memory of unit C wrong, and
// checks that A and B are isolated and halt while the one wrong vote about C's
// tested neighbour is outvoted.
module tb_mit_mesh_2d;
  import mit_tb_pkg::*;

  localparam int D = 2, N = 3, M = 4, P = 1;
  localparam int KMAX = 8, TAU0_MAX = 16, TAU_RESP = 8;
  localparam int A = 4, B = 11, C = 0, J0 = 0;

  localparam int NU = N * M * P, NNB = (1 << D) - 1;
  localparam int PERIOD = TAU0_MAX + TAU_RESP + 2;
  localparam int KW = $clog2(KMAX), SELW = $clog2(NNB + 1), UW = $clog2(NU);

  logic clk = 0, rst_n = 0, test_en = 0;
  logic cfg_we = 0;
  logic [UW-1:0]   cfg_unit = '0;
  logic [SELW-1:0] cfg_sel = '0;
  logic [KW-1:0]   cfg_addr = '0;
  logic [15:0]     cfg_data = '0;
  logic [NU-1:0][NNB-1:0]       pu_t_valid, pu_r_valid, partial_flags, check, check_fail;
  logic [NU-1:0][NNB-1:0][15:0] pu_t_data, pu_r_data;
  logic [NU-1:0]                unit_healthy, loop_start, loop_active;
  logic [NU-1:0][KW-1:0]        loop_k;
  logic [NU-1:0]                faulty = '0, dead = '0;

  int checks = 0, failures = 0, cyc = 0;
  int n_loops = 0, n_wraps = 0, n_pass = 0, n_mismatch = 0, n_timeout = 0;
  int n_tester_fault = 0, n_masked = 0, n_isolated = 0, n_halted = 0;
  int last_start [NU];
  bit bad_ref [NU][NNB];
  bit phase2 = 0;
  bit corrupting = 0;   // reference memory of unit C being overwritten

  mit_mesh #(.D(D), .N_COLS(N), .M_ROWS(M), .P_DEPTH(P), .KMAX(KMAX),
             .TAU0_MAX(TAU0_MAX), .TAU_RESP(TAU_RESP)) dut (
    .clk, .rst_n, .test_en, .cfg_we, .cfg_unit, .cfg_sel, .cfg_addr, .cfg_data,
    .pu_t_valid, .pu_t_data, .pu_r_valid, .pu_r_data, .unit_healthy, .partial_flags,
    .loop_start, .loop_k, .loop_active, .check, .check_fail);

  mit_pu_model #(.NU(NU), .NNB(NNB), .TAU_RESP(TAU_RESP)) pus (
    .clk, .faulty, .dead, .t_valid(pu_t_valid), .t_data(pu_t_data),
    .r_valid(pu_r_valid), .r_data(pu_r_data));

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, msg);
    end
  endtask

  always @(negedge clk) begin
    cyc++;
    if (rst_n) begin
      for (int u = 0; u < NU; u++) begin
        if (loop_start[u]) begin
          n_loops++;
          if (loop_k[u] == KW'(KMAX - 1)) n_wraps++;
          chk(unit_healthy[u], $sformatf("unit %0d tests while faulty", u));
          if (!phase2 && last_start[u] >= 0)
            chk(cyc - last_start[u] == PERIOD, $sformatf("unit %0d period %0d", u,
                                                         cyc - last_start[u]));
          last_start[u] = cyc;
        end
        for (int j = 0; j < NNB; j++) begin
          if (pu_t_valid[u][j]) begin
            automatic int t = testing(u, j + 1, N, M, P);
            chk(pu_t_data[u][j] == sig_fn(t, int'(loop_k[t])),
                $sformatf("unit %0d got wrong signature from tester %0d", u, t));
          end
          if (check[u][j]) begin
            automatic int v = tested(u, j + 1, N, M, P);
            automatic bit exp_fail = faulty[v] || dead[v] || bad_ref[u][j];
            // While the memory is half rewritten either verdict is correct.
            if (!(corrupting && u == C && j == J0))
              chk(check_fail[u][j] == exp_fail,
                $sformatf("NTU %0d of unit %0d about unit %0d: fail=%b", j + 1, u, v,
                          check_fail[u][j]));
            if (!check_fail[u][j]) n_pass++;
            else if (bad_ref[u][j] || (corrupting && u == C && j == J0)) n_tester_fault++;
            else if (dead[v]) n_timeout++;
            else n_mismatch++;
          end
        end
      end
    end
  end

  // Isolation events.
  for (genvar u = 0; u < NU; u++) begin : g_iso
    always @(negedge unit_healthy[u]) if (rst_n) n_isolated++;
  end

  initial begin
    for (int u = 0; u < NU; u++) begin
      last_start[u] = -1;
      for (int j = 0; j < NNB; j++) bad_ref[u][j] = 0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    // Load memory 1 (signatures) and every memory 11 (reference responses).
    for (int u = 0; u < NU; u++)
      for (int s = 0; s <= NNB; s++)
        for (int k = 0; k < KMAX; k++) begin
          cfg_we = 1; cfg_unit = UW'(u); cfg_sel = SELW'(s); cfg_addr = KW'(k);
          cfg_data = (s == 0) ? sig_fn(u, k) : resp_fn(sig_fn(u, k));
          @(negedge clk);
        end
    cfg_we = 0;
    test_en = 1;
    // Phase 1: more than one full round of signatures.
    repeat ((KMAX + 2) * PERIOD) @(negedge clk);
    chk(unit_healthy == '1, "healthy mesh has a faulty unit");
    chk(partial_flags == '1, "healthy mesh has a negative vote");
    // Phase 2: inject the faults.
    phase2 = 1;
    faulty[A] = 1;
    dead[B] = 1;
    corrupting = 1;
    for (int k = 0; k < KMAX; k++) begin
      cfg_we = 1; cfg_unit = UW'(C); cfg_sel = SELW'(J0 + 1); cfg_addr = KW'(k);
      cfg_data = ~resp_fn(sig_fn(C, k));
      @(negedge clk);
    end
    cfg_we = 0;
    bad_ref[C][J0] = 1;
    @(negedge clk);
    corrupting = 0;
    repeat (3 * PERIOD) @(negedge clk);
    begin
      automatic int v = tested(C, J0 + 1, N, M, P);
      for (int u = 0; u < NU; u++) begin
        automatic logic [NNB-1:0] exp_votes = '1;
        if (u == A || u == B) exp_votes = '0;
        if (u == v) exp_votes[J0] = 1'b0;
        chk(partial_flags[u] == exp_votes,
            $sformatf("votes about unit %0d: %b exp %b", u, partial_flags[u], exp_votes));
        chk(unit_healthy[u] == !(u == A || u == B),
            $sformatf("unit %0d final flag %b", u, unit_healthy[u]));
        if (unit_healthy[u] && partial_flags[u] != '1) n_masked++;
      end
    end
    // Isolated units must have stopped their own test loops.
    begin
      automatic int la = last_start[A], lb = last_start[B];
      repeat (2 * PERIOD) @(negedge clk);
      chk(last_start[A] == la && last_start[B] == lb, "isolated unit still testing");
      if (last_start[A] == la) n_halted++;
      if (last_start[B] == lb) n_halted++;
    end
    chk(n_loops > 0,        "mechanism never seen: test loop");
    chk(n_wraps > 0,        "mechanism never seen: signature pointer wrap");
    chk(n_pass > 0,         "mechanism never seen: passed check");
    chk(n_mismatch > 0,     "mechanism never seen: wrong response");
    chk(n_timeout > 0,      "mechanism never seen: missing response");
    chk(n_tester_fault > 0, "mechanism never seen: faulty tester");
    chk(n_masked > 0,       "mechanism never seen: wrong vote outvoted");
    chk(n_isolated > 0,     "mechanism never seen: unit isolated");
    chk(n_halted > 0,       "mechanism never seen: isolated unit halts");
    $display("loops=%0d k_wraps=%0d pass=%0d mismatch=%0d timeout=%0d tester_fault=%0d",
             n_loops, n_wraps, n_pass, n_mismatch, n_timeout, n_tester_fault);
    $display("masked=%0d isolated=%0d halted=%0d cycles=%0d",
             n_masked, n_isolated, n_halted, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NU * (NNB + 1) * KMAX + (KMAX + 10) * PERIOD + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
