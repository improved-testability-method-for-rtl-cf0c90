// mit_test_hw -- the embedded test hardware of one processor unit: a device
// core (mit_core) and 2^D - 1 identical neighbour test units (mit_ntu), one per
// tested neighbour. All NTUs start together on the core's start pulse with the
// same test signature T(k) and the same index k, so the unit tests all of its
// tested neighbours in parallel; the next loop waits until all have finished.
//
// Interface (index j = 0 .. NNB-1 is NTU j+1, i.e. neighbour code j+1 of
// mit_pkg):
//   self_healthy     the unit's own final flag from its testing neighbours;
//                    when low the unit stops issuing test loops.
//   cfg_*            write port of the memories: cfg_sel = 0 writes memory 1
//                    (test signatures), cfg_sel = j+1 writes memory 11 of NTU
//                    j+1 (reference responses), at address cfg_addr = k.
//   t_valid/t_data   test signature towards tested neighbour j+1.
//   r_valid/r_data   response coming back from tested neighbour j+1.
//   nb_healthy       partial flags phi for the tested neighbours.
//   loop_start, loop_k  start of a test loop and its signature index k.
//   loop_active      a loop is under way (flip-flop 4 of the core).
//   check, check_fail  end of each NTU's check and its failure, per cycle.
// Timing is that of mit_core and mit_ntu. The address-decoded write port is
// this design's own choice.
module mit_test_hw #(
  parameter int unsigned D        = 3,
  parameter int unsigned SIG_W    = 16,
  parameter int unsigned KMAX     = 32,
  parameter int unsigned TAU0_MAX = 64,
  parameter int unsigned TAU_RESP = 16,
  localparam int unsigned NNB     = mit_pkg::num_neighbours(D),
  localparam int unsigned KW      = mit_pkg::idx_width(KMAX),
  localparam int unsigned SELW    = mit_pkg::idx_width(NNB + 1)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      test_en,
  input  logic                      self_healthy,
  input  logic                      cfg_we,
  input  logic [SELW-1:0]           cfg_sel,
  input  logic [KW-1:0]             cfg_addr,
  input  logic [SIG_W-1:0]          cfg_data,
  output logic [NNB-1:0]            t_valid,
  output logic [NNB-1:0][SIG_W-1:0] t_data,
  input  logic [NNB-1:0]            r_valid,
  input  logic [NNB-1:0][SIG_W-1:0] r_data,
  output logic [NNB-1:0]            nb_healthy,
  output logic                      loop_start,
  output logic                      loop_active,
  output logic [KW-1:0]             loop_k,
  output logic [NNB-1:0]            check,
  output logic [NNB-1:0]            check_fail
);

  logic             start;
  logic [SIG_W-1:0] test_sig;
  logic [NNB-1:0]   busy;

  mit_core #(
    .SIG_W(SIG_W), .KMAX(KMAX), .TAU0_MAX(TAU0_MAX), .NNB(NNB)
  ) u_core (
    .clk, .rst_n, .test_en, .self_healthy,
    .ntu_busy   (busy),
    .sig_we     (cfg_we && cfg_sel == '0),
    .sig_addr   (cfg_addr),
    .sig_wdata  (cfg_data),
    .start      (start),
    .test_sig   (test_sig),
    .k_idx      (loop_k),
    .loop_active(loop_active)
  );

  assign loop_start = start;

  for (genvar j = 0; j < NNB; j++) begin : g_ntu
    mit_ntu #(
      .SIG_W(SIG_W), .KMAX(KMAX), .TAU_RESP(TAU_RESP)
    ) u_ntu (
      .clk, .rst_n,
      .start      (start),
      .test_sig   (test_sig),
      .k_idx      (loop_k),
      .ref_we     (cfg_we && cfg_sel == SELW'(j + 1)),
      .ref_addr   (cfg_addr),
      .ref_wdata  (cfg_data),
      .t_valid    (t_valid[j]),
      .t_data     (t_data[j]),
      .r_valid    (r_valid[j]),
      .r_data     (r_data[j]),
      .busy       (busy[j]),
      .healthy    (nb_healthy[j]),
      .check      (check[j]),
      .check_fail (check_fail[j])
    );
  end

endmodule
