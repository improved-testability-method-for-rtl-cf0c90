// mit_mesh -- a D-dimensional mesh (D = 2 or 3) of processor units, each with
// its mutual inter-unit test hardware, wired by the tested/testing neighbour
// rules and closed by one majority voter per unit.
//
// Unit u = x + N_COLS*(y + M_ROWS*z) tests, through its NTU j+1, the unit one
// step ahead of it along the dimensions in the bit set of j+1 (wrap-around at
// the edges), and is tested by the units one step behind it likewise. The
// partial flags of its 2^D - 1 testing neighbours are combined by mit_majority
// into unit_healthy[u] (0 = faulty, to be isolated); that flag also stops the
// unit's own test loop. For D = 2 set P_DEPTH = 1.
//
// The processor cores themselves are outside this block. For every unit u and
// testing-neighbour index j, pu_t_valid/pu_t_data[u][j] deliver the signature
// sent to u by its testing neighbour number j+1 (the unit one step behind along
// the bits of j+1), and the core of u must answer on pu_r_valid/pu_r_data[u][j]
// within TAU_RESP cycles. The memories of all units are written through one
// shared port selected by cfg_unit. partial_flags[u][j] is the vote of testing
// neighbour j+1 about unit u.
//
// Mesh size, signature width and the two wait times are not fixed by the text
// and are this design's own defaults; KMAX = 32 is the document's example of a
// 3-D mesh supporting 32 test routines per unit.
module mit_mesh #(
  parameter int unsigned D        = 3,
  parameter int unsigned N_COLS   = 4,
  parameter int unsigned M_ROWS   = 4,
  parameter int unsigned P_DEPTH  = 4,
  parameter int unsigned SIG_W    = 16,
  parameter int unsigned KMAX     = 32,
  parameter int unsigned TAU0_MAX = 64,
  parameter int unsigned TAU_RESP = 16,
  localparam int unsigned NU      = N_COLS * M_ROWS * P_DEPTH,
  localparam int unsigned NNB     = mit_pkg::num_neighbours(D),
  localparam int unsigned KW      = mit_pkg::idx_width(KMAX),
  localparam int unsigned SELW    = mit_pkg::idx_width(NNB + 1),
  localparam int unsigned UW      = mit_pkg::idx_width(NU)
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               test_en,
  input  logic                               cfg_we,
  input  logic [UW-1:0]                      cfg_unit,
  input  logic [SELW-1:0]                    cfg_sel,
  input  logic [KW-1:0]                      cfg_addr,
  input  logic [SIG_W-1:0]                   cfg_data,
  output logic [NU-1:0][NNB-1:0]             pu_t_valid,
  output logic [NU-1:0][NNB-1:0][SIG_W-1:0]  pu_t_data,
  input  logic [NU-1:0][NNB-1:0]             pu_r_valid,
  input  logic [NU-1:0][NNB-1:0][SIG_W-1:0]  pu_r_data,
  output logic [NU-1:0]                      unit_healthy,
  output logic [NU-1:0][NNB-1:0]             partial_flags,
  output logic [NU-1:0]                      loop_start,
  output logic [NU-1:0][KW-1:0]              loop_k,
  output logic [NU-1:0]                      loop_active,
  output logic [NU-1:0][NNB-1:0]             check,
  output logic [NU-1:0][NNB-1:0]             check_fail
);

  if (D != 2 && D != 3) begin : g_bad_d
    $error("mit_mesh: D must be 2 or 3");
  end
  if (D == 2 && P_DEPTH != 1) begin : g_bad_p
    $error("mit_mesh: P_DEPTH must be 1 when D = 2");
  end

  logic [NU-1:0][NNB-1:0]            t_valid;
  logic [NU-1:0][NNB-1:0][SIG_W-1:0] t_data;
  logic [NU-1:0][NNB-1:0]            r_valid;
  logic [NU-1:0][NNB-1:0][SIG_W-1:0] r_data;
  logic [NU-1:0][NNB-1:0]            nb_healthy;

  for (genvar u = 0; u < NU; u++) begin : g_unit
    mit_test_hw #(
      .D(D), .SIG_W(SIG_W), .KMAX(KMAX), .TAU0_MAX(TAU0_MAX), .TAU_RESP(TAU_RESP)
    ) u_hw (
      .clk, .rst_n, .test_en,
      .self_healthy (unit_healthy[u]),
      .cfg_we       (cfg_we && cfg_unit == UW'(u)),
      .cfg_sel, .cfg_addr, .cfg_data,
      .t_valid      (t_valid[u]),
      .t_data       (t_data[u]),
      .r_valid      (r_valid[u]),
      .r_data       (r_data[u]),
      .nb_healthy   (nb_healthy[u]),
      .loop_start   (loop_start[u]),
      .loop_k       (loop_k[u]),
      .loop_active  (loop_active[u]),
      .check        (check[u]),
      .check_fail   (check_fail[u])
    );

    // Neighbour wiring: NTU j+1 of unit u talks to unit v = u + offset(j+1),
    // where it is testing neighbour number j+1 of v.
    for (genvar j = 0; j < NNB; j++) begin : g_link
      localparam int unsigned V =
        mit_pkg::neighbour(u, 3'(j + 1), 1, N_COLS, M_ROWS, P_DEPTH);
      assign pu_t_valid[V][j]    = t_valid[u][j];
      assign pu_t_data[V][j]     = t_data[u][j];
      assign r_valid[u][j]       = pu_r_valid[V][j];
      assign r_data[u][j]        = pu_r_data[V][j];
      assign partial_flags[V][j] = nb_healthy[u][j];
    end

    mit_majority #(.N(NNB)) u_vote (
      .votes   (partial_flags[u]),
      .healthy (unit_healthy[u])
    );
  end

endmodule
