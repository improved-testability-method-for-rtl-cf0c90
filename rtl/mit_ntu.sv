// mit_ntu -- neighbour test unit: one thread of the mutual inter-unit test. It
// sends the current test signature to one tested neighbour, waits a fixed
// number of ticks for the answer, and compares the answer with the reference
// response kept for that neighbour.
//
// Parts (numbers as in the unit list of the test hardware):
//   memory 11     KMAX reference responses R0(k) for this tested neighbour,
//                 written through ref_we/ref_addr/ref_wdata.
//   counter 12    circular counter of the ticks spent waiting for the
//                 response (modulo TAU_RESP).
//   flip-flop 13  busy: set by start, cleared when counter 12 re-enters zero.
//   flip-flop 14  partial flag phi: 1 = neighbour healthy. Set by reset, cleared
//                 (one-shot 21 through gate 17) when the check fails; it stays
//                 cleared until the next reset.
//   comparator 15 response == R0(k).
//   gate 16       clock enable of counter 12 (only while busy).
//   gate 18 + one-shot 20 detect the wrap of counter 12.
//
// Timing: start (one cycle, ignored while busy) -> next cycle t_valid is high
// for one cycle with t_data = T(k) and busy rises. The first r_valid seen while
// busy is captured. TAU_RESP cycles after busy rose, busy falls and the check is
// made: a missing response or one that differs from R0(k) clears healthy.
// check pulses for one cycle at that moment and check_fail with it on a failure.
// The capture of the first response and the treatment of a missing response as
// a failure are this design's reading of "controls the arrival of the test
// response"; widths and the handshake are this design's own choices.
module mit_ntu #(
  parameter int unsigned SIG_W    = 16,
  parameter int unsigned KMAX     = 32,
  parameter int unsigned TAU_RESP = 16,
  localparam int unsigned KW      = mit_pkg::idx_width(KMAX),
  localparam int unsigned RW      = mit_pkg::idx_width(TAU_RESP)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [SIG_W-1:0] test_sig,
  input  logic [KW-1:0]    k_idx,
  input  logic             ref_we,
  input  logic [KW-1:0]    ref_addr,
  input  logic [SIG_W-1:0] ref_wdata,
  output logic             t_valid,
  output logic [SIG_W-1:0] t_data,
  input  logic             r_valid,
  input  logic [SIG_W-1:0] r_data,
  output logic             busy,
  output logic             healthy,
  output logic             check,
  output logic             check_fail
);

  logic [SIG_W-1:0] mem11 [KMAX];  // memory 11
  logic [RW-1:0]    cnt12;         // counter 12
  logic [KW-1:0]    kq;
  logic             got;
  logic [SIG_W-1:0] resp;
  logic             wrap12;        // gate 18 + one-shot 20
  logic             arrived;
  logic [SIG_W-1:0] resp_now;
  logic             match;         // comparator 15

  assign wrap12   = busy && (cnt12 == RW'(TAU_RESP - 1));
  assign arrived  = got || r_valid;
  assign resp_now = got ? resp : r_data;
  assign match    = arrived && (resp_now == mem11[kq]);

  always_ff @(posedge clk) begin
    if (ref_we) mem11[ref_addr] <= ref_wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt12      <= '0;
      kq         <= '0;
      got        <= 1'b0;
      resp       <= '0;
      busy       <= 1'b0;
      healthy    <= 1'b1;
      t_valid    <= 1'b0;
      t_data     <= '0;
      check      <= 1'b0;
      check_fail <= 1'b0;
    end else begin
      t_valid    <= 1'b0;
      check      <= 1'b0;
      check_fail <= 1'b0;
      // The core never starts a loop while an NTU is still busy.
      a_start_idle: assert (!(start && busy))
        else $error("mit_ntu: start while busy");
      if (start && !busy) begin
        busy    <= 1'b1;
        cnt12   <= '0;
        kq      <= k_idx;
        got     <= 1'b0;
        t_valid <= 1'b1;
        t_data  <= test_sig;
      end else if (busy) begin
        cnt12 <= wrap12 ? '0 : cnt12 + 1'b1;       // gate 16
        if (r_valid && !got) begin
          got  <= 1'b1;
          resp <= r_data;
        end
        if (wrap12) begin
          busy  <= 1'b0;                             // flip-flop 13 cleared
          check <= 1'b1;
          if (!match) begin
            healthy    <= 1'b0;                      // one-shot 21, gate 17
            check_fail <= 1'b1;
          end
        end
      end
    end
  end

endmodule
