// mit_core -- the device core of the per-unit test hardware: it paces the test
// loops of its processor unit and issues one test signature per loop.
//
// Parts (numbers as in the unit list of the test hardware):
//   memory 1     KMAX test signatures T(k), written through sig_we/sig_addr/
//                sig_wdata, read asynchronously at the current k.
//   counter 2    circular counter of the clock ticks between two test loops
//                (tau0, modulo TAU0_MAX).
//   counter 3    circular pointer k (modulo KMAX) to the next signature.
//   flip-flop 4  "counter 2 has re-entered zero": set when a loop starts,
//                cleared (gate 8) when every neighbour test unit has finished.
//   gates 5, 6   clock enables of counters 2 and 3 (gated clocks of the
//                original become synchronous enables here).
//   gate 7 + one-shot 9  detect the wrap of counter 2 to zero.
//   one-shot 10  the one-cycle start pulse for the neighbour test units.
// Counter 2 advances only while flip-flop 4 is clear, test_en is high and the
// unit itself is still judged healthy by its testing neighbours (self_healthy):
// a unit found faulty stops testing others.
//
// Timing: after reset, or after the last NTU has dropped busy, counter 2 runs
// TAU0_MAX ticks. On the tick it wraps, start is raised for one cycle on the
// next cycle, with test_sig = T(k) and k_idx = k; k then advances modulo KMAX.
// The next wait begins the cycle after all ntu_busy bits are low again.
// test_en and the signature write port are this design's own additions so the
// memories can be loaded before testing begins; widths are assumed.
module mit_core #(
  parameter int unsigned SIG_W    = 16,
  parameter int unsigned KMAX     = 32,
  parameter int unsigned TAU0_MAX = 64,
  parameter int unsigned NNB      = 7,
  localparam int unsigned KW      = mit_pkg::idx_width(KMAX),
  localparam int unsigned TW      = mit_pkg::idx_width(TAU0_MAX)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             test_en,
  input  logic             self_healthy,
  input  logic [NNB-1:0]   ntu_busy,
  input  logic             sig_we,
  input  logic [KW-1:0]    sig_addr,
  input  logic [SIG_W-1:0] sig_wdata,
  output logic             start,
  output logic [SIG_W-1:0] test_sig,
  output logic [KW-1:0]    k_idx,
  output logic             loop_active
);

  logic [SIG_W-1:0] mem1 [KMAX];   // memory 1
  logic [TW-1:0]    cnt2;          // counter 2 (tau0)
  logic [KW-1:0]    cnt3;          // counter 3 (k)
  logic             ff4;           // flip-flop 4
  logic             en2;           // gate 5
  logic             wrap2;         // gate 7 + one-shot 9
  logic             clr4;          // gate 8

  assign en2   = !ff4 && test_en && self_healthy;
  assign wrap2 = en2 && (cnt2 == TW'(TAU0_MAX - 1));
  assign clr4  = ff4 && !start && (ntu_busy == '0);
  assign loop_active = ff4;

  always_ff @(posedge clk) begin
    if (sig_we) mem1[sig_addr] <= sig_wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt2     <= '0;
      cnt3     <= '0;
      ff4      <= 1'b0;
      start    <= 1'b0;
      test_sig <= '0;
      k_idx    <= '0;
    end else begin
      start <= 1'b0;
      if (en2) cnt2 <= wrap2 ? '0 : cnt2 + 1'b1;
      if (wrap2) begin
        // A new loop may only start once the previous one has been evaluated.
        a_no_overlap: assert (!ff4 && !start)
          else $error("mit_core: test loop started while one is running");
        ff4      <= 1'b1;
        start    <= 1'b1;                 // one-shot 10
        test_sig <= mem1[cnt3];
        k_idx    <= cnt3;
        cnt3     <= (cnt3 == KW'(KMAX - 1)) ? '0 : cnt3 + 1'b1;  // gate 6
      end else if (clr4) begin
        ff4 <= 1'b0;
      end
    end
  end

endmodule
