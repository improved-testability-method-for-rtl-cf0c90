// mit_pu_model -- behavioural model of the processor cores of a mesh, as seen
// by the test hardware. Each unit v answers every test signature it receives
// from testing neighbour j with mit_tb_pkg::resp_fn(T), after a delay that
// cycles through 0 .. TAU_RESP-3 cycles, so it always lands inside the tester's
// wait window. faulty[v] makes unit v answer with one bit flipped; dead[v]
// makes it stop answering. Not synthesizable; for simulation only.
module mit_pu_model #(
  parameter int unsigned NU       = 4,
  parameter int unsigned NNB      = 3,
  parameter int unsigned TAU_RESP = 16
) (
  input  logic                        clk,
  input  logic [NU-1:0]               faulty,
  input  logic [NU-1:0]               dead,
  input  logic [NU-1:0][NNB-1:0]      t_valid,
  input  logic [NU-1:0][NNB-1:0][15:0] t_data,
  output logic [NU-1:0][NNB-1:0]      r_valid,
  output logic [NU-1:0][NNB-1:0][15:0] r_data
);
  int          cnt  [NU][NNB];
  int          seq  [NU][NNB];
  logic [15:0] held [NU][NNB];

  initial begin
    r_valid = '0;
    r_data  = '0;
    for (int v = 0; v < NU; v++)
      for (int j = 0; j < NNB; j++) begin
        cnt[v][j] = -1;
        seq[v][j] = v + 3 * j;
      end
  end

  always @(posedge clk) begin
    for (int v = 0; v < NU; v++)
      for (int j = 0; j < NNB; j++) begin
        r_valid[v][j] <= 1'b0;
        if (t_valid[v][j]) begin
          held[v][j] <= mit_tb_pkg::resp_fn(t_data[v][j]) ^ (faulty[v] ? 16'h0010 : 16'h0);
          cnt[v][j]  <= seq[v][j] % (TAU_RESP - 2);
          seq[v][j]  <= seq[v][j] + 1;
        end else if (cnt[v][j] == 0) begin
          cnt[v][j] <= -1;
          if (!dead[v]) begin
            r_valid[v][j] <= 1'b1;
            r_data[v][j]  <= held[v][j];
          end
        end else if (cnt[v][j] > 0) begin
          cnt[v][j] <= cnt[v][j] - 1;
        end
      end
  end
endmodule
