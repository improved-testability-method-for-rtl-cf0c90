// tb_mit_majority -- exhaustive check of the majority operator for the two
// voter sizes the neighbour rules produce: 3 voters (2-D mesh) and 7 voters
// (3-D mesh). The expected result is counted bit by bit in the testbench.
module tb_mit_majority;
  logic [2:0] v3;
  logic [6:0] v7;
  logic       h3, h7;
  int checks = 0, failures = 0;

  mit_majority #(.N(3)) dut3 (.votes(v3), .healthy(h3));
  mit_majority #(.N(7)) dut7 (.votes(v7), .healthy(h7));

  function automatic logic ref_major(input logic [6:0] v, input int n);
    int ones = 0;
    for (int i = 0; i < n; i++) if (v[i]) ones++;
    return (2 * ones > n);
  endfunction

  initial begin
    for (int i = 0; i < 8; i++) begin
      v3 = 3'(i);
      #1;
      checks++;
      if (h3 !== ref_major(7'(i), 3)) begin
        failures++;
        $display("FAIL N=3 votes=%b got %b", v3, h3);
      end
    end
    for (int i = 0; i < 128; i++) begin
      v7 = 7'(i);
      #1;
      checks++;
      if (h7 !== ref_major(7'(i), 7)) begin
        failures++;
        $display("FAIL N=7 votes=%b got %b", v7, h7);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
