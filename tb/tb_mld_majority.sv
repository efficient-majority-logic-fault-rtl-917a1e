// tb_mld_majority: exhaustive test of the majority gate for J = 9 and J = 5.
// Every input pattern is applied and the output is compared with a count of
// ones made in the testbench (1 when the ones outnumber the zeros).
module tb_mld_majority;
  int checks = 0, failures = 0;

  logic [8:0] b9;
  logic [4:0] b5;
  logic       m9, m5;

  mld_majority #(.J(9)) dut9 (.b(b9), .maj(m9));
  mld_majority #(.J(5)) dut5 (.b(b5), .maj(m5));

  function automatic logic ref_maj(input logic [31:0] v, input int j);
    int ones = 0;
    for (int i = 0; i < j; i++) ones += int'(v[i]);
    return ones > (j - ones);
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      b9 = 9'(v);
      b5 = 5'(v);
      #1;
      checks++;
      if (m9 !== ref_maj(32'(v), 9)) begin
        failures++;
        $display("FAIL J=9 b=%b maj=%b", b9, m9);
      end
      if (v < 32) begin
        checks++;
        if (m5 !== ref_maj(32'(v), 5)) begin
          failures++;
          $display("FAIL J=5 b=%b maj=%b", b5, m5);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
