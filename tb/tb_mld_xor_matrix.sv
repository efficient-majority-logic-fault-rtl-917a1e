// tb_mld_xor_matrix: checks the check-sum matrix of the (73,45) code.
// Reference: the perfect difference set {0,2,10,24,25,29,36,42,45} written
// out here; check sum i is the XOR of bits (l_k - l_i) mod 73. Random words
// are compared with that reference, and single-bit patterns confirm the
// orthogonality: bit 0 fires all nine sums, any other bit exactly one.
module tb_mld_xor_matrix;
  localparam int N = 73;
  localparam int J = 9;
  localparam int L [J] = '{0, 2, 10, 24, 25, 29, 36, 42, 45};

  int checks = 0, failures = 0;

  logic [N-1:0] r;
  logic [J-1:0] b;

  mld_xor_matrix #(.S(3)) dut (.r, .b);

  function automatic logic [J-1:0] ref_b(input logic [N-1:0] w);
    logic [J-1:0] o;
    for (int i = 0; i < J; i++) begin
      o[i] = 1'b0;
      for (int k = 0; k < J; k++) o[i] ^= w[(L[k] - L[i] + N) % N];
    end
    return o;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      for (int w = 0; w < N; w++) r[w] = 1'($urandom);
      #1;
      checks++;
      if (b !== ref_b(r)) begin
        failures++;
        $display("FAIL r=%h b=%b exp=%b", r, b, ref_b(r));
      end
    end
    for (int p = 0; p < N; p++) begin
      r = '0;
      r[p] = 1'b1;
      #1;
      checks++;
      if ($countones(b) != ((p == 0) ? J : 1)) begin
        failures++;
        $display("FAIL single bit %0d gives b=%b", p, b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
