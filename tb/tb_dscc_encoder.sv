// tb_dscc_encoder: checks the systematic encoder for the (73,45) and (21,11)
// codes. For random data words it checks that the data bits appear unchanged
// in the top K bits and that every parity check of the code holds, i.e. for
// every shift m the XOR of bits (m + l_j) mod N over the difference set is 0.
// The difference sets are written out here, independent of the design's
// tables. Linearity (enc(a) ^ enc(b) == enc(a ^ b)) is checked as well.
module tb_dscc_encoder;
  localparam int L73 [9] = '{0, 2, 10, 24, 25, 29, 36, 42, 45};
  localparam int L21 [5] = '{0, 1, 6, 8, 18};

  int checks = 0, failures = 0;

  logic [44:0] m73, a73;
  logic [72:0] c73, ca73;
  logic [10:0] m21;
  logic [20:0] c21;

  dscc_encoder #(.S(3)) dut73 (.m(m73), .c(c73));
  dscc_encoder #(.S(3)) dut73b (.m(a73), .c(ca73));
  dscc_encoder #(.S(2)) dut21 (.m(m21), .c(c21));

  function automatic int checks_failing73(input logic [72:0] c);
    int bad = 0;
    for (int m = 0; m < 73; m++) begin
      logic p = 1'b0;
      for (int j = 0; j < 9; j++) p ^= c[(m + L73[j]) % 73];
      if (p) bad++;
    end
    return bad;
  endfunction

  function automatic int checks_failing21(input logic [20:0] c);
    int bad = 0;
    for (int m = 0; m < 21; m++) begin
      logic p = 1'b0;
      for (int j = 0; j < 5; j++) p ^= c[(m + L21[j]) % 21];
      if (p) bad++;
    end
    return bad;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [72:0] c_first;
    for (int t = 0; t < 1000; t++) begin
      for (int w = 0; w < 45; w++) m73[w] = 1'($urandom);
      for (int w = 0; w < 45; w++) a73[w] = 1'($urandom);
      m21 = 11'($urandom);
      if (t == 0) m73 = '0;
      if (t == 1) begin m73 = '0; m73[0] = 1'b1; end
      #1;
      checks += 4;
      if (c73[72:28] !== m73) begin
        failures++; $display("FAIL 73 data bits not systematic");
      end
      if (checks_failing73(c73) != 0) begin
        failures++; $display("FAIL 73 m=%h c=%h fails %0d checks", m73, c73, checks_failing73(c73));
      end
      if (c21[20:10] !== m21) begin
        failures++; $display("FAIL 21 data bits not systematic");
      end
      if (checks_failing21(c21) != 0) begin
        failures++; $display("FAIL 21 m=%h c=%h fails %0d checks", m21, c21, checks_failing21(c21));
      end
      // linearity: encode a ^ m and compare with the XOR of the codewords
      c_first = c73 ^ ca73;
      m73 = m73 ^ a73;
      #1;
      checks++;
      if (c73 !== c_first) begin
        failures++; $display("FAIL 73 encoder not linear");
      end
    end
    // a word with a single data bit set must not be all-zero parity (distance)
    m73 = '0; m73[5] = 1'b1;
    #1;
    checks++;
    if ($countones(c73) < 10) begin
      failures++; $display("FAIL 73 weight %0d below minimum distance 10", $countones(c73));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
