// tb_mldd: end-to-end test of the majority-logic detector/decoder for the
// (73,45) difference-set code (corrects up to 4 bit-flips).
//
// Codewords come from the encoder and are first checked against the code's
// parity checks, written out here from the difference set. Then:
//   - error-free words must come out unchanged after 5 cycles, never decoding;
//   - every one of the 2628 double-bit error patterns must be detected (N + 5
//     cycles) and corrected;
//   - random 1-, 3- and 4-bit patterns must be corrected in N + 5 cycles;
//   - random 5-bit patterns must at least be detected (N + 5 cycles).
// Cycle counts run from the start cycle (1) to the cycle with finish high.
module tb_mldd;
  localparam int N = 73, K = 45, J = 9;
  localparam int L [J] = '{0, 2, 10, 24, 25, 29, 36, 42, 45};

  int checks = 0, failures = 0;
  int n_clean = 0, n_decoded = 0, n_corrected = 0;

  logic clk = 0, rst_n = 0, start = 0;
  logic [N-1:0] x = '0, y, code;
  logic [K-1:0] data = '0;
  logic ready, finish, decoding;

  dscc_encoder #(.S(3)) u_enc (.m(data), .c(code));
  mldd #(.S(3)) dut (.clk, .rst_n, .start, .x, .ready, .y, .finish, .decoding);

  always #5 clk = ~clk;

  initial begin
    #20ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit is_codeword(input logic [N-1:0] c);
    for (int m = 0; m < N; m++) begin
      logic p = 1'b0;
      for (int j = 0; j < J; j++) p ^= c[(m + L[j]) % N];
      if (p) return 1'b0;
    end
    return 1'b1;
  endfunction

  task automatic new_codeword(output logic [N-1:0] c);
    for (int i = 0; i < K; i++) data[i] = 1'($urandom);
    #1;
    c = code;
    checks++;
    if (!is_codeword(c)) begin
      failures++; $display("FAIL encoder output is not a codeword");
    end
  endtask

  // Decode one received word; returns the cycle of finish and the output.
  task automatic decode(input logic [N-1:0] rx, output int cyc, output logic [N-1:0] out,
                        output bit saw_decoding);
    @(negedge clk);
    while (!ready) @(negedge clk);
    x = rx;
    start = 1;
    cyc = 1;
    saw_decoding = 0;
    forever begin
      @(posedge clk);
      #1;
      start = 0;
      cyc++;
      if (decoding) saw_decoding = 1;
      if (finish || cyc > N + 20) break;
    end
    out = y;
  endtask

  task automatic run(input logic [N-1:0] good, input logic [N-1:0] err, input bit need_fix);
    int cyc;
    logic [N-1:0] out;
    bit sd;
    int nerr = $countones(err);
    decode(good ^ err, cyc, out, sd);
    checks++;
    if (cyc != ((nerr == 0) ? 5 : N + 5)) begin
      failures++; $display("FAIL %0d errors: finish in cycle %0d", nerr, cyc);
    end
    if (nerr == 0) n_clean++; else n_decoded++;
    if (need_fix) begin
      checks++;
      if (out !== good) begin
        failures++; $display("FAIL %0d errors (%h) not corrected: %h vs %h", nerr, err, out, good);
      end else if (nerr != 0) n_corrected++;
    end
    checks++;
    if (sd != (nerr != 0)) begin
      failures++; $display("FAIL decoding flag %0d for %0d errors", sd, nerr);
    end
  endtask

  function automatic logic [N-1:0] rand_err(input int n);
    logic [N-1:0] e = '0;
    while ($countones(e) < n) e[$urandom_range(0, N - 1)] = 1'b1;
    return e;
  endfunction

  initial begin
    logic [N-1:0] c, e;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 100; t++) begin
      new_codeword(c);
      run(c, '0, 1);
    end
    // the double error of the 73-bit example: bits 42 and 25 in one check sum
    new_codeword(c);
    e = '0; e[42] = 1'b1; e[25] = 1'b1;
    run(c, e, 1);
    // all double errors
    for (int a = 0; a < N; a++) begin
      for (int bb = a + 1; bb < N; bb++) begin
        if (bb % 8 == 0) new_codeword(c);
        e = '0; e[a] = 1'b1; e[bb] = 1'b1;
        run(c, e, 1);
      end
    end
    for (int n = 1; n <= 5; n++) begin
      for (int t = 0; t < 200; t++) begin
        new_codeword(c);
        run(c, rand_err(n), n <= 4);
      end
    end
    $display("clean=%0d decoded=%0d corrected=%0d", n_clean, n_decoded, n_corrected);
    checks++;
    if (n_clean == 0 || n_corrected == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
