// dscc_code_exerciser: reusable test engine for one code size. It encodes
// random data, adds bit-flip patterns, runs the words through the MLDD and
// checks, per word:
//   - latency: 5 cycles (start cycle = 1) when no flip, N + 5 otherwise;
//   - every pattern of 1..5 flips is detected within the three detection cycles;
//   - up to T = 2^(S-1) flips are corrected.
// It also records in which detection cycle (iteration 1, 2 or 3) the error was
// first seen, by observing the control unit's OR of the check sums, and for
// exhaustive double/quadruple error runs compares the cumulative detection
// percentages (in hundredths of a percent, rounded) with expected values given
// as parameters (0 = not compared). Patterns of 6 flips are run when NRAND6 > 0
// and their undetected count is only reported: detection is not guaranteed.
module dscc_code_exerciser
  import dscc_pkg::*;
#(
  parameter int S        = 3,
  parameter bit EXH2     = 1'b1,  // all double-flip patterns, else NRAND random
  parameter bit EXH4     = 1'b0,  // all quadruple-flip patterns, else NRAND random
  parameter int NRAND    = 100,
  parameter int NRAND6   = 0,
  parameter int PCT2_1   = 0,     // expected cumulative detection, 2 flips, iteration 1
  parameter int PCT2_2   = 0,     // ... iteration 2
  parameter int PCT4_1   = 0,
  parameter int PCT4_2   = 0
) (
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int N = int'(code_n(S));
  localparam int K = int'(code_k(S));
  localparam int T = 1 << (S - 1);

  logic clk = 0, rst_n = 0, start = 0;
  logic [N-1:0] x = '0, y, code;
  logic [K-1:0] data = '0;
  logic ready, finish, decoding;

  dscc_encoder #(.S(S)) u_enc (.m(data), .c(code));
  mldd #(.S(S)) dut (.clk, .rst_n, .start, .x, .ready, .y, .finish, .decoding);

  always #5 clk = ~clk;

  longint det_iter [4];   // index 0: not detected in the window

  task automatic fresh_data();
    for (int i = 0; i < K; i++) data[i] = 1'($urandom);
    #1;
  endtask

  task automatic run(input logic [N-1:0] err, input bit must_detect, input bit must_fix);
    int cyc = 1, iter = 0;
    int nerr = $countones(err);
    logic [N-1:0] good = code;
    @(negedge clk);
    while (!ready) @(negedge clk);
    x = good ^ err;
    start = 1;
    forever begin
      @(posedge clk);
      #1;
      start = 0;
      cyc++;
      if (finish || cyc > N + 20) break;
      if (iter == 0 && dut.u_ctl.state == ST_DETECT && dut.u_ctl.or1) iter = cyc - 1;
    end
    det_iter[iter]++;
    checks++;
    if (nerr == 0 || must_detect) begin
      if (cyc != ((nerr == 0) ? 5 : N + 5) || (nerr != 0 && iter == 0)) begin
        failures++;
        $display("FAIL N=%0d %0d flips: finish in cycle %0d, detected in iteration %0d",
                 N, nerr, cyc, iter);
      end
    end
    if (must_fix) begin
      checks++;
      if (y !== good) begin
        failures++; $display("FAIL N=%0d %0d flips not corrected", N, nerr);
      end
    end
  endtask

  function automatic logic [N-1:0] rand_err(input int n);
    logic [N-1:0] e = '0;
    while ($countones(e) < n) e[$urandom_range(0, N - 1)] = 1'b1;
    return e;
  endfunction

  function automatic int pct(input longint part, input longint total);
    return int'((part * 20000 + total) / (2 * total));   // rounded, in 0.01 %
  endfunction

  task automatic reset_hist();
    for (int i = 0; i < 4; i++) det_iter[i] = 0;
  endtask

  task automatic report(input string what, input int exp1, input int exp2);
    longint tot = det_iter[0] + det_iter[1] + det_iter[2] + det_iter[3];
    int p1 = pct(det_iter[1], tot);
    int p2 = pct(det_iter[1] + det_iter[2], tot);
    int p3 = pct(det_iter[1] + det_iter[2] + det_iter[3], tot);
    $display("N=%0d %s: %0d words, detected by iteration 1/2/3: %0d.%02d%% %0d.%02d%% %0d.%02d%%",
             N, what, tot, p1 / 100, p1 % 100, p2 / 100, p2 % 100, p3 / 100, p3 % 100);
    if (exp1 != 0) begin
      checks += 2;
      if (p1 != exp1 || p2 != exp2) begin
        failures++;
        $display("FAIL N=%0d %s: expected %0d and %0d hundredths of a percent", N, what, exp1, exp2);
      end
    end
  endtask

  initial begin
    logic [N-1:0] e;
    done = 0;
    checks = 0;
    failures = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    fresh_data();
    for (int t = 0; t < NRAND; t++) begin
      fresh_data();
      run('0, 1, 1);
    end
    // double flips
    reset_hist();
    if (EXH2) begin
      for (int a = 0; a < N; a++) begin
        fresh_data();
        for (int b = a + 1; b < N; b++) begin
          e = '0; e[a] = 1'b1; e[b] = 1'b1;
          run(e, 1, 1);
        end
      end
    end else begin
      for (int t = 0; t < NRAND; t++) begin
        if (t % 16 == 0) fresh_data();
        run(rand_err(2), 1, 1);
      end
    end
    report(EXH2 ? "all double flips" : "random double flips", PCT2_1, PCT2_2);
    // quadruple flips
    reset_hist();
    if (EXH4) begin
      for (int a = 0; a < N; a++) begin
        fresh_data();
        for (int b = a + 1; b < N; b++)
          for (int c = b + 1; c < N; c++)
            for (int d = c + 1; d < N; d++) begin
              e = '0; e[a] = 1'b1; e[b] = 1'b1; e[c] = 1'b1; e[d] = 1'b1;
              run(e, 1, T >= 4);
            end
      end
    end else begin
      for (int t = 0; t < NRAND; t++) begin
        if (t % 16 == 0) fresh_data();
        run(rand_err(4), 1, T >= 4);
      end
    end
    report(EXH4 ? "all quadruple flips" : "random quadruple flips", PCT4_1, PCT4_2);
    // single, triple and quintuple flips: always detected, corrected up to T
    for (int n = 1; n <= 5; n += 2) begin
      for (int t = 0; t < NRAND; t++) begin
        if (t % 16 == 0) fresh_data();
        run(rand_err(n), 1, n <= T);
      end
    end
    // six flips: only reported
    if (NRAND6 > 0) begin
      reset_hist();
      for (int t = 0; t < NRAND6; t++) begin
        if (t % 16 == 0) fresh_data();
        run(rand_err(6), 0, 6 <= T);
      end
      report("random six flips", 0, 0);
    end
    done = 1;
  end
endmodule
