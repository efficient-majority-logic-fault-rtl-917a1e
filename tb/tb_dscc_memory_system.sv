// tb_dscc_memory_system: end-to-end test of the protected memory at its
// default size ((73,45) code, 1024 words).
//
// Every word is written with random data; then bit-flips (0 to 5 per word)
// are injected into stored codewords through the upset port, and all words are
// read back in random order. Expected: data returned unchanged for up to 4
// flips; read latency (cycle after rd_en = 1 up to rd_valid) of 5 cycles for
// a clean word and N + 5 = 78 for a word with flips, at least detection for 5
// flips. Each mechanism is counted and must occur: early release of a clean
// word, full decoding, correction of 1..4 flips, detection of 5 flips, a read
// issued in the cycle the previous one finishes (back-to-back), and a write
// landing while a read is being decoded. A few words are rewritten later and
// must read back with their new data.
module tb_dscc_memory_system;
  localparam int N = 73, K = 45, DEPTH = 1024, AW = 10;

  int checks = 0, failures = 0;
  int n_clean = 0, n_decode = 0, n_corrected = 0, n_detect5 = 0;
  int n_b2b = 0, n_wr_during_rd = 0;

  logic clk = 0, rst_n = 0;
  logic wr_en = 0, rd_en = 0, inj_en = 0;
  logic [AW-1:0] wr_addr = '0, rd_addr = '0, inj_addr = '0;
  logic [K-1:0]  wr_data = '0, rd_data;
  logic [N-1:0]  inj_mask = '0;
  logic rd_ready, rd_valid, rd_decoding;

  dscc_memory_system dut (.*);

  logic [K-1:0] shadow [DEPTH];
  int           flips  [DEPTH];

  always #5 clk = ~clk;

  initial begin
    #50ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [K-1:0] rnd_data();
    logic [K-1:0] v;
    for (int i = 0; i < K; i++) v[i] = 1'($urandom);
    return v;
  endfunction

  function automatic logic [N-1:0] rand_err(input int n);
    logic [N-1:0] e = '0;
    while ($countones(e) < n) e[$urandom_range(0, N - 1)] = 1'b1;
    return e;
  endfunction

  // Reads word a, issuing rd_en in the first cycle rd_ready is high, and checks
  // data and latency. Optionally writes another word while decoding runs.
  task automatic read_word(input int a, input bit write_during);
    int cyc;
    bit wrote;
    @(negedge clk);
    while (!rd_ready) @(negedge clk);
    if (rd_valid) n_b2b++;
    rd_en = 1;
    rd_addr = AW'(a);
    @(posedge clk);
    #1;
    rd_en = 0;
    cyc = 1;
    wrote = 0;
    forever begin
      @(posedge clk);
      #1;
      cyc++;
      wr_en = 0;
      if (rd_valid || cyc > N + 20) break;
      if (write_during && !wrote && rd_decoding) begin
        int w = (a + 1) % DEPTH;
        wr_en = 1; wr_addr = AW'(w); wr_data = rnd_data();
        shadow[w] = wr_data; flips[w] = 0;
        wrote = 1;
        n_wr_during_rd++;
      end
    end
    checks++;
    if (cyc != ((flips[a] == 0) ? 5 : N + 5)) begin
      failures++; $display("FAIL addr %0d with %0d flips: latency %0d", a, flips[a], cyc);
    end
    if (flips[a] == 0) n_clean++; else n_decode++;
    if (flips[a] <= 4) begin
      checks++;
      if (rd_data !== shadow[a]) begin
        failures++; $display("FAIL addr %0d with %0d flips: data %h expected %h", a, flips[a], rd_data, shadow[a]);
      end else if (flips[a] > 0) n_corrected++;
    end else if (cyc == N + 5) n_detect5++;
  endtask

  initial begin
    int order [DEPTH];
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = AW'(a); wr_data = rnd_data();
      shadow[a] = wr_data; flips[a] = 0;
    end
    @(negedge clk);
    wr_en = 0;
    // inject upsets into about a third of the words
    for (int a = 0; a < DEPTH; a++) begin
      if ($urandom_range(0, 2) == 0) begin
        flips[a] = $urandom_range(1, 5);
        @(negedge clk);
        inj_en = 1; inj_addr = AW'(a); inj_mask = rand_err(flips[a]);
      end
    end
    @(negedge clk);
    inj_en = 0;
    for (int a = 0; a < DEPTH; a++) order[a] = a;
    order.shuffle();
    for (int i = 0; i < DEPTH; i++) read_word(order[i], (i % 97) == 5 && flips[order[i]] != 0);
    // re-read some rewritten words
    for (int a = 0; a < DEPTH; a++) if (flips[a] == 0 && (a % 37) == 0) read_word(a, 0);

    $display("clean=%0d decoded=%0d corrected=%0d detect5=%0d back_to_back=%0d write_during_read=%0d",
             n_clean, n_decode, n_corrected, n_detect5, n_b2b, n_wr_during_rd);
    checks += 6;
    if (n_clean == 0)        begin failures++; $display("FAIL no early release"); end
    if (n_decode == 0)       begin failures++; $display("FAIL no full decoding"); end
    if (n_corrected == 0)    begin failures++; $display("FAIL no correction"); end
    if (n_detect5 == 0)      begin failures++; $display("FAIL no 5-flip detection"); end
    if (n_b2b == 0)          begin failures++; $display("FAIL no back-to-back read"); end
    if (n_wr_during_rd == 0) begin failures++; $display("FAIL no write during a read"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
