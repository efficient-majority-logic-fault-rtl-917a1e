// tb_mldd_control: checks the MLDD control unit (N = 73, J = 9) by driving
// the check sums directly. A word with all check sums 0 in the three detection
// cycles must raise finish in cycle 5 (cycle 1 being the start cycle) after
// exactly 3 shifts; a word with a non-zero check sum in detection cycle 1, 2 or
// 3 must raise finish in cycle N + 5 after N + 3 shifts, with decoding high in
// between. Back-to-back words (start in the finish cycle) and idle gaps are
// both exercised.
module tb_mldd_control;
  localparam int N = 73, J = 9;

  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, start = 0;
  logic [J-1:0] b = '0;
  logic ready, load, shift, finish, decoding;

  mldd_control #(.N(N), .J(J)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // fire: 0 = clean word, 1..3 = detection cycle in which a check sum is 1.
  // Expects start to be applied by the caller in the current cycle.
  task automatic run_word(input int fire, input bit back_to_back);
    int cyc = 1, shifts = 0, dec_cycles = 0;
    int exp_fin = (fire == 0) ? 5 : N + 5;
    @(negedge clk);
    start = 1;
    #1;
    checks++;
    if (!ready || !load) begin
      failures++; $display("FAIL not ready/load at start");
    end
    forever begin
      @(posedge clk);
      #1;
      start = 0;
      cyc++;
      b = (fire != 0 && cyc == fire + 1) ? J'($urandom_range(1, (1 << J) - 1)) : '0;
      if (finish) break;
      if (shift) shifts++;
      if (decoding) dec_cycles++;
      if (cyc > N + 10) break;
    end
    checks += 3;
    if (cyc != exp_fin) begin
      failures++; $display("FAIL fire=%0d finish in cycle %0d, expected %0d", fire, cyc, exp_fin);
    end
    if (shifts != ((fire == 0) ? 3 : N + 3)) begin
      failures++; $display("FAIL fire=%0d shifts=%0d", fire, shifts);
    end
    if (dec_cycles != ((fire == 0) ? 0 : N)) begin
      failures++; $display("FAIL fire=%0d decoding cycles=%0d", fire, dec_cycles);
    end
    checks++;
    if (!ready) begin
      failures++; $display("FAIL not ready in finish cycle");
    end
    if (!back_to_back) begin
      @(posedge clk);
      #1;
      checks++;
      if (finish || !ready) begin
        failures++; $display("FAIL finish not a single pulse");
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      run_word(t % 4, (t % 3) == 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
