// tb_mld_shift_reg: loads random words into the 73-tap cyclic shift register
// and rotates them with random hold cycles and random correction bits,
// comparing every cycle with a model kept in the testbench (tap i <- tap i+1,
// tap N-1 <- tap 0 XOR corr). Also checks that load wins over shift.
module tb_mld_shift_reg;
  localparam int N = 73;

  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0, load = 0, shift = 0, corr = 0;
  logic [N-1:0] din, q, model;

  mld_shift_reg #(.N(N)) dut (.clk, .rst_n, .load, .shift, .din, .corr, .q);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = '0;
    model = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      load  = ($urandom_range(0, 19) == 0) || (t == 0);
      shift = 1'($urandom);
      corr  = 1'($urandom);
      for (int w = 0; w < N; w++) din[w] = 1'($urandom);
      if (load)       model = din;
      else if (shift) model = {model[0] ^ corr, model[N-1:1]};
      @(posedge clk);
      #1;
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL t=%0d q=%h exp=%h", t, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
