// tb_mldd_out_buf: checks the output drivers for N = 73 and N = 21: with oe
// low the output is all zeros, with oe high output bit j equals tap
// (j - 3) mod N, the rotation a word has after three shifts.
module tb_mldd_out_buf;
  int checks = 0, failures = 0;

  logic         oe;
  logic [72:0]  t73, y73;
  logic [20:0]  t21, y21;

  mldd_out_buf #(.N(73)) dut73 (.oe, .taps(t73), .y(y73));
  mldd_out_buf #(.N(21)) dut21 (.oe, .taps(t21), .y(y21));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      oe = 1'($urandom);
      for (int w = 0; w < 73; w++) t73[w] = 1'($urandom);
      for (int w = 0; w < 21; w++) t21[w] = 1'($urandom);
      #1;
      for (int j = 0; j < 73; j++) begin
        checks++;
        if (y73[j] !== (oe & t73[(j + 70) % 73])) begin
          failures++;
          $display("FAIL N=73 oe=%b bit %0d", oe, j);
        end
      end
      for (int j = 0; j < 21; j++) begin
        checks++;
        if (y21[j] !== (oe & t21[(j + 18) % 21])) begin
          failures++;
          $display("FAIL N=21 oe=%b bit %0d", oe, j);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
