// tb_workload_n1057: the (1057,813) code (S = 5, corrects up to 16 flips).
// Random error-free words and random 1- to 5-flip patterns: detection within
// three cycles, latency 5 or N + 5 = 1062 cycles, and correction are checked;
// random 6-flip patterns are decoded and their detection only reported.
module tb_workload_n1057;
  logic done;
  int checks, failures;

  dscc_code_exerciser #(.S(5), .EXH2(1'b0), .EXH4(1'b0), .NRAND(150), .NRAND6(150))
    u_ex (.done, .checks, .failures);

  initial begin
    #500ms;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  always @(posedge done) begin
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
