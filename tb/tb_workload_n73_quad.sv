// tb_workload_n73_quad: the (73,45) code with every one of the 1,088,430
// quadruple-flip patterns. Each must be detected within the three detection
// cycles and corrected; the cumulative detection by iteration 1 and 2 must be
// 97.35 % and 99.92 % (100 % by iteration 3). Random 1-, 2-, 3- and 5-flip
// patterns are run as well.
module tb_workload_n73_quad;
  logic done;
  int checks, failures;

  dscc_code_exerciser #(.S(3), .EXH2(1'b0), .EXH4(1'b1), .NRAND(200),
                        .PCT4_1(9735), .PCT4_2(9992)) u_ex (.done, .checks, .failures);

  initial begin
    #2000ms;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  always @(posedge done) begin
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
