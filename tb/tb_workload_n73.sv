// tb_workload_n73: the (73,45) code. All 2628 double-flip patterns are
// decoded and the cumulative detection by iteration 1 and 2 must be 90.41 %
// and 99.20 % (100 % by iteration 3); random 1- to 5-flip patterns check
// detection within three cycles and correction of up to 4 flips.
module tb_workload_n73;
  logic done;
  int checks, failures;

  dscc_code_exerciser #(.S(3), .EXH2(1'b1), .EXH4(1'b0), .NRAND(2000),
                        .PCT2_1(9041), .PCT2_2(9920)) u_ex (.done, .checks, .failures);

  initial begin
    #100ms;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  always @(posedge done) begin
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
