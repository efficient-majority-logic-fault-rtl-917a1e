// tb_workload_n273: the (273,191) code (S = 4, corrects up to 8 flips). All
// 37128 double-flip patterns are decoded; the cumulative detection by
// iteration 1 and 2 must be 94.51 % and 99.72 % (100 % by iteration 3).
// Random 1- to 5-flip patterns check detection within three cycles and
// correction; random 6-flip patterns are decoded and their detection only
// reported.
module tb_workload_n273;
  logic done;
  int checks, failures;

  dscc_code_exerciser #(.S(4), .EXH2(1'b1), .EXH4(1'b0), .NRAND(300), .NRAND6(1000),
                        .PCT2_1(9451), .PCT2_2(9972)) u_ex (.done, .checks, .failures);

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
