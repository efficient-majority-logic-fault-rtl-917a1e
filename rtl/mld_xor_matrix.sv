// mld_xor_matrix: the XOR matrix of the majority-logic decoder. It computes the
// J = 2^S + 1 parity check sums B_1..B_J of the difference-set cyclic code that
// are orthogonal on tap 0 of the shift register.
//
// Check sum i is the XOR of the taps (l_k - l_i) mod N, k = 0..J-1, where
// {l_k} is the code's perfect difference set (see dscc_pkg). Every check sum
// contains tap 0 and no other tap appears in two of them. For the (73,45) code,
// check sum 0 uses taps 0, 2, 10, 24, 25, 29, 36, 42 and 45. On an error-free
// codeword all sums are 0 for every rotation, because the code is cyclic.
//
// Purely combinational; b[i] is check sum i+1. The check-sum structure is that
// of standard one-step majority-logic decoding of these codes; indexing the
// sums from tap 0 (the tap that feeds the correction XOR) is this
// implementation's way of labelling the taps.
module mld_xor_matrix
  import dscc_pkg::*;
#(
  parameter int unsigned S = 3,
  localparam int unsigned N = code_n(S),
  localparam int unsigned J = code_j(S)
) (
  input  logic [N-1:0] r,
  output logic [J-1:0] b
);

  for (genvar i = 0; i < J; i++) begin : g_sum
    logic [J-1:0] taps;
    for (genvar k = 0; k < J; k++) begin : g_tap
      assign taps[k] = r[check_tap(S, i, k)];
    end
    assign b[i] = ^taps;
  end

endmodule
