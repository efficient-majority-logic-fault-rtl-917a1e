// mld_majority: majority gate of the majority-logic decoder. Its output is 1
// when more of the J check sums are 1 than are 0, i.e. when the bit under
// decoding is judged wrong and must be inverted. J is odd for these codes
// (2^S + 1), so there is no tie.
//
// The rule (more ones than zeros) is the standard majority-logic decision;
// building it as a population count compared with J/2 is this
// implementation's choice. Purely combinational.
module mld_majority #(
  parameter int unsigned J = 9
) (
  input  logic [J-1:0] b,
  output logic         maj
);

  localparam int unsigned CW = $clog2(J + 1);

  logic [CW-1:0] ones;

  always_comb begin
    ones = '0;
    for (int unsigned i = 0; i < J; i++) ones = ones + CW'(b[i]);
    maj = (2 * 32'(ones)) > J;
  end

endmodule
