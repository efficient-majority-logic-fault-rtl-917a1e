// mld_shift_reg: the N-tap cyclic shift register of the majority-logic decoder
// together with the XOR that corrects the bit under decoding.
//
// Each tap has a load multiplexer, so a whole codeword x is written in one
// clock (load). While shift is high the register rotates by one position per
// clock towards tap 0: tap i takes tap i+1, and tap N-1 takes tap 0 XOR corr.
// Tap 0 therefore holds the bit under decoding, and corr (the majority gate's
// verdict on that bit) inverts it as it wraps around. After k shifts,
// tap i holds original bit (i + k) mod N. All taps are visible on q for the
// check-sum matrix and the output drivers.
//
// The tap-wise load multiplexers, the rotation direction and the correction
// XOR on the feedback path follow the classic majority-logic decoder
// structure.
//
// Interface: load has priority over shift; both are sampled on the rising
// clock edge. The contents are not reset, since a word is always loaded before
// it is used; rst_n only clears them to give a defined start-up value.
module mld_shift_reg #(
  parameter int unsigned N = 73
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic         shift,
  input  logic [N-1:0] din,
  input  logic         corr,
  output logic [N-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     q <= '0;
    else if (load)  q <= din;
    else if (shift) q <= {q[0] ^ corr, q[N-1:1]};
  end

endmodule
