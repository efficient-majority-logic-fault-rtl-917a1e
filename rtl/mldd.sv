// mldd: majority-logic detector/decoder for a difference-set cyclic code.
//
// A codeword x read from memory is loaded into an N-tap cyclic shift register.
// Every following cycle the XOR matrix forms the J check sums orthogonal on
// tap 0, the majority gate decides whether that bit is wrong, the correction
// XOR inverts it if so, and the register rotates by one. This is plain one-step
// majority-logic decoding, correcting up to 2^(S-1) bit-flips in N cycles.
//
// The detector reuses that datapath: if no check sum is 1 in any of the first
// three cycles, the word is taken to be error-free and is released right away
// (any pattern of up to five bit-flips makes some check sum 1 within those three
// cycles). Otherwise decoding runs to N + 3 shifts, so that both cases leave
// the word at the same rotation and the output mapping is fixed.
//
// Interface: present x with start while ready is high. y is valid, and all
// zeros otherwise, in the cycle finish is high: 5 cycles after the start cycle
// counted inclusively for an error-free word, N + 5 for a word that needed
// decoding. decoding is high while the full decoding runs. y is the corrected
// codeword, bit-for-bit aligned with x.
//
// The datapath, the three-cycle detection and the N + 3 alignment follow the
// published MLDD scheme. The ready/start handshake, the two-state output
// drivers and the decoding flag are this implementation's own.
module mldd
  import dscc_pkg::*;
#(
  parameter int unsigned S = 3,
  localparam int unsigned N = code_n(S),
  localparam int unsigned J = code_j(S)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [N-1:0] x,
  output logic         ready,
  output logic [N-1:0] y,
  output logic         finish,
  output logic         decoding
);

  logic [N-1:0] taps;
  logic [J-1:0] b;
  logic         maj, load, shift;

  mld_shift_reg #(.N(N)) u_sr (
    .clk, .rst_n, .load, .shift, .din(x), .corr(maj), .q(taps)
  );

  mld_xor_matrix #(.S(S)) u_xm (.r(taps), .b);

  mld_majority #(.J(J)) u_maj (.b, .maj);

  mldd_control #(.N(N), .J(J)) u_ctl (
    .clk, .rst_n, .start, .b, .ready, .load, .shift, .finish, .decoding
  );

  mldd_out_buf #(.N(N)) u_ob (.oe(finish), .taps, .y);

endmodule
