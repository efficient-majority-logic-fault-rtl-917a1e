// dscc_pkg: constants and helper functions shared by the difference-set
// cyclic code (DSCC) encoder and the majority-logic detector/decoder.
//
// A DSCC is selected by one integer S (s >= 2). With q = 2^S it has
//   code length    N = 2^(2S) + 2^S + 1
//   message bits   K = 2^(2S) + 2^S - 3^S
//   parity bits    N - K = 3^S + 1
//   check sums     J = 2^S + 1, orthogonal on one bit, correcting 2^(S-1) errors.
// S = 2, 3, 4, 5 give the (21,11), (73,45), (273,191) and (1057,813) codes.
//
// The code is built from a perfect difference set P = {l_0 = 0, l_1, ..., l_q}
// modulo N: every non-zero residue is the difference of exactly one ordered
// pair of elements of P. The parity checks of the code are all cyclic shifts of
// the incidence vector of P: for every m, XOR over j of c[(m + l_j) mod N] = 0.
// The J checks that contain bit 0 are the shifts by -l_i, i.e. the position
// sets { (l_j - l_i) mod N : j }. Two of them share only bit 0, which is what
// makes one-step majority decoding of bit 0 possible.
//
// The sets below are Singer difference sets: taking a primitive element a of
// GF(2^(3S)), P is the set of exponents i (mod N) for which a^i lies in the
// two-dimensional GF(2^S)-subspace spanned by 1 and a, shifted so that it
// contains 0. For S = 3 the set is the one used by the (73,45) example code,
// {0,2,10,24,25,29,36,42,45}. Each row of DSET_TABLE lists q+1 elements,
// padded with 0. The code family and its parameters are the standard DSCC
// construction; the choice of Singer sets for S = 2, 4, 5 is this
// implementation's.
package dscc_pkg;

  localparam int unsigned MAX_S  = 5;
  localparam int unsigned MAX_J  = (1 << MAX_S) + 1;   // 33

  typedef int unsigned dset_row_t [MAX_J];

  // Perfect difference sets for S = 2..5 (rows 0, 1 unused).
  localparam dset_row_t DSET_TABLE [MAX_S+1] = '{
    '{0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0,
      0, 0, 0, 0, 0, 0, 0, 0, 0},
    '{0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0,
      0, 0, 0, 0, 0, 0, 0, 0, 0},
    '{0, 1, 6, 8, 18, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0,
      0, 0, 0, 0, 0, 0, 0, 0, 0},
    '{0, 2, 10, 24, 25, 29, 36, 42, 45, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0,
      0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0},
    '{0, 1, 18, 46, 55, 69, 131, 151, 170, 175, 181, 183, 210, 217, 248, 258,
      270, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0},
    '{0, 1, 3, 7, 15, 31, 54, 63, 109, 127, 138, 219, 255, 277, 298, 338, 348,
      439, 452, 511, 528, 555, 597, 677, 697, 702, 754, 792, 879, 905, 924,
      990, 1023}
  };

  function automatic int unsigned pow_int(input int unsigned b, input int unsigned e);
    int unsigned r;
    r = 1;
    for (int unsigned i = 0; i < e; i++) r = r * b;
    return r;
  endfunction

  function automatic int unsigned code_n(input int unsigned s);
    return (1 << (2 * s)) + (1 << s) + 1;
  endfunction

  function automatic int unsigned code_k(input int unsigned s);
    return (1 << (2 * s)) + (1 << s) - pow_int(3, s);
  endfunction

  function automatic int unsigned code_j(input int unsigned s);
    return (1 << s) + 1;
  endfunction

  // Element j of the difference set of code S.
  function automatic int unsigned dset(input int unsigned s, input int unsigned j);
    return DSET_TABLE[s][j];
  endfunction

  // Position of the k-th tap of check sum i (orthogonal on bit 0) in a code
  // of length n: (l_k - l_i) mod n.
  function automatic int unsigned check_tap(input int unsigned s, input int unsigned i,
                                            input int unsigned k);
    int unsigned n;
    n = code_n(s);
    return (DSET_TABLE[s][k] + n - DSET_TABLE[s][i]) % n;
  endfunction

  // Number of shift-register moves after which the MLDD output is valid. An
  // error-free word is released after the three detection cycles; a word that is
  // fully decoded is shifted N + 3 times, which lands on the same alignment.
  localparam int unsigned DETECT_CYCLES = 3;

  // States of the MLDD control unit.
  //   IDLE   : waiting for a word; a start loads the shift register.
  //   DETECT : the three detection cycles (check sums ORed into the detection
  //            register, register shifted with correction).
  //   DECODE : full majority-logic decoding, until N + 3 shifts in total.
  //   FINISH : output cycle, finish high and the output drivers enabled.
  typedef enum logic [1:0] {
    ST_IDLE   = 2'd0,
    ST_DETECT = 2'd1,
    ST_DECODE = 2'd2,
    ST_FINISH = 2'd3
  } mldd_state_t;

endpackage
