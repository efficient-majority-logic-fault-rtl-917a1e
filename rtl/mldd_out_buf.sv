// mldd_out_buf: output drivers of the MLDD.
//
// The drivers are disabled (output inactive) except in the cycle in which the
// control unit raises finish; then the shift-register taps are forwarded to
// the output word y. Because every word leaves the decoder after the same net
// rotation (3 shifts for an error-free word, N + 3 for a fully decoded one),
// the mapping from taps to output bits is fixed wiring: output bit j is taken
// from tap (j - 3) mod N.
//
// The drivers are tristate buffers in the original schematic. This version is
// for a two-state, single-driver bus: a disabled output reads as all zeros and
// oe doubles as the valid flag of y. Purely combinational.
module mldd_out_buf
  import dscc_pkg::*;
#(
  parameter int unsigned N = 73
) (
  input  logic         oe,
  input  logic [N-1:0] taps,
  output logic [N-1:0] y
);

  localparam int unsigned ROT = DETECT_CYCLES % N;

  for (genvar j = 0; j < N; j++) begin : g_bit
    assign y[j] = oe & taps[(j + N - ROT) % N];
  end

endmodule
