// dscc_memory_system: a memory protected by a difference-set cyclic code with
// a majority-logic detector/decoder (MLDD) on its read path.
//
// Write path: a K-bit data word is encoded into an N-bit codeword and stored.
// Read path: the stored codeword is read (one cycle), loaded into the MLDD,
// checked for three cycles and, only if a check sum fired, fully decoded. The
// data bits of the corrected codeword are returned on rd_data with rd_valid.
//
// Read timing, cycles counted from the cycle after rd_en (the cycle in which
// the codeword reaches the decoder): rd_valid in cycle 5 for an error-free
// word, in cycle N + 5 for a word with errors. rd_ready tells when a read may
// be issued; one read is processed at a time. The code corrects up to 2^(S-1)
// bit-flips per word.
//
// Writes are independent of reads (a write to the word being read is seen by
// reads issued after it). The inj_* port flips bits of a stored word, to model
// upsets; tie inj_en low in normal use. The memory depth is this design's own
// choice.
module dscc_memory_system
  import dscc_pkg::*;
#(
  parameter int unsigned S     = 3,
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned N    = code_n(S),
  localparam int unsigned K    = code_k(S),
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  // write port
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [K-1:0]  wr_data,
  // read port
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output logic          rd_ready,
  output logic [K-1:0]  rd_data,
  output logic          rd_valid,
  output logic          rd_decoding,
  // upset injection
  input  logic          inj_en,
  input  logic [AW-1:0] inj_addr,
  input  logic [N-1:0]  inj_mask
);

  logic [N-1:0] wr_code, rd_code, dec_code;
  logic         rd_pending, dec_ready;

  dscc_encoder #(.S(S)) u_enc (.m(wr_data), .c(wr_code));

  dscc_memory #(.W(N), .DEPTH(DEPTH)) u_mem (
    .clk, .we(wr_en), .waddr(wr_addr), .wdata(wr_code),
    .re(rd_en && rd_ready), .raddr(rd_addr), .rdata(rd_code),
    .inj_en, .inj_addr, .inj_mask
  );

  // The codeword is handed to the decoder the cycle after the read.
  assign rd_ready = dec_ready && !rd_pending;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rd_pending <= 1'b0;
    else        rd_pending <= rd_en && rd_ready;
  end

  mldd #(.S(S)) u_mldd (
    .clk, .rst_n, .start(rd_pending), .x(rd_code), .ready(dec_ready),
    .y(dec_code), .finish(rd_valid), .decoding(rd_decoding)
  );

  assign rd_data = dec_code[N-1:N-K];

endmodule
