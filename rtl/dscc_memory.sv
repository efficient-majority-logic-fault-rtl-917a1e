// dscc_memory: the codeword store of the protected memory, a simple
// single-port-write, single-port-read synchronous RAM of DEPTH words of W bits.
//
// Writes take effect at the rising clock edge when we is high. A read with re
// high returns mem[raddr] on rdata one cycle later (registered read data).
//
// A second write-side port, inj_*, XORs a mask into a stored word at the clock
// edge. It models single event upsets flipping stored bits, so that tests can
// corrupt a codeword after it has been written; tie inj_en low in use. If a
// write and an injection hit the same word in one cycle the write wins.
// Depth, the registered read and the injection port are this design's own
// choices; the memory itself is only a named block of the architecture.
module dscc_memory #(
  parameter int unsigned W     = 73,
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata,
  input  logic          inj_en,
  input  logic [AW-1:0] inj_addr,
  input  logic [W-1:0]  inj_mask
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we)
      mem[waddr] <= wdata;
    if (inj_en && !(we && waddr == inj_addr))
      mem[inj_addr] <= mem[inj_addr] ^ inj_mask;
    if (re)
      rdata <= mem[raddr];
  end

endmodule
