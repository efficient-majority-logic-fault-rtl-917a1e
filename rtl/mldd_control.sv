// mldd_control: control unit of the majority-logic detector/decoder (MLDD).
//
// It decides, after the first three decoding cycles, whether a word read from
// memory is error-free. In each of those cycles OR1 combines all check sums
// B_j into one bit. The detection register holds the OR1 results of the two
// previous cycles; in the third cycle OR2 combines them with the current OR1
// result. If OR2 is 0 no check sum was ever 1 and the word is released at
// once; otherwise decoding continues until the word has been shifted N + 3
// times, which brings it back to the same alignment as an error-free word, so
// the output needs no multiplexer.
//
// A counter numbers the shifts of the current word. The FSM uses it to find
// the third detection cycle (count 2) and the end of full decoding
// (count N + 2, the (N+3)-th shift).
//
// Timing, counted in clock cycles from the cycle in which start is accepted:
//   cycle 1        load      (shift register written)
//   cycles 2..4    DETECT    (three shifts, detection)
//   cycle 5        FINISH    error-free word: finish high
//   cycles 5..N+4  DECODE    word with a detected error
//   cycle N+5      FINISH    finish high
// start is accepted while ready is high (in IDLE and in the FINISH cycle, so
// words can follow each other without a gap). load, shift and finish are
// combinational decodes of the state for the datapath.
//
// The counter, the two-flop detection register, OR1, OR2 and the FSM follow
// the control schematic of the design; the width of the counter (it also
// counts the full-decoding cycles) and the exact state encoding are this
// implementation's own.
module mldd_control
  import dscc_pkg::*;
#(
  parameter int unsigned N = 73,
  parameter int unsigned J = 9
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [J-1:0] b,
  output logic         ready,
  output logic         load,
  output logic         shift,
  output logic         finish,
  output logic         decoding
);

  localparam int unsigned CW = $clog2(N + 4);
  localparam logic [CW-1:0] LAST_DETECT = CW'(DETECT_CYCLES - 1);
  localparam logic [CW-1:0] LAST_SHIFT  = CW'(N + DETECT_CYCLES - 1);

  mldd_state_t state, state_nx;
  logic [CW-1:0] count;
  logic [1:0]    det_reg;      // OR1 results of the two previous cycles
  logic          or1, or2;

  assign or1 = |b;
  assign or2 = or1 | det_reg[0] | det_reg[1];

  assign ready    = (state == ST_IDLE) || (state == ST_FINISH);
  assign load     = ready && start;
  assign shift    = (state == ST_DETECT) || (state == ST_DECODE);
  assign finish   = (state == ST_FINISH);
  assign decoding = (state == ST_DECODE);

  always_comb begin
    state_nx = state;
    unique case (state)
      ST_IDLE:   if (start) state_nx = ST_DETECT;
      ST_DETECT: if (count == LAST_DETECT) state_nx = or2 ? ST_DECODE : ST_FINISH;
      ST_DECODE: if (count == LAST_SHIFT)  state_nx = ST_FINISH;
      ST_FINISH: state_nx = start ? ST_DETECT : ST_IDLE;
      default:   state_nx = ST_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= ST_IDLE;
      count   <= '0;
      det_reg <= '0;
    end else begin
      state <= state_nx;
      // reset_counter / reset_detection_register when a new word is loaded
      if (load) begin
        count   <= '0;
        det_reg <= '0;
      end else if (shift) begin
        count <= count + 1'b1;
        if (state == ST_DETECT) det_reg <= {det_reg[0], or1};
      end
    end
  end

  // A word is only accepted when the unit is ready.
  a_start_ready: assert property (@(posedge clk) disable iff (!rst_n)
    start |-> ready);
  // finish lasts exactly one cycle unless a new word follows immediately.
  a_finish_pulse: assert property (@(posedge clk) disable iff (!rst_n)
    finish && !start |=> !finish);

endmodule
