// xm_control: control unit of the compression system.
//
// Sequences the compressor and the decompressor. After reset both engines are held:
// the compressor's input FIFO may fill, the decompressor refuses code words. A start
// request empties both dictionaries in one clock (state CLEAR), so that the compressor
// and the decompressor begin from the same, empty dictionary, and then releases both
// engines (state RUN) until the next reset. The unit, its clock and reset inputs and
// its START output to the decompressor come from the system block diagram; what it
// does is this design's choice, since only its name is known.
//
// Timing: start seen at edge k -> clear high during cycle k+1 -> comp_en and
// decomp_start high from edge k+2 on. start is ignored once the unit has left IDLE.
module xm_control (
  input  logic clk,
  input  logic reset,
  input  logic start,         // request to start a compression run
  output logic dict_clear,    // empty both dictionaries
  output logic comp_en,       // compressor may consume tuples
  output logic decomp_start,  // decompressor may accept code words
  output logic busy
);
  typedef enum logic [1:0] {IDLE, CLEAR, RUN} state_e;
  state_e state, state_n;

  always_comb begin
    state_n = state;
    unique case (state)
      IDLE:    if (start) state_n = CLEAR;
      CLEAR:   state_n = RUN;
      RUN:     state_n = RUN;
      default: state_n = IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (reset) state <= IDLE;
    else       state <= state_n;
  end

  assign dict_clear   = (state == CLEAR);
  assign comp_en      = (state == RUN);
  assign decomp_start = (state == RUN);
  assign busy         = (state != IDLE);
endmodule
