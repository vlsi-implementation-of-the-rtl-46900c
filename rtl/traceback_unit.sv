// traceback_unit: walks the survivor path backwards through one block.
//
// On the last symbol of a block the unit is loaded with the most likely state of
// the column being written. During the next block it reads, one column per clock
// from the newest to the oldest, the path selection bits of its current state and
// steps to the predecessor {sel, state[2]}. After ten steps it has reached the
// state at the end of the block before, which it hands to the decoding unit on
// the same clock on which it is reloaded.
module traceback_unit
  import tcm_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  logic             last,                 // last symbol of a block
  input  state_t           ml_state,             // most likely state of the new column
  input  logic [2*NSTATES-1:0] column,           // column read from the traced RAM
  output state_t           start_state           // end state of the older block
);

  state_t cur;

  assign start_state = pred_state(cur, column[2*cur +: 2]);

  always_ff @(posedge clk) begin
    if (rst)       cur <= '0;
    else if (last) cur <= ml_state;
    else           cur <= start_state;
  end

endmodule
