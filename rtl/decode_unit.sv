// decode_unit: final trace-back pass that emits the decoded information bits.
//
// On the last symbol of a block it is loaded with the state handed over by the
// trace-back unit. During the next block it walks the oldest block backwards,
// one column per clock, and for each step outputs the two information bits
// {x2, x1} of the branch taken (in reverse time order) before moving to the
// predecessor state.
module decode_unit
  import tcm_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 last,
  input  state_t               start_state,
  input  logic [2*NSTATES-1:0] column,       // column read from the decoded RAM
  output sel_t                 bits
);

  state_t cur;
  sel_t   s;

  assign s    = column[2*cur +: 2];
  assign bits = info_bits(cur, s);

  always_ff @(posedge clk) begin
    if (rst)       cur <= '0;
    else if (last) cur <= start_state;
    else           cur <= pred_state(cur, s);
  end

endmodule
