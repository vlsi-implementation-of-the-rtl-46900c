// decoding_memory: three-register trace-back survivor memory with output reordering.
//
// Each symbol the ACS delivers a column of 16 path selection bits (2 per state) and
// the most likely state. The columns go, ten at a time, into one of three 16x10
// two-port RAMs used as circular buffers. All four RAMs share the address of a
// decimal up-down counter, so each block is read back opposite to the way it was
// written, i.e. newest column first. During block k:
//   * RAM(k mod 3) is written with block k. One clock phase earlier at the same
//     address it is read, and the block k-3 it still holds is decoded;
//   * RAM((k-1) mod 3) holding block k-1 is traced back from the most likely state
//     of its last column;
//   * the third RAM holds block k-2, whose starting state the trace-back delivers
//     at the end of block k; it is decoded during block k+1.
// The decoding unit emits the information bits newest first; they are written into
// a 2x10 RAM at the same shared address and read back during the next block, when
// the counter runs the other way, so they leave in transmission order.
//
// Interface: path_sel/ml_state from the ACS every clock; dec_bits = {x2, x1}
// (BIT1, BIT0) with dec_valid. Timing: a column accepted on a clock edge leaves as
// decoded bits 41 clocks later (four blocks plus one output register). Each
// trace-back and decoding pass covers 20 steps from the best state, so a decision
// rests on 10 to 19 steps of trace-back, and a column is decided 21 to 39 clocks
// (30 on average) after it is written. The RAM organisation, shared addresses,
// read-before-write, the 20-step pass, the reordering RAM and the 30-symbol delay
// are the published design's; the order in which the three RAMs change roles is this
// design's.
module decoding_memory
  import tcm_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  sel_t   path_sel [NSTATES],
  input  state_t ml_state,
  output sel_t   dec_bits,
  output logic   dec_valid
);

  localparam int unsigned CW = 2 * NSTATES;

  logic [3:0]    rd_addr, wr_addr;
  logic [1:0]    sel;
  logic          last;
  logic [2:0]    blocks;
  logic [CW-1:0] column_in;
  logic [CW-1:0] ram_q [3];
  logic [CW-1:0] tb_column, dec_column;
  state_t        start_state;
  sel_t          bits_rev, bits_fwd;

  always_comb
    for (int n = 0; n < NSTATES; n++) column_in[2*n +: 2] = path_sel[n];

  tbk_address_gen #(.DEPTH(BLK)) u_addr (
    .clk, .rst, .rd_addr, .wr_addr, .sel, .last, .blocks
  );

  for (genvar i = 0; i < 3; i++) begin : g_ram
    dp_ram #(.WIDTH(CW), .DEPTH(BLK), .AW(4)) u_ram (
      .clk, .we(sel == 2'(i)), .waddr(wr_addr), .wdata(column_in),
      .raddr(rd_addr), .rdata(ram_q[i])
    );
  end

  // trace-back mux: RAM written in the previous block; decode mux: current RAM
  always_comb begin
    unique case (sel)
      2'd0:    begin tb_column = ram_q[2]; dec_column = ram_q[0]; end
      2'd1:    begin tb_column = ram_q[0]; dec_column = ram_q[1]; end
      default: begin tb_column = ram_q[1]; dec_column = ram_q[2]; end
    endcase
  end

  traceback_unit u_tb (
    .clk, .rst, .last, .ml_state, .column(tb_column), .start_state
  );

  decode_unit u_dec (
    .clk, .rst, .last, .start_state, .column(dec_column), .bits(bits_rev)
  );

  dp_ram #(.WIDTH(2), .DEPTH(BLK), .AW(4)) u_reorder (
    .clk, .we(1'b1), .waddr(wr_addr), .wdata(bits_rev),
    .raddr(rd_addr), .rdata(bits_fwd)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      dec_bits  <= '0;
      dec_valid <= 1'b0;
    end else begin
      dec_bits  <= bits_fwd;
      dec_valid <= (blocks >= 3'd4);
    end
  end

endmodule
