// tbk_address_gen: address and RAM-role sequencer of the three-RAM trace-back memory.
//
// A decimal (0..9) up-down counter gives one address per symbol to all four RAMs.
// It counts 0..9, then 9..0, then 0..9 and so on, so every block of ten symbols
// is read back in the opposite direction to the one it was written in. A modulo-3
// block counter SEL names the RAM written in the current block; the RAM written
// in the previous block is the one traced back, and the RAM written three blocks
// ago is decoded while it is being overwritten.
//
// Outputs: RD and WR addresses (equal: the RAMs read before they write), SEL,
// a flag for the last symbol of a block, and a count of completed blocks
// (saturating at 7) used to flag valid output. Synchronous reset starts an up
// block with SEL = 0. The up-down decimal counter and the common addresses are
// the published design's; the block counter and the flags are this design's.
module tbk_address_gen #(
  parameter int unsigned DEPTH = 10
) (
  input  logic       clk,
  input  logic       rst,
  output logic [3:0] rd_addr,
  output logic [3:0] wr_addr,
  output logic [1:0] sel,
  output logic       last,
  output logic [2:0] blocks
);

  logic [3:0] cnt;
  logic       up;

  assign rd_addr = cnt;
  assign wr_addr = cnt;
  assign last    = up ? (cnt == 4'(DEPTH - 1)) : (cnt == 4'd0);

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt    <= '0;
      up     <= 1'b1;
      sel    <= '0;
      blocks <= '0;
    end else if (last) begin
      up     <= ~up;
      sel    <= (sel == 2'd2) ? 2'd0 : sel + 2'd1;
      if (blocks != 3'd7) blocks <= blocks + 3'd1;
    end else begin
      cnt <= up ? cnt + 4'd1 : cnt - 4'd1;
    end
  end

endmodule
