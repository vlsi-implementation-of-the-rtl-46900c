// dp_ram: two-port RAM, one write port and one read port.
//
// Used for the three 16x10 trace-back RAMs and the 2x10 output reordering RAM of
// the decoding memory. The read port is asynchronous and the write is registered
// on the clock edge, so a read and a write of the same address in one clock
// return the old word: the read happens "before" the write, which lets one RAM be
// decoded and overwritten in the same symbol period, as the published design requires.
// Contents are not reset.
module dp_ram #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 10,
  parameter int unsigned AW    = 4
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk)
    if (we && waddr < AW'(DEPTH)) mem[waddr] <= wdata;

  assign rdata = (raddr < AW'(DEPTH)) ? mem[raddr] : '0;

endmodule
