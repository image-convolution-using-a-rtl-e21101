// map_ram: the mapping table memory of the convolution board.
//
// 512K words of 32 bits: for each of the 64K input pixels, eight consecutive
// words (the slots) describe the output events that pixel produces. The
// address is {input pixel, slot}. The board holds this table in an external
// SRAM of that size; here it is an array with one write port, used by the
// host to load a kernel, and one read port, used by the mapper. The read is
// synchronous: rdata holds the word addressed in the previous clock in which
// re was high. A read and a write of the same word in one clock return the
// old word. The table has no reset: the host must load every slot of every
// pixel that can receive events. The two ports and the synchronous read are
// this design's choices; the size follows the board.
module map_ram #(
  parameter int unsigned AW = aer_pkg::TAB_AW,
  parameter int unsigned DW = aer_pkg::TAB_DW
) (
  input  logic          clk,
  // host write port
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  // mapper read port
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
  end

endmodule
