// main_data_buffer: byte memory that holds the main data (scalefactors and
// Huffman code bits) of the MP3 stream, including the bit reservoir that a
// frame may borrow from the frames before it.
//
// One write port (driven by the synchronizer through the arbiter) and one
// read port (driven by the SCALE&HUFFMAN decoder through the arbiter).
// Addresses are byte addresses modulo DEPTH, so the memory is used as a
// circular buffer. Reads are synchronous: rdata is valid one clock after re.
// The memory is not reset; the arbiter never lets a location be read before
// it has been written.
//
// The depth is this design's choice: 2048 bytes hold the largest reservoir
// (main_data_begin up to 511 bytes) plus the main data of the largest
// 44.1 kHz frame (1044 + 1 bytes less header and side information).
module main_data_buffer #(
  parameter int DEPTH = 2048,
  localparam int AW = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [7:0]    wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [7:0]    rdata
);
  logic [7:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
