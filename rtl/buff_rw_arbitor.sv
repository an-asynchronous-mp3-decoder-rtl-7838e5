// buff_rw_arbitor: arbitration and validity checking for the main data
// buffer, which the synchronizer fills while the SCALE&HUFFMAN decoder
// reads it at the same time.
//
// Both sides use absolute byte counts (32 bits, never wrapping in practice);
// the buffer address is the count modulo DEPTH.
//  * Writer: a byte offered on wr_valid is accepted (wr_ready) only while
//    the buffer is not full, i.e. while wr_count - rd_floor < DEPTH, where
//    rd_floor is the first byte the reader may still need. Otherwise the
//    writer stalls.
//  * Reader: a read of byte rd_addr is granted (rd_gnt) only when that byte
//    has already been written (rd_addr < wr_count); otherwise the reader
//    stalls. rd_valid/rd_data follow one clock after the grant.
// Both ports may be active in the same cycle (separate RAM ports), so the
// arbitration reduces to these two checks. The original architecture gives the job of
// this controller; the counter-based checks are this design's own choice.
module buff_rw_arbitor #(
  parameter int DEPTH = 2048,
  localparam int AW = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  // writer (synchronizer)
  input  logic          wr_valid,
  input  logic [7:0]    wr_data,
  output logic          wr_ready,
  output logic [31:0]   wr_count,
  // reader (SCALE&HUFFMAN)
  input  logic          rd_req,
  input  logic [31:0]   rd_addr,
  output logic          rd_gnt,
  output logic          rd_valid,
  output logic [7:0]    rd_data,
  input  logic [31:0]   rd_floor,
  // buffer memory
  output logic          ram_we,
  output logic [AW-1:0] ram_waddr,
  output logic [7:0]    ram_wdata,
  output logic          ram_re,
  output logic [AW-1:0] ram_raddr,
  input  logic [7:0]    ram_rdata
);
  logic [31:0] fill;

  assign fill      = wr_count - rd_floor;
  assign wr_ready  = (fill < 32'(DEPTH));
  assign ram_we    = wr_valid && wr_ready;
  assign ram_waddr = wr_count[AW-1:0];
  assign ram_wdata = wr_data;

  assign rd_gnt    = rd_req && (rd_addr < wr_count);
  assign ram_re    = rd_gnt;
  assign ram_raddr = rd_addr[AW-1:0];
  assign rd_data   = ram_rdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_count <= '0;
      rd_valid <= 1'b0;
    end else begin
      if (ram_we) wr_count <= wr_count + 32'd1;
      rd_valid <= rd_gnt;
    end
  end

  // The reader never asks for data it has declared it no longer needs.
  a_rd_above_floor: assert property (@(posedge clk) disable iff (!rst_n)
    rd_req |-> (rd_addr >= rd_floor));
endmodule
