// main_memory: behavioural model of the main memory that holds the MP3
// stream: 64-bit words, 20-bit word address (8 MB). A request (mem_req high
// with mem_addr) is acknowledged after LATENCY clocks with the word on
// mem_out for one clock; the decoder then drops mem_req. When stall_pct is
// non-zero, each acknowledgement is delayed by extra random clocks, which
// exercises the decoder's waiting on memory. Testbenches fill `words`
// directly.
module main_memory #(
  parameter int WORDS   = 1 << 20,
  parameter int LATENCY = 1
) (
  input  logic        clk,
  input  logic        mem_req,
  input  logic [19:0] mem_addr,
  output logic        mem_ack,
  output logic [63:0] mem_out,
  input  int          stall_pct
);
  logic [63:0] words [WORDS];
  int          wait_cnt = 0;
  initial mem_ack = 1'b0;

  always @(posedge clk) begin
    mem_ack <= 1'b0;
    if (mem_req && !mem_ack) begin
      if (wait_cnt == 0)
        wait_cnt <= LATENCY + ((stall_pct > 0 && $urandom_range(0, 99) < stall_pct) ? $urandom_range(1, 6) : 0);
      else if (wait_cnt == 1) begin
        mem_ack  <= 1'b1;
        mem_out  <= words[mem_addr];
        wait_cnt <= 0;
      end else wait_cnt <= wait_cnt - 1;
    end
  end
endmodule
