// tb_buff_rw_arbitor: checks the main data buffer arbiter together with the
// buffer memory. A writer offers the byte sequence f(k) at random times; a
// reader reads sequentially from its read pointer, sometimes jumping back
// (as the bit reservoir does) but never below its floor, and advances the
// floor at random. Checks: every granted read returns f(addr); no read is
// granted for a byte not yet written; no write is accepted while the buffer
// holds DEPTH bytes the reader may still need; both the full stall and the
// empty stall happen.
module tb_buff_rw_arbitor;
  localparam int DEPTH = 2048;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        wr_valid, wr_ready, rd_req, rd_gnt, rd_valid;
  logic [7:0]  wr_data, rd_data;
  logic [31:0] wr_count, rd_addr, rd_floor;
  logic        ram_we, ram_re;
  logic [10:0] ram_waddr, ram_raddr;
  logic [7:0]  ram_wdata, ram_rdata;

  buff_rw_arbitor dut (.clk, .rst_n, .wr_valid, .wr_data, .wr_ready, .wr_count,
                       .rd_req, .rd_addr, .rd_gnt, .rd_valid, .rd_data, .rd_floor,
                       .ram_we, .ram_waddr, .ram_wdata, .ram_re, .ram_raddr, .ram_rdata);
  main_data_buffer u_ram (.clk, .we(ram_we), .waddr(ram_waddr), .wdata(ram_wdata),
                          .re(ram_re), .raddr(ram_raddr), .rdata(ram_rdata));

  function automatic logic [7:0] f(input int unsigned k);
    return 8'((k * 2654435761) >> 13);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  int unsigned wk = 0;
  int unsigned last_rd;
  bit          rd_pend = 1'b0;
  int          full_stalls = 0, empty_stalls = 0, phase = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      // the writer
      if (wr_valid) begin
        if (wr_count - rd_floor >= DEPTH) begin
          check(!wr_ready, "write accepted into a full buffer");
          full_stalls++;
        end else check(wr_ready, "write refused with room in the buffer");
      end
      if (wr_valid && wr_ready) wk <= wk + 1;
      // the reader
      if (rd_pend) check(rd_valid && rd_data == f(last_rd), $sformatf("read of byte %0d", last_rd));
      rd_pend <= rd_gnt;
      if (rd_req) begin
        if (rd_addr >= wr_count) begin
          check(!rd_gnt, "read granted before the byte was written");
          empty_stalls++;
        end else check(rd_gnt, "read refused for a written byte");
      end
      if (rd_gnt) begin
        last_rd <= rd_addr;
        if ($urandom_range(0, 15) == 0 && rd_addr > rd_floor + 8) rd_addr <= rd_addr - 8;
        else rd_addr <= rd_addr + 1;
      end
      if ($urandom_range(0, 3) == 0 && rd_floor + 16 < rd_addr && phase != 1) rd_floor <= rd_floor + 1;
    end
  end

  // phase 0: both sides random; 1: reader idle (buffer fills); 2: writer slow
  always_comb begin
    wr_data = f(wk);
  end
  always @(negedge clk) begin
    wr_valid <= (phase == 2) ? ($urandom_range(0, 7) == 0) : ($urandom_range(0, 1) == 0);
    rd_req   <= (phase == 1) ? 1'b0 : ($urandom_range(0, 3) != 0);
  end

  initial begin
    rd_addr = '0; rd_floor = '0; wr_valid = 1'b0; rd_req = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (3000) @(posedge clk);
    phase = 1;
    repeat (6000) @(posedge clk);
    phase = 2;
    repeat (8000) @(posedge clk);
    check(full_stalls > 0, "buffer never became full");
    check(empty_stalls > 0, "reader never waited for data");
    $display("full stalls %0d, empty stalls %0d, bytes %0d", full_stalls, empty_stalls, wk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
