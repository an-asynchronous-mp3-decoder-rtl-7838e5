// tb_main_data_buffer: checks the main data byte memory against a model.
// Random writes and reads (both ports in the same clock, addresses over the
// whole circular range) are compared one clock after each read with the
// model's contents at the time of the read (read-before-write on a clash of
// addresses). Every location is first written once so that no read sees an
// unwritten byte.
module tb_main_data_buffer;
  localparam int DEPTH = 2048;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        we, re;
  logic [10:0] waddr, raddr;
  logic [7:0]  wdata, rdata;
  logic [7:0]  model [DEPTH];
  logic [7:0]  expect_q;
  logic        pending = 1'b0;

  main_data_buffer dut (.clk, .we, .waddr, .wdata, .re, .raddr, .rdata);

  initial begin
    we = 1'b0; re = 1'b0; waddr = '0; raddr = '0; wdata = '0;
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1'b1; waddr = 11'(a); wdata = 8'($urandom); model[a] = wdata;
    end
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      if (pending) begin
        checks++;
        if (rdata !== expect_q) begin
          failures++;
          if (failures < 10) $display("FAIL: read %0d got %02x expected %02x", n, rdata, expect_q);
        end
      end
      re = ($urandom_range(0, 3) != 0);
      raddr = 11'($urandom);
      we = ($urandom_range(0, 1) != 0);
      waddr = ($urandom_range(0, 7) == 0) ? raddr : 11'($urandom);
      wdata = 8'($urandom);
      pending = re;
      expect_q = model[raddr];
      @(posedge clk);
      if (we) model[waddr] = wdata;
    end
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
