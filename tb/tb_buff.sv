// tb_buff: checks the BUFF stage (transposition between the IMDCT and the
// filterbank). Samples arrive per subband (index 18*sb + t); output n of a
// granule must be input 18*(n % 32) + n / 32 (time slot t = n / 32, subband
// sb = n % 32). Four granules are sent back to back so both banks fill
// while the other is read; the swap counter must reach four.
// Granules of random Q4.28 samples (|x| < 0.5) are sent with random gaps on
// in_valid; out_ready drops at random. The outputs of every granule are
// compared, in order, with a real-number model written in this testbench
// (tolerance 0 LSB), together with out_idx and the meta data.
// Granule kinds used: four granules of alternating channel.
module tb_buff;
  import pamp3_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       in_valid, in_ready, out_valid, out_ready;
  sample_t    in_data, out_data;
  logic [9:0] in_idx, out_idx;
  meta_t      in_meta, out_meta;
  logic [15:0] swaps;
  buff dut (.clk, .rst_n, .in_valid, .in_ready, .in_data, .in_idx, .in_meta,
            .out_valid, .out_ready, .out_data, .out_idx, .out_meta, .swaps);

  real   exp_v [$];
  int    exp_i [$];
  meta_t exp_m [$];

  always @(posedge clk) begin
    out_ready <= ($urandom_range(0, 4) != 0);
    if (out_valid && out_ready) begin
      real e, d;
      int ei;
      meta_t em;
      checks++;
      if (exp_v.size() == 0) begin
        failures++;
        $display("FAIL: unexpected output");
      end else begin
        e = exp_v.pop_front(); ei = exp_i.pop_front(); em = exp_m.pop_front();
        d = real'(out_data) - e;
        if (d < 0) d = -d;
        if (d > 0.0 || out_idx != 10'(ei) || out_meta != em) begin
          failures++;
          if (failures < 10) $display("FAIL: out %0d (expected index %0d) got %0d expected %0f", out_idx, ei, out_data, e);
        end
      end
    end
  end

  task automatic send(input sample_t v, input int i, input meta_t m);
    @(negedge clk);
    while ($urandom_range(0, 5) == 0) @(negedge clk);
    in_data = v; in_idx = 10'(i); in_meta = m; in_valid = 1'b1;
    #1;
    while (!in_ready) @(negedge clk);
    @(posedge clk);
    #1 in_valid = 1'b0;
  endtask

  task automatic granule(input bit ch);
    sample_t inv [576];
    meta_t m;
    m = '0; m.ch = ch; m.mode = 2'd0;
    for (int p = 0; p < 576; p++) inv[p] = sample_t'($urandom);
    for (int n = 0; n < 576; n++) begin
      exp_v.push_back(real'(inv[18 * (n % 32) + n / 32])); exp_i.push_back(n); exp_m.push_back(m);
    end
    for (int p = 0; p < 576; p++) send(inv[p], p, m);
  endtask

  initial begin
    in_valid = 1'b0; in_data = '0; in_idx = '0; in_meta = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int g = 0; g < 4; g++) granule(g[0]);
    while (exp_v.size() != 0) @(posedge clk);
    repeat (50) @(posedge clk);
    checks++;
    if (swaps != 16'd4) begin failures++; $display("FAIL: swaps %0d", swaps); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("FAIL: watchdog, %0d outputs outstanding", exp_v.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
