// tb_reorder: checks the reorder stage. Long-block granules must pass
// unchanged; in short granules line i of short band s (start b, width w,
// window = (i-3b)/w, f = (i-3b)%w) must come out at position 3(b+f)+window;
// in mixed granules the first 36 lines keep their place. The model builds
// the input from a target output order, band by band and window by window.
// Granules of random Q4.28 samples (|x| < 0.5) are sent with random gaps on
// in_valid; out_ready drops at random. The outputs of every granule are
// compared, in order, with a real-number model written in this testbench
// (tolerance 0 LSB), together with out_idx and the meta data.
// Granule kinds used: long, start, short, stop, mixed, short again.
module tb_reorder;
  import pamp3_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       in_valid, in_ready, out_valid, out_ready;
  sample_t    in_data, out_data;
  logic [9:0] in_idx, out_idx;
  meta_t      in_meta, out_meta;

  reorder dut (.clk, .rst_n, .in_valid, .in_ready, .in_data, .in_idx, .in_meta,
               .out_valid, .out_ready, .out_data, .out_idx, .out_meta);

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

  int sb [14] = '{0,4,8,12,16,22,30,40,52,66,84,106,136,192};

  task automatic granule(input int bt, input bit mixed, input bit ch);
    sample_t outv [576];
    sample_t inv [576];
    meta_t m;
    m = '0; m.block_type = 2'(bt); m.mixed = mixed; m.ch = ch;
    for (int p = 0; p < 576; p++) outv[p] = sample_t'($urandom_range(0, 1 << 27)) - sample_t'(1 << 26);
    if (bt != 2) inv = outv;
    else begin
      for (int p = 0; p < 36; p++) inv[p] = outv[p];
      for (int s = (mixed ? 3 : 0); s < 13; s++) begin
        int w = sb[s+1] - sb[s];
        for (int win = 0; win < 3; win++)
          for (int f = 0; f < w; f++)
            inv[3 * sb[s] + win * w + f] = outv[3 * (sb[s] + f) + win];
      end
    end
    for (int p = 0; p < 576; p++) begin
      exp_v.push_back(real'(outv[p])); exp_i.push_back(p); exp_m.push_back(m);
    end
    for (int p = 0; p < 576; p++) send(inv[p], p, m);
  endtask

  initial begin
    in_valid = 1'b0; in_data = '0; in_idx = '0; in_meta = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    granule(0, 0, 0);
    granule(1, 0, 1);
    granule(2, 0, 0);
    granule(3, 0, 1);
    granule(2, 1, 0);
    granule(2, 0, 1);
    while (exp_v.size() != 0) @(posedge clk);
    repeat (50) @(posedge clk);

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
