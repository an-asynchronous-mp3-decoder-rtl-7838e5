// tb_anti_alias: checks the alias-reduction stage. For long blocks (types 0, 1,
// 3) eight butterflies are applied at each of the 31 subband boundaries, for
// mixed blocks only at the boundary between subbands 0 and 1, and short
// blocks pass unchanged. The model uses the standard's c[i] constants in
// real arithmetic and checks the butterfly counter.
// Granules of random Q4.28 samples (|x| < 0.5) are sent with random gaps on
// in_valid; out_ready drops at random. The outputs of every granule are
// compared, in order, with a real-number model written in this testbench
// (tolerance 8 LSB), together with out_idx and the meta data.
// Granule kinds used: long, short, mixed, start, stop.
module tb_anti_alias;
  import pamp3_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       in_valid, in_ready, out_valid, out_ready;
  sample_t    in_data, out_data;
  logic [9:0] in_idx, out_idx;
  meta_t      in_meta, out_meta;
  logic [15:0] butterflies;
  anti_alias dut (.clk, .rst_n, .in_valid, .in_ready, .in_data, .in_idx, .in_meta,
                  .out_valid, .out_ready, .out_data, .out_idx, .out_meta, .butterflies);

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
        if (d > 8.0 || out_idx != 10'(ei) || out_meta != em) begin
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

  real cc [8] = '{-0.6, -0.535, -0.33, -0.185, -0.095, -0.041, -0.0142, -0.0037};
  int   exp_bf = 0;

  task automatic granule(input int bt, input bit mixed, input bit ch);
    sample_t inv [576];
    real x [576];
    meta_t m;
    int nb;
    m = '0; m.block_type = 2'(bt); m.mixed = mixed; m.ch = ch;
    for (int p = 0; p < 576; p++) begin
      inv[p] = sample_t'($urandom_range(0, 1 << 28)) - sample_t'(1 << 27);
      x[p] = real'(inv[p]);
    end
    nb = (bt != 2) ? 32 : (mixed ? 2 : 1);
    for (int s = 1; s < nb; s++)
      for (int i = 0; i < 8; i++) begin
        real cs, ca, a, b;
        cs = 1.0 / $sqrt(1.0 + cc[i] * cc[i]);
        ca = cc[i] / $sqrt(1.0 + cc[i] * cc[i]);
        a = x[18 * s - 1 - i]; b = x[18 * s + i];
        x[18 * s - 1 - i] = a * cs - b * ca;
        x[18 * s + i]     = b * cs + a * ca;
        exp_bf++;
      end
    for (int p = 0; p < 576; p++) begin
      exp_v.push_back(x[p]); exp_i.push_back(p); exp_m.push_back(m);
    end
    for (int p = 0; p < 576; p++) send(inv[p], p, m);
  endtask

  initial begin
    in_valid = 1'b0; in_data = '0; in_idx = '0; in_meta = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    granule(0, 0, 0);
    granule(2, 0, 1);
    granule(2, 1, 0);
    granule(1, 0, 1);
    granule(3, 0, 0);
    while (exp_v.size() != 0) @(posedge clk);
    repeat (50) @(posedge clk);
    checks++;
    if (int'(butterflies) != exp_bf) begin failures++; $display("FAIL: butterflies %0d expected %0d", butterflies, exp_bf); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    $display("FAIL: watchdog, %0d outputs outstanding", exp_v.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
