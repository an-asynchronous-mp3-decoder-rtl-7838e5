// tb_filterbank: checks the polyphase synthesis filterbank: the 64-point
// matrixing into a per-channel V vector of 1024 values shifted by 64 per
// time slot, the U/D windowing and the sum of 16 terms per PCM sample, and
// the scaling to 16-bit PCM with saturation. The model follows the
// standard's description step by step (shift V, V[i] = sum cos((16+i)(2k+1)
// pi/64) S[k], build U from V, W = U*D, sum W) in real arithmetic, with the
// same generated window D as the design (Blackman-windowed sinc, odd blocks
// of 64 negated). Two channels are interleaved per granule so each keeps
// its own V history; a last loud granule must clip, and the clip counter is
// compared with the model's count.
// Granules of random Q4.28 samples (|x| < 0.5) are sent with random gaps on
// in_valid; out_ready drops at random. The outputs of every granule are
// compared, in order, with a real-number model written in this testbench
// (tolerance 2 LSB), together with out_idx and the meta data.
// Granule kinds used: three granules per channel, the last one loud.
module tb_filterbank;
  import pamp3_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       in_valid, in_ready, out_valid, out_ready;
  sample_t    in_data, out_data;
  logic [9:0] in_idx, out_idx;
  meta_t      in_meta, out_meta;
  logic signed [15:0] out_pcm;
  logic [15:0] clips;
  assign out_data = sample_t'(out_pcm);
  filterbank dut (.clk, .rst_n, .in_valid, .in_ready, .in_data, .in_idx, .in_meta,
                  .out_valid, .out_ready, .out_pcm, .out_idx, .out_meta, .clips);

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
        if (d > 2.0 || out_idx != 10'(ei) || out_meta != em) begin
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

  localparam real PI = 3.14159265358979323846;
  real v [2][1024];
  real d [512];
  int  n_clip = 0;

  task automatic granule(input bit ch, input int amp_log2);
    sample_t inv [576];
    meta_t m;
    m = '0; m.ch = ch;
    for (int p = 0; p < 576; p++)
      inv[p] = sample_t'($urandom_range(0, 1 << amp_log2)) - sample_t'(1 << (amp_log2 - 1));
    for (int t = 0; t < 18; t++) begin
      real u [512];
      for (int n = 1023; n >= 64; n--) v[ch][n] = v[ch][n - 64];
      for (int i = 0; i < 64; i++) begin
        real a = 0.0;
        for (int k = 0; k < 32; k++)
          a += $cos(real'((16 + i) * (2 * k + 1)) * PI / 64.0) * real'(inv[32 * t + k]);
        // V is held in Q4.28 and saturates like the design's
        if (a > 2147483647.0) a = 2147483647.0;
        if (a < -2147483648.0) a = -2147483648.0;
        v[ch][i] = a;
      end
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 32; j++) begin
          u[64 * i + j]      = v[ch][128 * i + j];
          u[64 * i + 32 + j] = v[ch][128 * i + 96 + j];
        end
      for (int j = 0; j < 32; j++) begin
        real s = 0.0;
        for (int i = 0; i < 16; i++) s += u[j + 32 * i] * d[j + 32 * i];
        s = s / 8192.0;
        if (s > 32767.0) begin s = 32767.0; n_clip++; end
        if (s < -32768.0) begin s = -32768.0; n_clip++; end
        exp_v.push_back(s); exp_i.push_back(32 * t + j); exp_m.push_back(m);
      end
    end
    for (int p = 0; p < 576; p++) send(inv[p], p, m);
  endtask

  initial begin
    in_valid = 1'b0; in_data = '0; in_idx = '0; in_meta = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 2; c++) for (int n = 0; n < 1024; n++) v[c][n] = 0.0;
    for (int n = 0; n < 512; n++) begin
      real x;
      x = PI * (real'(n) - 255.5) / 64.0;
      d[n] = ((n / 64) % 2 == 1 ? -1.0 : 1.0) * $sin(x) / x
             * (0.42 - 0.5 * $cos(2.0 * PI * (real'(n) + 0.5) / 512.0) + 0.08 * $cos(4.0 * PI * (real'(n) + 0.5) / 512.0));
    end
    granule(0, 25);
    granule(1, 24);
    granule(0, 26);
    granule(1, 25);
    granule(0, 24);
    granule(1, 30);
    while (exp_v.size() != 0) @(posedge clk);
    repeat (50) @(posedge clk);
    checks++;
    if (int'(clips) != n_clip || n_clip == 0) begin
      failures++;
      $display("FAIL: clips %0d expected %0d", clips, n_clip);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    $display("FAIL: watchdog, %0d outputs outstanding", exp_v.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
