// tb_imdct: checks the IMDCT stage: inverse MDCT (eq. 2), windowing of each
// block type, overlap-add with the previous granule of the same channel, and
// frequency inversion of odd samples in odd subbands. The model evaluates
// the sums in real arithmetic with the standard's windows and keeps its own
// overlap memory per channel and subband. The granule sequence switches
// block types within a channel so that every window meets the overlap of a
// different one; short-block lines arrive with the three windows
// interleaved (line 3k+w is frequency k of window w), as the reorder stage
// delivers them. The long/short subband counters are checked at the end.
// Granules of random Q4.28 samples (|x| < 0.5) are sent with random gaps on
// in_valid; out_ready drops at random. The outputs of every granule are
// compared, in order, with a real-number model written in this testbench
// (tolerance 64 LSB), together with out_idx and the meta data.
// Granule kinds used: ch0: long, start, short, stop; ch1: short, mixed, long.
module tb_imdct;
  import pamp3_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic       in_valid, in_ready, out_valid, out_ready;
  sample_t    in_data, out_data;
  logic [9:0] in_idx, out_idx;
  meta_t      in_meta, out_meta;
  logic [15:0] long_blocks, short_blocks;
  imdct dut (.clk, .rst_n, .in_valid, .in_ready, .in_data, .in_idx, .in_meta,
             .out_valid, .out_ready, .out_data, .out_idx, .out_meta, .long_blocks, .short_blocks);

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
        if (d > 64.0 || out_idx != 10'(ei) || out_meta != em) begin
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
  real ov [2][32][18];
  int  n_long = 0, n_short = 0;

  function automatic real win(input int bt, input int i);
    real s36 = $sin(PI / 36.0 * (real'(i) + 0.5));
    case (bt)
      1: return (i < 18) ? s36 : (i < 24) ? 1.0 : (i < 30) ? $sin(PI / 12.0 * (real'(i - 18) + 0.5)) : 0.0;
      3: return (i < 6) ? 0.0 : (i < 12) ? $sin(PI / 12.0 * (real'(i - 6) + 0.5)) : (i < 18) ? 1.0 : s36;
      default: return s36;
    endcase
  endfunction

  task automatic granule(input int bt, input bit mixed, input bit ch);
    sample_t inv [576];
    meta_t m;
    m = '0; m.block_type = 2'(bt); m.mixed = mixed; m.ch = ch;
    for (int p = 0; p < 576; p++) inv[p] = sample_t'($urandom_range(0, 1 << 25)) - sample_t'(1 << 24);
    for (int s = 0; s < 32; s++) begin
      real z [36];
      bit lng = (bt != 2) || (mixed && s < 2);
      for (int i = 0; i < 36; i++) z[i] = 0.0;
      if (lng) begin
        n_long++;
        for (int i = 0; i < 36; i++) begin
          real a = 0.0;
          for (int k = 0; k < 18; k++)
            a += real'(inv[18 * s + k]) * $cos(PI / 72.0 * real'(2 * i + 19) * real'(2 * k + 1));
          z[i] = a * win((bt == 2) ? 0 : bt, i);
        end
      end else begin
        n_short++;
        for (int w = 0; w < 3; w++)
          for (int i = 0; i < 12; i++) begin
            real a = 0.0;
            for (int k = 0; k < 6; k++)
              a += real'(inv[18 * s + 3 * k + w]) * $cos(PI / 24.0 * real'(2 * i + 7) * real'(2 * k + 1));
            z[6 + 6 * w + i] += a * $sin(PI / 12.0 * (real'(i) + 0.5));
          end
      end
      for (int i = 0; i < 18; i++) begin
        real o = z[i] + ov[ch][s][i];
        if (s % 2 == 1 && i % 2 == 1) o = -o;
        exp_v.push_back(o); exp_i.push_back(18 * s + i); exp_m.push_back(m);
        ov[ch][s][i] = z[18 + i];
      end
    end
    for (int p = 0; p < 576; p++) send(inv[p], p, m);
  endtask

  initial begin
    in_valid = 1'b0; in_data = '0; in_idx = '0; in_meta = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 2; c++) for (int s = 0; s < 32; s++) for (int i = 0; i < 18; i++) ov[c][s][i] = 0.0;
    granule(0, 0, 0);
    granule(2, 0, 1);
    granule(1, 0, 0);
    granule(2, 1, 1);
    granule(2, 0, 0);
    granule(0, 0, 1);
    granule(3, 0, 0);
    while (exp_v.size() != 0) @(posedge clk);
    repeat (50) @(posedge clk);
    checks++;
    if (int'(long_blocks) != n_long || int'(short_blocks) != n_short) begin
      failures++;
      $display("FAIL: block counters %0d/%0d expected %0d/%0d", long_blocks, short_blocks, n_long, n_short);
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
