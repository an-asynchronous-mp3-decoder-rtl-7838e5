// tb_pcm_out: checks the PCM output stage. Granules are sent in the order
// the filterbank produces them (channel 0 then channel 1 of a granule for
// two-channel modes) with random gaps; out_ready drops at random.
// Expected output: single-channel granules (mode 3) unchanged with channel
// 0; stereo (mode 0), joint stereo (mode 1) and dual channel (mode 2)
// granules as left/right pairs L0 R0 L1 R1 ... with out_ch alternating.
// The count of buffered channel-0 samples is checked at the end.
module tb_pcm_out;
  import pamp3_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic               in_valid, in_ready, out_valid, out_ready, out_ch;
  logic signed [15:0] in_pcm, out_pcm;
  logic [9:0]         in_idx;
  meta_t              in_meta;
  logic [15:0]        stored;

  pcm_out dut (.clk, .rst_n, .in_valid, .in_ready, .in_pcm, .in_idx, .in_meta,
               .out_valid, .out_ready, .out_pcm, .out_ch, .stored);

  logic signed [15:0] exp_v [$];
  bit                 exp_c [$];
  int                 n_stored = 0;

  always @(posedge clk) begin
    out_ready <= ($urandom_range(0, 3) != 0);
    if (out_valid && out_ready) begin
      checks++;
      if (exp_v.size() == 0) begin
        failures++;
        $display("FAIL: unexpected output");
      end else begin
        logic signed [15:0] e;
        bit c;
        e = exp_v.pop_front(); c = exp_c.pop_front();
        if (out_pcm != e || out_ch != c) begin
          failures++;
          if (failures < 10) $display("FAIL: got %0d ch %0d expected %0d ch %0d", out_pcm, out_ch, e, c);
        end
      end
    end
  end

  task automatic send(input logic signed [15:0] v, input int i, input meta_t m);
    @(negedge clk);
    while ($urandom_range(0, 5) == 0) @(negedge clk);
    in_pcm = v; in_idx = 10'(i); in_meta = m; in_valid = 1'b1;
    #1;
    while (!in_ready) @(negedge clk);
    @(posedge clk);
    #1 in_valid = 1'b0;
  endtask

  task automatic granule(input logic [1:0] mode);
    logic signed [15:0] a [576];
    logic signed [15:0] b [576];
    meta_t m;
    m = '0; m.mode = mode;
    for (int i = 0; i < 576; i++) begin a[i] = 16'($urandom); b[i] = 16'($urandom); end
    if (mode == 2'd3) begin
      for (int i = 0; i < 576; i++) begin exp_v.push_back(a[i]); exp_c.push_back(1'b0); end
      for (int i = 0; i < 576; i++) send(a[i], i, m);
    end else begin
      for (int i = 0; i < 576; i++) begin
        exp_v.push_back(a[i]); exp_c.push_back(1'b0);
        exp_v.push_back(b[i]); exp_c.push_back(1'b1);
      end
      m.ch = 1'b0;
      for (int i = 0; i < 576; i++) send(a[i], i, m);
      n_stored += 576;
      m.ch = 1'b1;
      for (int i = 0; i < 576; i++) send(b[i], i, m);
    end
  endtask

  initial begin
    in_valid = 1'b0; in_pcm = '0; in_idx = '0; in_meta = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    granule(2'd3);
    granule(2'd0);
    granule(2'd3);
    granule(2'd2);
    granule(2'd1);
    while (exp_v.size() != 0) @(posedge clk);
    repeat (20) @(posedge clk);
    checks++;
    if (int'(stored) != n_stored) begin failures++; $display("FAIL: stored %0d expected %0d", stored, n_stored); end
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
