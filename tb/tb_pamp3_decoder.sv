// tb_pamp3_decoder: end-to-end test of the whole decoder at its default
// parameters. A generated stream of five 44.1 kHz frames is placed in the
// main memory model:
//   frame 0  mono, both granules all-zero spectra          -> PCM must be 0
//   frame 1  mono, CRC, long block then short block
//   frame 2  mono, start then stop window, scfsi reuse, ancillary bytes
//   frame 3  stereo, mixed/long blocks, one granule with a Huffman table
//            the ROM does not hold
//   frame 4  stereo, long blocks then short blocks
// Main data are packed back to back, so frames 1-4 use the bit reservoir.
// The memory answers with random extra delay and the PCM sink drops
// data_ready at random, so both ends stall the pipeline.
// Checks: number of frames, PCM samples per frame (1152 per channel),
// silent output for frame 0, non-silent output later, channel alternation
// of two-channel frames, the unsupported-table count, end of stream, and
// that every mechanism (reservoir, CRC, scfsi, each block type, mixed
// block, count1 tables A and B, mono pass-through, stereo interleave, BUFF
// bank swap, input and output stalls) happened at least once.
module tb_pamp3_decoder;
  import tb_mp3_gen_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic               mem_req, mem_ack, mem_reset;
  logic [19:0]        mem_addr, mem_boundary;
  logic [63:0]        mem_out;
  logic               data_valid, data_ready, data_ch, eos;
  logic signed [15:0] data_out;
  logic [15:0] frames, unsupported, butterflies, long_blocks, short_blocks;
  logic [15:0] buff_swaps, pcm_clips, pcm_stored;
  int          stall_pct = 20;

  main_memory u_mem (.clk, .mem_req, .mem_addr, .mem_ack, .mem_out, .stall_pct);

  pamp3_decoder dut (
    .clk, .rst_n,
    .mem_req, .mem_addr, .mem_ack, .mem_out, .mem_boundary, .mem_reset,
    .data_valid, .data_ready, .data_out, .data_ch,
    .eos, .frames, .unsupported, .butterflies, .long_blocks, .short_blocks,
    .buff_swaps, .pcm_clips, .pcm_stored
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // mechanism counters
  int n_reservoir = 0, n_crc = 0, n_scfsi = 0, n_c1a = 0, n_c1b = 0;
  int n_mono = 0, n_stereo = 0, n_out_stall = 0, n_mem_stall = 0;
  int n_mixed = 0, n_start = 0, n_stop = 0;

  localparam int NFRAMES = 5;
  int frame_samples [NFRAMES];
  bit frame_stereo  [NFRAMES];
  int expected_total = 0;

  // received PCM
  int got = 0;
  int cur_frame = 0, in_frame = 0;
  int nonzero [NFRAMES];
  int ch_errors = 0;
  logic exp_ch = 1'b0;

  always @(posedge clk) begin
    if (rst_n) begin
      data_ready <= ($urandom_range(0, 99) >= 15);
      if (data_valid && !data_ready) n_out_stall++;
      if (mem_req && !mem_ack) n_mem_stall++;
      if (data_valid && data_ready) begin
        if (cur_frame < NFRAMES) begin
          if (data_out != 0) nonzero[cur_frame]++;
          if (frame_stereo[cur_frame]) begin
            if (data_ch != exp_ch) ch_errors++;
            exp_ch <= !exp_ch;
            n_stereo++;
          end else begin
            if (data_ch != 1'b0) ch_errors++;
            n_mono++;
          end
          in_frame++;
          if (in_frame == frame_samples[cur_frame]) begin
            in_frame <= 0;
            cur_frame <= cur_frame + 1;
          end
        end
        got++;
      end
    end
  end

  function automatic void reuse_scf(inout gran_t g [2][2], input int c, input bit [3:0] s);
    for (int b = 0; b < 21; b++) begin
      int grp = (b < 6) ? 0 : (b < 11) ? 1 : (b < 16) ? 2 : 3;
      if (s[grp]) g[1][c].sf_l[b] = g[0][c].sf_l[b];
      else g[1][c].sf_l[b] &= (1 << ((b < 11) ? slen1(g[1][c].sfc) : slen2(g[1][c].sfc))) - 1;
    end
  endfunction

  task automatic add_frame(input int f, input int k00, input int k10, input int k01, input int k11,
                           input bit stereo, input bit crc, input bit [1:0][3:0] scfsi, input int anc);
    gran_t g [2][2];
    g[0][0] = random_granule(k00);
    g[1][0] = random_granule(k10);
    g[0][1] = random_granule(k01);
    g[1][1] = random_granule(k11);
    for (int c = 0; c < 2; c++) begin
      // the scalefactor length class must match for reuse
      if (scfsi[c] != 0) begin
        g[1][c].sfc = g[0][c].sfc;
        reuse_scf(g, c, scfsi[c]);
        n_scfsi++;
      end
    end
    for (int gr = 0; gr < 2; gr++)
      for (int c = 0; c < (stereo ? 2 : 1); c++) begin
        if (g[gr][c].c1end > 2 * g[gr][c].big_values) begin
          if (g[gr][c].c1b) n_c1b++; else n_c1a++;
        end
        if (g[gr][c].mixed) n_mixed++;
        if (g[gr][c].ws && g[gr][c].block_type == 1) n_start++;
        if (g[gr][c].ws && g[gr][c].block_type == 3) n_stop++;
      end
    build_frame(g, stereo, crc, scfsi, anc);
    if (crc) n_crc++;
    frame_samples[f] = stereo ? 2304 : 1152;
    frame_stereo[f] = stereo;
    expected_total += frame_samples[f];
  endtask

  initial begin
    int nwords;
    for (int f = 0; f < NFRAMES; f++) nonzero[f] = 0;
    add_frame(0, 5, 5, 5, 5, 1'b0, 1'b0, '0, 0);
    add_frame(1, 0, 2, 0, 0, 1'b0, 1'b1, '0, 0);
    add_frame(2, 1, 3, 0, 0, 1'b0, 1'b0, {4'b0000, 4'b1010}, 7);
    add_frame(3, 4, 6, 0, 4, 1'b1, 1'b0, '0, 0);
    add_frame(4, 0, 2, 0, 2, 1'b1, 1'b0, '0, 0);
    n_reservoir = finish_stream();
    if (n_reservoir < 0) $display("FAIL: generated frames do not fit their slots");
    while (stream.size() % 8 != 0) stream.push_back(8'h00);
    nwords = stream.size() / 8;
    for (int w = 0; w < nwords; w++) begin
      logic [63:0] v = '0;
      for (int b = 0; b < 8; b++) v = {v[55:0], stream[8*w + b]};
      u_mem.words[w] = v;
    end
    mem_boundary = 20'(nwords);
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    wait (got == expected_total);
    repeat (2000) @(posedge clk);

    check(frames == 16'(NFRAMES), $sformatf("frames decoded %0d", frames));
    check(got == expected_total, $sformatf("PCM samples %0d expected %0d", got, expected_total));
    check(nonzero[0] == 0, $sformatf("frame 0 (silent) produced %0d non-zero samples", nonzero[0]));
    for (int f = 1; f < NFRAMES; f++)
      check(nonzero[f] > 0, $sformatf("frame %0d produced only silence", f));
    check(ch_errors == 0, $sformatf("%0d channel order errors", ch_errors));
    check(unsupported == 16'd1, $sformatf("unsupported-table granules %0d", unsupported));
    check(eos, "end of stream not reached");
    // mechanisms
    check(n_reservoir > 0, "bit reservoir not used");
    check(n_crc > 0, "no CRC frame");
    check(n_scfsi > 0, "no scfsi reuse");
    check(n_c1a > 0, "count1 table A not used");
    check(n_c1b > 0, "count1 table B not used");
    check(n_mixed > 0 && n_start > 0 && n_stop > 0, "block types start/stop/mixed not all used");
    check(long_blocks > 0, "no long-block IMDCT");
    check(short_blocks > 0, "no short-block IMDCT");
    check(butterflies > 0, "no alias butterflies");
    check(buff_swaps >= 16'd4, "BUFF banks not swapped");
    check(pcm_stored > 0 && n_stereo > 0, "no stereo interleaving");
    check(n_mono > 0, "no mono pass-through");
    check(n_out_stall > 0, "output never stalled");
    check(n_mem_stall > 0, "memory never stalled");
    $display("mechanisms: reservoir=%0d crc=%0d scfsi=%0d c1A=%0d c1B=%0d mixed=%0d start=%0d stop=%0d",
             n_reservoir, n_crc, n_scfsi, n_c1a, n_c1b, n_mixed, n_start, n_stop);
    $display("pipeline: long=%0d short=%0d butterflies=%0d swaps=%0d stored=%0d clips=%0d out_stall=%0d mem_stall=%0d",
             long_blocks, short_blocks, butterflies, buff_swaps, pcm_stored, pcm_clips, n_out_stall, n_mem_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog, %0d of %0d samples, frames=%0d", got, expected_total, frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
