// tb_pamp3_stream: a longer stream through the whole decoder at its
// default parameters, standing in for decoding a piece of music. NFRAMES
// frames are generated with a random mix of single-channel and stereo
// frames, CRC words, all block types (long, start, short, stop, mixed),
// silent granules and ancillary data; main data are packed back to back so
// the bit reservoir is in constant use. Only the Huffman tables the decoder
// holds are used. The memory answers with random delays and the PCM sink
// stalls at random.
// Checks: frames decoded, PCM samples per frame (1152 per channel), channel
// order, no unsupported granule, end of stream, and the average number of
// clocks per frame (printed; it must stay below the bound derived from the
// filterbank's 2,600 clocks per time slot).
module tb_pamp3_stream;
  import tb_mp3_gen_pkg::*;

  localparam int NFRAMES = 24;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic               mem_req, mem_ack, mem_reset;
  logic [19:0]        mem_addr, mem_boundary;
  logic [63:0]        mem_out;
  logic               data_valid, data_ready, data_ch, eos;
  logic signed [15:0] data_out;
  logic [15:0] frames, unsupported, butterflies, long_blocks, short_blocks;
  logic [15:0] buff_swaps, pcm_clips, pcm_stored;
  int          stall_pct = 10;

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
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  bit frame_stereo [NFRAMES];
  int frame_samples [NFRAMES];
  int expected_total = 0, got = 0, cur_frame = 0, in_frame = 0, ch_errors = 0;
  int frame_errors = 0, n_stereo_frames = 0;
  logic exp_ch = 1'b0;
  longint cycles = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      cycles++;
      data_ready <= ($urandom_range(0, 99) >= 10);
      if (data_valid && data_ready) begin
        if (cur_frame < NFRAMES) begin
          if (frame_stereo[cur_frame]) begin
            if (data_ch != exp_ch) ch_errors++;
            exp_ch <= !exp_ch;
          end else if (data_ch != 1'b0) ch_errors++;
          in_frame++;
          if (in_frame == frame_samples[cur_frame]) begin
            in_frame <= 0;
            cur_frame <= cur_frame + 1;
          end
        end else frame_errors++;
        got++;
      end
    end
  end

  initial begin
    int nwords, nres;
    for (int f = 0; f < NFRAMES; f++) begin
      gran_t g [2][2];
      bit stereo, crc;
      stereo = ($urandom_range(0, 1) == 1);
      crc = ($urandom_range(0, 3) == 0);
      for (int gr = 0; gr < 2; gr++)
        for (int c = 0; c < 2; c++) g[gr][c] = random_granule($urandom_range(0, 5));
      build_frame(g, stereo, crc, '0, $urandom_range(0, 3));
      frame_stereo[f] = stereo;
      frame_samples[f] = stereo ? 2304 : 1152;
      expected_total += frame_samples[f];
      if (stereo) n_stereo_frames++;
    end
    nres = finish_stream();
    check(nres > 0, $sformatf("stream layout (frames using the reservoir: %0d)", nres));
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
    check(frame_errors == 0, "samples beyond the last frame");
    check(ch_errors == 0, $sformatf("%0d channel order errors", ch_errors));
    check(unsupported == 16'd0, "unsupported granules in a supported stream");
    check(eos, "end of stream not reached");
    check(n_stereo_frames > 0 && n_stereo_frames < NFRAMES, "stream lacks a mono or a stereo frame");
    // filterbank bound: 18 slots x ~2,650 clocks per granule and channel
    check(cycles < longint'(expected_total / 576) * 18 * 2800 + 200000,
          $sformatf("decoding took %0d clocks", cycles));
    $display("%0d frames (%0d stereo), %0d samples, %0d clocks, %0d clocks per frame",
             NFRAMES, n_stereo_frames, got, cycles, cycles / NFRAMES);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog, %0d of %0d samples, frames=%0d", got, expected_total, frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
