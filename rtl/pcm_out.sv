// pcm_out: the PCM_out stage. It emits the decoded 16-bit PCM samples in
// playing order according to the channel mode bits carried with them.
//  * mode 3 (single channel): every sample is passed straight on.
//  * mode 0 (stereo) and 2 (dual channel): the 576 samples of channel 0 of
//    a granule are stored in a 576 x 16-bit buffer; when channel 1 of that
//    granule arrives, the output alternates channel 0 / channel 1
//    (left, right) sample by sample.
//  * mode 1 (joint stereo) is treated like mode 0: the channel data are
//    interleaved, but the mid/side and intensity stereo decoding that joint
//    stereo would need is not performed.
// out_ch tells which channel a sample belongs to. Handshakes:
// in_valid/in_ready, out_valid/out_ready; no added latency for mode 3.
module pcm_out
  import pamp3_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  output logic               in_ready,
  input  logic signed [15:0] in_pcm,
  input  logic [9:0]         in_idx,
  input  meta_t              in_meta,
  output logic               out_valid,
  input  logic               out_ready,
  output logic signed [15:0] out_pcm,
  output logic               out_ch,
  output logic [15:0]        stored      // channel-0 samples buffered (statistics)
);
  logic signed [15:0] ch0_buf [GRANULE];
  logic               phase;   // 0: send channel 0 sample, 1: send channel 1 sample
  logic               mono, to_buf;

  assign mono   = (in_meta.mode == 2'd3);
  assign to_buf = !mono && !in_meta.ch;

  always_comb begin
    if (mono) begin
      out_valid = in_valid;
      out_pcm   = in_pcm;
      out_ch    = 1'b0;
      in_ready  = out_ready;
    end else if (to_buf) begin
      out_valid = 1'b0;
      out_pcm   = in_pcm;
      out_ch    = 1'b0;
      in_ready  = 1'b1;
    end else begin
      out_valid = in_valid;
      out_pcm   = phase ? in_pcm : ch0_buf[in_idx];
      out_ch    = phase;
      in_ready  = phase && out_ready;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid && to_buf) ch0_buf[in_idx] <= in_pcm;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= 1'b0;
      stored <= '0;
    end else begin
      if (in_valid && to_buf) stored <= stored + 16'd1;
      if (!mono && !to_buf && in_valid && out_ready) phase <= !phase;
    end
  end
endmodule
