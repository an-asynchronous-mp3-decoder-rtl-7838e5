// pamp3_decoder: pipelined MPEG-1 Layer III (MP3) decoder. The MP3 stream is
// read from main memory and decoded by eight stages that run concurrently
// and pass data to each other over valid/ready channels:
//
//   Synchronizer&Huffman (synchronizer + main data buffer + buff_rw_arbitor
//   + scale_huffman) -> requantizer -> reorder -> anti_alias -> imdct ->
//   buff -> filterbank -> pcm_out -> data_out
//
// Each stage works at its own pace and stalls only when its neighbour is
// not ready, the clocked equivalent of the handshake-connected pipeline of
// the asynchronous original. Samples flow one per beat; each beat carries
// its line or sample index and the granule's meta data (channel, mode,
// block type).
//
// Interface:
//  * main memory: 64-bit words, 20-bit word address, mem_req/mem_ack
//    request-acknowledge; mem_boundary is the number of words holding the
//    stream; mem_reset pulses when the whole stream has been fetched.
//  * data_out: 16-bit PCM samples with data_valid/data_ready; data_ch is the
//    channel (two-channel streams alternate 0, 1).
//  * status: eos, frame count, the number of granules that used a Huffman
//    table the ROM does not hold, and event counters of the pipeline.
// Only 44.1 kHz MPEG-1 Layer III streams are decoded; joint-stereo streams
// are decoded as two independent channels.
module pamp3_decoder
  import pamp3_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  // main memory
  output logic               mem_req,
  output logic [19:0]        mem_addr,
  input  logic               mem_ack,
  input  logic [63:0]        mem_out,
  input  logic [19:0]        mem_boundary,
  output logic               mem_reset,
  // PCM output
  output logic               data_valid,
  input  logic               data_ready,
  output logic signed [15:0] data_out,
  output logic               data_ch,
  // status
  output logic               eos,
  output logic [15:0]        frames,
  output logic [15:0]        unsupported,
  output logic [15:0]        butterflies,
  output logic [15:0]        long_blocks,
  output logic [15:0]        short_blocks,
  output logic [15:0]        buff_swaps,
  output logic [15:0]        pcm_clips,
  output logic [15:0]        pcm_stored
);
  // synchronizer <-> scale_huffman
  logic        fi_valid, fi_ready;
  frame_info_t fi;
  logic [31:0] header;
  // main data path
  logic        md_valid, md_ready;
  logic [7:0]  md_data;
  logic [31:0] md_count;
  logic        rd_req, rd_gnt, rd_valid;
  logic [31:0] rd_addr, rd_floor;
  logic [7:0]  rd_data;
  logic        ram_we, ram_re;
  logic [10:0] ram_waddr, ram_raddr;
  logic [7:0]  ram_wdata, ram_rdata;

  synchronizer u_sync (
    .clk, .rst_n,
    .mem_req, .mem_addr, .mem_ack, .mem_out, .mem_boundary, .mem_reset,
    .fi_valid, .fi, .fi_ready,
    .md_valid, .md_data, .md_ready, .md_count,
    .eos, .frames, .header
  );

  buff_rw_arbitor #(.DEPTH(2048)) u_arb (
    .clk, .rst_n,
    .wr_valid (md_valid), .wr_data (md_data), .wr_ready (md_ready), .wr_count (md_count),
    .rd_req, .rd_addr, .rd_gnt, .rd_valid, .rd_data, .rd_floor,
    .ram_we, .ram_waddr, .ram_wdata, .ram_re, .ram_raddr, .ram_rdata
  );

  main_data_buffer #(.DEPTH(2048)) u_mdbuf (
    .clk,
    .we (ram_we), .waddr (ram_waddr), .wdata (ram_wdata),
    .re (ram_re), .raddr (ram_raddr), .rdata (ram_rdata)
  );

  // scale_huffman -> requantizer
  logic               is_valid, is_ready;
  logic signed [13:0] is_val;
  logic [9:0]         is_idx;
  gr_info_t           info;

  scale_huffman u_sh (
    .clk, .rst_n,
    .fi_valid, .fi, .fi_ready,
    .rd_req, .rd_addr, .rd_gnt, .rd_valid, .rd_data, .rd_floor,
    .is_valid, .is_ready, .is_val, .is_idx, .info,
    .unsupported
  );

  // sample channels between the later stages
  logic       s1_valid, s1_ready, s2_valid, s2_ready, s3_valid, s3_ready;
  logic       s4_valid, s4_ready, s5_valid, s5_ready, s6_valid, s6_ready;
  sample_t    s1_data, s2_data, s3_data, s4_data, s5_data;
  logic [9:0] s1_idx, s2_idx, s3_idx, s4_idx, s5_idx, s6_idx;
  meta_t      s1_meta, s2_meta, s3_meta, s4_meta, s5_meta, s6_meta;
  logic signed [15:0] s6_pcm;

  requantizer u_req (
    .clk, .rst_n,
    .is_valid, .is_ready, .is_val, .is_idx, .info,
    .xr_valid (s1_valid), .xr_ready (s1_ready), .xr (s1_data), .xr_idx (s1_idx), .xr_meta (s1_meta)
  );

  reorder u_reorder (
    .clk, .rst_n,
    .in_valid (s1_valid), .in_ready (s1_ready), .in_data (s1_data), .in_idx (s1_idx), .in_meta (s1_meta),
    .out_valid (s2_valid), .out_ready (s2_ready), .out_data (s2_data), .out_idx (s2_idx), .out_meta (s2_meta)
  );

  anti_alias u_alias (
    .clk, .rst_n,
    .in_valid (s2_valid), .in_ready (s2_ready), .in_data (s2_data), .in_idx (s2_idx), .in_meta (s2_meta),
    .out_valid (s3_valid), .out_ready (s3_ready), .out_data (s3_data), .out_idx (s3_idx), .out_meta (s3_meta),
    .butterflies
  );

  imdct u_imdct (
    .clk, .rst_n,
    .in_valid (s3_valid), .in_ready (s3_ready), .in_data (s3_data), .in_idx (s3_idx), .in_meta (s3_meta),
    .out_valid (s4_valid), .out_ready (s4_ready), .out_data (s4_data), .out_idx (s4_idx), .out_meta (s4_meta),
    .long_blocks, .short_blocks
  );

  buff u_buff (
    .clk, .rst_n,
    .in_valid (s4_valid), .in_ready (s4_ready), .in_data (s4_data), .in_idx (s4_idx), .in_meta (s4_meta),
    .out_valid (s5_valid), .out_ready (s5_ready), .out_data (s5_data), .out_idx (s5_idx), .out_meta (s5_meta),
    .swaps (buff_swaps)
  );

  filterbank u_fb (
    .clk, .rst_n,
    .in_valid (s5_valid), .in_ready (s5_ready), .in_data (s5_data), .in_idx (s5_idx), .in_meta (s5_meta),
    .out_valid (s6_valid), .out_ready (s6_ready), .out_pcm (s6_pcm), .out_idx (s6_idx), .out_meta (s6_meta),
    .clips (pcm_clips)
  );

  pcm_out u_pcm (
    .clk, .rst_n,
    .in_valid (s6_valid), .in_ready (s6_ready), .in_pcm (s6_pcm), .in_idx (s6_idx), .in_meta (s6_meta),
    .out_valid (data_valid), .out_ready (data_ready), .out_pcm (data_out), .out_ch (data_ch),
    .stored (pcm_stored)
  );
endmodule
