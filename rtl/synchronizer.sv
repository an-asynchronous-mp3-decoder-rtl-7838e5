// synchronizer: front end of the Synchronizer&Huffman stage. It reads the
// MP3 stream from main memory, locks onto frame headers, keeps the header
// and the side information of the current frame in its header buffer and
// side-information buffer, hands the decoded side information to the
// SCALE&HUFFMAN decoder, and copies the frame's main data bytes into the
// main data buffer.
//
// Main memory: 64-bit words, 20-bit word address (8 MB), read with a
// request/acknowledge pair: mem_req stays high with mem_addr until mem_ack
// returns the word on mem_out. Bytes are taken from a word most significant
// byte first (stream order). Words at addresses >= mem_boundary are not part
// of the stream; when the fetch address reaches mem_boundary the stream is
// over, mem_reset pulses for one clock and eos stays high.
//
// Per frame: header hunt (sync word 0xFFF, MPEG-1, Layer III, 44.1 kHz,
// valid bit rate; anything else is skipped byte by byte), optional 16-bit
// CRC (skipped), 17 or 32 bytes of side information, then the side
// information is offered on fi_valid/fi_ready (parsed into frame_info_t,
// with the absolute index at which this frame's main data will be written),
// then frame_bytes + padding - 4 - CRC - side-info bytes of main data are
// written through md_valid/md_ready. One byte is processed per clock when
// the memory and the buffer keep up.
//
// The original architecture gives the job of this module and its three buffers; the
// memory handshake, byte order, the meaning given to mem_boundary and
// mem_reset, and the 44.1 kHz-only header filter are this design's choices.
module synchronizer
  import pamp3_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // main memory
  output logic        mem_req,
  output logic [19:0] mem_addr,
  input  logic        mem_ack,
  input  logic [63:0] mem_out,
  input  logic [19:0] mem_boundary,
  output logic        mem_reset,
  // side information to SCALE&HUFFMAN
  output logic        fi_valid,
  output frame_info_t fi,
  input  logic        fi_ready,
  // main data to the main data buffer (through the arbiter)
  output logic        md_valid,
  output logic [7:0]  md_data,
  input  logic        md_ready,
  input  logic [31:0] md_count,
  // status
  output logic        eos,
  output logic [15:0] frames,
  output logic [31:0] header        // header buffer: last frame header
);
  typedef enum logic [3:0] {S_HUNT0, S_HUNT1, S_H2, S_H3, S_CRC, S_SI, S_SEND, S_MD} state_t;

  // word fetch and byte extraction
  logic [63:0] wbuf;
  logic [3:0]  wbytes;            // bytes left in wbuf
  logic        byte_avail, take;
  logic [7:0]  cur;

  assign byte_avail = (wbytes != 0);
  assign cur        = wbuf[63:56];

  state_t       st;
  logic [255:0] sibuf;            // side-information buffer
  logic [5:0]   si_cnt, si_len;
  logic [1:0]   crc_cnt;
  logic [10:0]  md_left;
  logic         prot_n, pad;
  logic [3:0]   br_idx;
  logic [1:0]   mode;

  assign si_len = (mode == 2'd3) ? 6'd17 : 6'd32;

  // which state consumes the current byte
  always_comb begin
    take = 1'b0;
    if (byte_avail) begin
      case (st)
        S_HUNT0, S_HUNT1, S_H2, S_H3, S_CRC, S_SI: take = 1'b1;
        S_MD: take = md_ready;
        default: take = 1'b0;
      endcase
    end
  end

  assign md_valid = (st == S_MD) && byte_avail;
  assign md_data  = cur;
  assign fi_valid = (st == S_SEND);

  // side information as decoded from the side-information buffer
  always_comb begin
    fi = parse_side_info(sibuf, mode);
    fi.md_start = md_count;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mem_req   <= 1'b0;
      mem_addr  <= '0;
      mem_reset <= 1'b0;
      eos       <= 1'b0;
      wbuf      <= '0;
      wbytes    <= '0;
    end else begin
      mem_reset <= 1'b0;
      if (take) begin
        wbuf   <= {wbuf[55:0], 8'h00};
        wbytes <= wbytes - 4'd1;
      end
      if (mem_req) begin
        if (mem_ack) begin
          mem_req  <= 1'b0;
          wbuf     <= mem_out;
          wbytes   <= 4'd8;
          mem_addr <= mem_addr + 20'd1;
        end
      end else if (!eos && (wbytes == 0 || (wbytes == 1 && take))) begin
        if (mem_addr >= mem_boundary) begin
          eos       <= 1'b1;
          mem_reset <= 1'b1;
        end else begin
          mem_req <= 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= S_HUNT0;
      header     <= '0;
      sibuf   <= '0;
      si_cnt  <= '0;
      crc_cnt <= '0;
      md_left <= '0;
      prot_n  <= 1'b1;
      pad     <= 1'b0;
      br_idx  <= '0;
      mode    <= '0;
      frames  <= '0;
    end else begin
      case (st)
        S_HUNT0: if (take && cur == 8'hFF) begin
          header[31:24] <= cur;
          st <= S_HUNT1;
        end
        S_HUNT1: if (take) begin
          // 111 sync, 1 = MPEG-1, 01 = Layer III
          if (cur[7:1] == 7'b1111101) begin
            header[23:16] <= cur;
            prot_n <= cur[0];
            st <= S_H2;
          end else if (cur != 8'hFF) st <= S_HUNT0;
        end
        S_H2: if (take) begin
          header[15:8] <= cur;
          br_idx <= cur[7:4];
          pad    <= cur[1];
          if (cur[7:4] == 4'd0 || cur[7:4] == 4'd15 || cur[3:2] != 2'd0) st <= S_HUNT0;
          else st <= S_H3;
        end
        S_H3: if (take) begin
          header[7:0] <= cur;
          mode     <= cur[7:6];
          si_cnt   <= '0;
          sibuf    <= '0;
          crc_cnt  <= '0;
          st       <= prot_n ? S_SI : S_CRC;
        end
        S_CRC: if (take) begin
          crc_cnt <= crc_cnt + 2'd1;
          if (crc_cnt == 2'd1) st <= S_SI;
        end
        S_SI: if (take) begin
          sibuf[255 - 8*int'(si_cnt) -: 8] <= cur;
          si_cnt <= si_cnt + 6'd1;
          if (si_cnt == si_len - 6'd1) begin
            st <= S_SEND;
            md_left <= frame_bytes(br_idx) + 11'(pad) - 11'd4 - (prot_n ? 11'd0 : 11'd2)
                       - 11'(si_len);
          end
        end
        S_SEND: begin
          if (fi_ready) begin
            st <= S_MD;
            frames <= frames + 16'd1;
          end
        end
        S_MD: if (take) begin
          md_left <= md_left - 11'd1;
          if (md_left == 11'd1) st <= S_HUNT0;
        end
        default: st <= S_HUNT0;
      endcase
    end
  end
endmodule
