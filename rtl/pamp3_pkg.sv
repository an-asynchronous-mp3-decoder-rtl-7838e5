// pamp3_pkg: types, constants and helper functions shared by the stages of
// the pipelined MP3 (MPEG-1 Layer III) decoder.
//
// Sample format: every spectral and time-domain sample between the
// requantizer and the filterbank is a signed 32-bit fixed-point number with
// 4 integer bits and 28 fraction bits (Q4.28), as the requantizer output is
// specified. Constant coefficients (cosines, windows, butterfly constants)
// are signed Q2.30. q_mul() multiplies a Q4.28 sample by a Q2.30 constant.
//
// Every stage-to-stage channel is a bundled-data valid/ready pair: a beat is
// transferred on a clock edge where valid and ready are both high. This is
// the synchronous counterpart of the four-phase bundled-data handshake of
// the asynchronous original. Each beat carries a meta_t with the granule's
// block type, channel and mode, standing in for the "index" and "ch"
// channels that travel alongside the data between the stages.
//
// Only MPEG-1 Layer III at 44.1 kHz is handled (the scalefactor band tables
// below are the 44.1 kHz ones).
package pamp3_pkg;

  typedef logic signed [31:0] sample_t;   // Q4.28
  typedef logic signed [31:0] coef_t;     // Q2.30

  localparam int GRANULE = 576;           // frequency lines per granule
  localparam int NSB     = 32;            // subbands
  localparam int NSS     = 18;            // samples per subband

  // Granule description that travels with the samples through the pipeline.
  typedef struct packed {
    logic [1:0] mode;        // header mode: 0 stereo, 1 joint, 2 dual, 3 mono
    logic       ch;          // channel of this granule
    logic       gr;          // granule 0/1 of the frame
    logic [1:0] block_type;  // 0 long, 1 start, 2 short, 3 stop
    logic       mixed;       // mixed block flag
  } meta_t;

  // Side information of one granule of one channel (MPEG-1).
  typedef struct packed {
    logic [11:0]      part2_3_length;
    logic [8:0]       big_values;
    logic [7:0]       global_gain;
    logic [3:0]       scalefac_compress;
    logic             window_switching;
    logic [1:0]       block_type;
    logic             mixed;
    logic [2:0][4:0]  table_select;
    logic [2:0][2:0]  subblock_gain;
    logic [3:0]       region0_count;
    logic [2:0]       region1_count;
    logic             preflag;
    logic             scalefac_scale;
    logic             count1table_select;
  } gr_side_t;

  // Everything the bitstream decoder needs to know about one frame.
  typedef struct packed {
    logic [1:0]            mode;
    logic                  nch2;           // two channels
    logic [8:0]            main_data_begin;
    logic [1:0][3:0]       scfsi;          // [ch][group]
    gr_side_t [1:0][1:0]   si;             // [gr][ch]
    logic [31:0]           md_start;       // absolute byte index of this frame's main data
  } frame_info_t;

  // Parameters the requantizer needs for one granule of one channel.
  typedef struct packed {
    meta_t                 meta;
    logic [7:0]            global_gain;
    logic                  scalefac_scale;
    logic                  preflag;
    logic [2:0][2:0]       subblock_gain;
    logic [21:0][3:0]      sf_l;           // long-block scalefactors
    logic [12:0][2:0][3:0] sf_s;           // short-block scalefactors [sfb][win]
  } gr_info_t;

  // Layer III frame length in bytes at 44.1 kHz, without padding:
  // floor(144 * bitrate / 44100).
  function automatic logic [10:0] frame_bytes(input logic [3:0] bitrate_index);
    case (bitrate_index)
      4'd1: return 11'd104;   4'd2: return 11'd130;   4'd3: return 11'd156;
      4'd4: return 11'd182;   4'd5: return 11'd208;   4'd6: return 11'd261;
      4'd7: return 11'd313;   4'd8: return 11'd365;   4'd9: return 11'd417;
      4'd10: return 11'd522;  4'd11: return 11'd626;  4'd12: return 11'd731;
      4'd13: return 11'd835;  4'd14: return 11'd1044;
      default: return 11'd0;
    endcase
  endfunction

  // Long-block scalefactor band boundaries at 44.1 kHz (23 entries).
  function automatic logic [9:0] sfb_long(input int i);
    case (i)
      0: return 10'd0;    1: return 10'd4;    2: return 10'd8;    3: return 10'd12;
      4: return 10'd16;   5: return 10'd20;   6: return 10'd24;   7: return 10'd30;
      8: return 10'd36;   9: return 10'd44;   10: return 10'd52;  11: return 10'd62;
      12: return 10'd74;  13: return 10'd90;  14: return 10'd110; 15: return 10'd134;
      16: return 10'd162; 17: return 10'd196; 18: return 10'd238; 19: return 10'd288;
      20: return 10'd342; 21: return 10'd418; default: return 10'd576;
    endcase
  endfunction

  // Short-block scalefactor band boundaries at 44.1 kHz, per window (14 entries).
  function automatic logic [9:0] sfb_short(input int i);
    case (i)
      0: return 10'd0;   1: return 10'd4;   2: return 10'd8;   3: return 10'd12;
      4: return 10'd16;  5: return 10'd22;  6: return 10'd30;  7: return 10'd40;
      8: return 10'd52;  9: return 10'd66;  10: return 10'd84; 11: return 10'd106;
      12: return 10'd136; default: return 10'd192;
    endcase
  endfunction

  // Pre-emphasis table used when preflag is set.
  function automatic logic [1:0] pretab(input int i);
    case (i)
      11, 12, 13, 14: return 2'd1;
      15, 16:         return 2'd2;
      17, 18, 19:     return 2'd3;
      20:             return 2'd2;
      default:        return 2'd0;
    endcase
  endfunction

  // Scalefactor bit lengths selected by scalefac_compress.
  function automatic logic [2:0] slen1(input logic [3:0] c);
    case (c)
      4'd4, 4'd11, 4'd12, 4'd13: return 3'd3;
      4'd5, 4'd6, 4'd7:          return 3'd1;
      4'd8, 4'd9, 4'd10:         return 3'd2;
      4'd14, 4'd15:              return 3'd4;
      default:                   return 3'd0;
    endcase
  endfunction

  function automatic logic [2:0] slen2(input logic [3:0] c);
    case (c)
      4'd1, 4'd5, 4'd8, 4'd11:          return 3'd1;
      4'd2, 4'd6, 4'd9, 4'd12, 4'd14:   return 3'd2;
      4'd3, 4'd7, 4'd10, 4'd13, 4'd15:  return 3'd3;
      default:                          return 3'd0;
    endcase
  endfunction

  // Extract n (<= 16) bits, MSB first, starting at bit position pos of a
  // 256-bit side-information buffer whose first byte sits in bits [255:248].
  function automatic logic [15:0] si_bits(input logic [255:0] b, input int pos, input int n);
    logic [255:0] t;
    t = b << pos;
    return t[255:240] >> (16 - n);
  endfunction

  // Parse the MPEG-1 Layer III side information (17 bytes mono, 32 bytes
  // two-channel) held in the side-information buffer.
  function automatic frame_info_t parse_side_info(input logic [255:0] b, input logic [1:0] mode);
    frame_info_t f;
    int p;
    int nch;
    f = '0;
    f.mode = mode;
    f.nch2 = (mode != 2'd3);
    nch = f.nch2 ? 2 : 1;
    f.main_data_begin = 9'(si_bits(b, 0, 9));
    p = (nch == 2) ? 9 + 3 : 9 + 5;            // skip private bits
    for (int c = 0; c < 2; c++)
      for (int g = 0; g < 4; g++)
        if (c < nch) begin
          f.scfsi[c][g] = b[255 - p];
          p++;
        end
    for (int gr = 0; gr < 2; gr++)
      for (int c = 0; c < 2; c++) if (c < nch) begin
        gr_side_t s;
        s = '0;
        s.part2_3_length    = 12'(si_bits(b, p, 12)); p += 12;
        s.big_values        = 9'(si_bits(b, p, 9));   p += 9;
        s.global_gain       = 8'(si_bits(b, p, 8));   p += 8;
        s.scalefac_compress = 4'(si_bits(b, p, 4));   p += 4;
        s.window_switching  = b[255 - p];              p += 1;
        if (s.window_switching) begin
          s.block_type = 2'(si_bits(b, p, 2));        p += 2;
          s.mixed      = b[255 - p];                   p += 1;
          for (int r = 0; r < 2; r++) begin
            s.table_select[r] = 5'(si_bits(b, p, 5)); p += 5;
          end
          for (int w = 0; w < 3; w++) begin
            s.subblock_gain[w] = 3'(si_bits(b, p, 3)); p += 3;
          end
        end else begin
          for (int r = 0; r < 3; r++) begin
            s.table_select[r] = 5'(si_bits(b, p, 5)); p += 5;
          end
          s.region0_count = 4'(si_bits(b, p, 4));     p += 4;
          s.region1_count = 3'(si_bits(b, p, 3));     p += 3;
        end
        s.preflag            = b[255 - p]; p += 1;
        s.scalefac_scale     = b[255 - p]; p += 1;
        s.count1table_select = b[255 - p]; p += 1;
        f.si[gr][c] = s;
      end
    return f;
  endfunction

  // Q4.28 sample times Q2.30 constant, rounded, result Q4.28 (wraps on overflow).
  function automatic sample_t q_mul(input sample_t a, input coef_t b);
    logic signed [63:0] p;
    p = 64'(a) * 64'(b) + 64'sd536870912;
    return sample_t'(p >>> 30);
  endfunction

  // Saturate a wide Q4.28 accumulator to 32 bits.
  function automatic sample_t sat32(input logic signed [47:0] v);
    if (v > 48'sh0000_7FFF_FFFF) return 32'sh7FFF_FFFF;
    if (v < -48'sh0000_8000_0000) return 32'sh8000_0000;
    return sample_t'(v);
  endfunction

  // Real number to Q2.30 (elaboration-time table generation).
  function automatic coef_t to_q30(input real r);
    return coef_t'($rtoi(r * 1073741824.0 + (r >= 0.0 ? 0.5 : -0.5)));
  endfunction

endpackage
