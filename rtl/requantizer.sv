// requantizer: the re-quantizer stage. For each quantized value is_i it
// computes xr_i = sign(is_i) * |is_i|^(4/3) * 2^(C/4) (eq. 1) as a Q4.28
// sample and passes it on with the granule's meta data.
//
// Sub-blocks, as in the stage's structure:
//  * requant_ctrl (this module's FSM) accepts a value, starts the
//    pow43_rom read and releases a result when fras has finished;
//  * fras_l / fras_s (functions below) compute the exponent C for long and
//    short blocks:
//      long : C = global_gain - 210 - (sf_l[sfb] + preflag*pretab[sfb]) << (1+scalefac_scale)
//      short: C = global_gain - 210 - 8*subblock_gain[w] - sf_s[sfb][w] << (1+scalefac_scale)
//    In a mixed block the first 36 lines are long-block lines.
//  * fras multiplies |is|^(4/3) by 2^(C/4).
// Scalefactor bands and windows are found from the line index with the
// 44.1 kHz band tables (only that sample rate is handled).
//
// Timing: one value every 3 clocks (accept, ROM read, output register);
// is_ready/xr_valid handshakes on both sides.
module requantizer
  import pamp3_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               is_valid,
  output logic               is_ready,
  input  logic signed [13:0] is_val,
  input  logic [9:0]         is_idx,
  input  gr_info_t           info,
  output logic               xr_valid,
  input  logic               xr_ready,
  output sample_t            xr,
  output logic [9:0]         xr_idx,
  output meta_t              xr_meta
);
  // exponent for a long-block line
  function automatic logic signed [11:0] fras_l(input gr_info_t g, input logic [9:0] i);
    int sfb = 0;
    int m;
    for (int b = 0; b < 22; b++) if (i >= sfb_long(b)) sfb = b;
    m = int'(g.sf_l[sfb]) + (g.preflag ? int'(pretab(sfb)) : 0);
    return 12'(int'(g.global_gain) - 210 - (m << (1 + int'(g.scalefac_scale))));
  endfunction

  // exponent for a short-block line (lines ordered band, window, frequency)
  function automatic logic signed [11:0] fras_s(input gr_info_t g, input logic [9:0] i);
    int sfb = 0;
    int w, off, width;
    for (int b = 0; b < 13; b++) if (int'(i) >= 3 * int'(sfb_short(b))) sfb = b;
    width = int'(sfb_short(sfb + 1)) - int'(sfb_short(sfb));
    off = int'(i) - 3 * int'(sfb_short(sfb));
    w = (off < width) ? 0 : (off < 2 * width) ? 1 : 2;
    return 12'(int'(g.global_gain) - 210 - 8 * int'(g.subblock_gain[w])
               - (int'(g.sf_s[sfb][w]) << (1 + int'(g.scalefac_scale))));
  endfunction

  typedef enum logic [1:0] {R_IDLE, R_ROM, R_OUT} rstate_t;
  rstate_t             st;
  logic                neg;
  logic signed [11:0]  c;
  logic [31:0]         p43;
  sample_t             xr_n;
  logic                short_line;
  logic [12:0]         mag;

  assign is_ready = (st == R_IDLE);
  assign xr_valid = (st == R_OUT);
  assign mag      = is_val[13] ? 13'(-is_val) : 13'(is_val);
  assign short_line = (info.meta.block_type == 2'd2) && !(info.meta.mixed && is_idx < 10'd36);

  pow43_rom u_pow43 (
    .clk  (clk),
    .re   (is_valid && is_ready),
    .addr (mag),
    .q    (p43)
  );

  fras u_fras (
    .p43 (p43),
    .neg (neg),
    .c   (c),
    .xr  (xr_n)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= R_IDLE;
      neg <= 1'b0;
      c <= '0;
      xr <= '0;
      xr_idx <= '0;
      xr_meta <= '0;
    end else begin
      case (st)
        R_IDLE: if (is_valid) begin
          neg     <= is_val[13];
          c       <= short_line ? fras_s(info, is_idx) : fras_l(info, is_idx);
          xr_idx  <= is_idx;
          xr_meta <= info.meta;
          st      <= R_ROM;
        end
        R_ROM: begin
          xr <= xr_n;
          st <= R_OUT;
        end
        R_OUT: if (xr_ready) st <= R_IDLE;
        default: st <= R_IDLE;
      endcase
    end
  end
endmodule
