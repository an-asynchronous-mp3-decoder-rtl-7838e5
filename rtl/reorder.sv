// reorder: the reorder stage. Short-block spectra arrive in scalefactor-band
// order (band, then window, then frequency inside the band); the IMDCT needs
// them per subband with the three windows interleaved. For line i of short
// band s (band start b = sfb_short(s), width w):
//   offset = i - 3*b,  window = offset / w,  f = offset % w
//   position = 3*(b + f) + window
// In a mixed block the first 36 lines (two long subbands) keep their place.
//
// Long-block granules (block types 0, 1, 3) pass straight through
// (combinational path, no added latency). Short and mixed granules are
// written into the 576 x 32-bit buffer at their reordered position; after
// the 576th line the buffer is read out in order, one line every two clocks,
// while the input is stalled. Handshakes: in_valid/in_ready and
// out_valid/out_ready. The original controller starts sending as soon as
// enough lines of a subband have arrived; this version waits for the whole
// granule, which is simpler and gives the same output order.
module reorder
  import pamp3_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  sample_t    in_data,
  input  logic [9:0] in_idx,
  input  meta_t      in_meta,
  output logic       out_valid,
  input  logic       out_ready,
  output sample_t    out_data,
  output logic [9:0] out_idx,
  output meta_t      out_meta
);
  typedef enum logic [1:0] {O_PASS, O_READ, O_SEND} ostate_t;
  ostate_t    st;
  sample_t    buffer [GRANULE];
  sample_t    q;
  logic [9:0] ridx;
  meta_t      gmeta;
  logic       is_short;

  assign is_short = (in_meta.block_type == 2'd2);

  function automatic logic [9:0] reorder_pos(input logic [9:0] i, input logic mixed);
    int s, off, width, b;
    if (mixed && i < 10'd36) return i;
    s = 0;
    for (int k = 0; k < 13; k++) if (int'(i) >= 3 * int'(sfb_short(k))) s = k;
    b = int'(sfb_short(s));
    width = int'(sfb_short(s + 1)) - b;
    off = int'(i) - 3 * b;
    if (off < width)          return 10'(3 * (b + off));
    else if (off < 2 * width) return 10'(3 * (b + off - width) + 1);
    else                      return 10'(3 * (b + off - 2 * width) + 2);
  endfunction

  always_comb begin
    if (st == O_PASS) begin
      in_ready  = is_short ? 1'b1 : out_ready;
      out_valid = in_valid && !is_short;
      out_data  = in_data;
      out_idx   = in_idx;
      out_meta  = in_meta;
    end else begin
      in_ready  = 1'b0;
      out_valid = (st == O_SEND);
      out_data  = q;
      out_idx   = ridx;
      out_meta  = gmeta;
    end
  end

  always_ff @(posedge clk) begin
    if (st == O_PASS && in_valid && is_short)
      buffer[reorder_pos(in_idx, in_meta.mixed)] <= in_data;
    if (st == O_READ) q <= buffer[ridx];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= O_PASS;
      ridx <= '0;
      gmeta <= '0;
    end else begin
      case (st)
        O_PASS: if (in_valid && is_short && in_idx == 10'd575) begin
          gmeta <= in_meta;
          ridx  <= '0;
          st    <= O_READ;
        end
        O_READ: st <= O_SEND;
        O_SEND: if (out_ready) begin
          if (ridx == 10'd575) st <= O_PASS;
          else begin
            ridx <= ridx + 10'd1;
            st   <= O_READ;
          end
        end
        default: st <= O_PASS;
      endcase
    end
  end
endmodule
