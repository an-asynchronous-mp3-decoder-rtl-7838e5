// scale_huffman: the SCALE&HUFFMAN module of the Synchronizer&Huffman stage.
// For every granule and channel of a frame it decodes the scalefactors and
// the Huffman-coded frequency lines from the main data buffer and sends the
// 576 quantized values, one per beat, to the requantizer as soon as each is
// decoded (it does not wait for the whole granule).
//
// Bit reader: bytes are fetched from the main data buffer through the
// arbiter (rd_req/rd_gnt, data one clock later on rd_valid) into a 64-bit
// bit window. rd_floor reports the byte holding the next unconsumed bit, so
// the writer may overwrite everything before it. At the start of a frame the
// reader jumps to md_start - main_data_begin (the bit reservoir); at the end
// of each granule it jumps to the granule start + part2_3_length, skipping
// any bits not used (ancillary data, or a discarded count1 quadruple).
//
// Decoding order per granule: scalefactors (lengths slen1/slen2 from
// scalefac_compress; scfsi reuse of granule 0 values in granule 1 for long
// blocks), big_values pairs with the table of region 0/1/2 (region bounds
// from region0_count/region1_count, or 36/576 with window switching), then
// count1 quadruples (table A or B) until part2_3_length bits are used, then
// zeros up to 576 lines. Huffman codes are looked up directly in
// huffman_rom from the next 6 bits; sign bits follow each non-zero value.
//
// Output: is_val (14-bit two's complement, |is| <= 8191), is_idx (line
// 0..575) and info (granule parameters for the requantizer, stable for the
// whole granule) with is_valid/is_ready. unsupported counts granules that
// used a Huffman table this ROM does not hold; their remaining lines are
// output as zero.
module scale_huffman
  import pamp3_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // frame side information from the synchronizer
  input  logic        fi_valid,
  input  frame_info_t fi,
  output logic        fi_ready,
  // main data buffer reads (through the arbiter)
  output logic        rd_req,
  output logic [31:0] rd_addr,
  input  logic        rd_gnt,
  input  logic        rd_valid,
  input  logic [7:0]  rd_data,
  output logic [31:0] rd_floor,
  // quantized values to the requantizer
  output logic               is_valid,
  input  logic               is_ready,
  output logic signed [13:0] is_val,
  output logic [9:0]         is_idx,
  output gr_info_t           info,
  // status
  output logic [15:0]        unsupported
);
  typedef enum logic [3:0] {
    S_IDLE, S_JUMP, S_SKIP, S_GRSTART, S_SCF, S_BIG, S_C1, S_EMIT, S_ZERO, S_GREND
  } state_t;

  state_t      st, ret_st;
  frame_info_t F;
  logic        gr, ch;
  gr_side_t    s;

  // bit window
  logic [63:0] win;
  logic [6:0]  wcnt;
  logic [31:0] cpos;       // absolute bit position of win[63]
  logic [31:0] faddr;      // next byte to fetch
  logic [31:0] target;     // jump target (bit position)
  logic [2:0]  skip;
  logic [3:0]  cons;       // bits consumed this cycle

  // granule state
  logic [31:0] gend;
  logic [9:0]  idx, nbig, r1, r2;
  logic [5:0]  slot, nslots;
  logic [1:0][21:0][3:0]  sf_l_mem;
  logic [12:0][2:0][3:0]  sf_s;
  logic signed [13:0]     pv [4];
  logic [2:0]  npv, oi;

  assign s        = F.si[gr][ch];
  assign fi_ready = (st == S_IDLE);
  assign rd_floor = cpos >> 3;
  assign rd_addr  = faddr;
  assign rd_req   = (st != S_IDLE) && (st != S_JUMP) &&
                    (32'(wcnt) + (rd_valid ? 32'd8 : 32'd0) + 32'd8 <= 32'd64);

  // bits left in this granule's part2_3 data
  logic signed [32:0] rem;
  assign rem = $signed({1'b0, gend}) - $signed({1'b0, cpos});
  logic enough8, enough10;
  assign enough8  = (wcnt >= 7'd8)  || ($signed({26'b0, wcnt}) >= rem);
  assign enough10 = (wcnt >= 7'd10) || ($signed({26'b0, wcnt}) >= rem);

  // scalefactor slot description
  logic [4:0] sl_sfb;
  logic [1:0] sl_win;
  logic       sl_long, sl_reuse;
  logic [2:0] sl_len;
  always_comb begin
    logic [5:0] j;
    sl_sfb = '0; sl_win = '0; sl_long = 1'b1; sl_reuse = 1'b0;
    j = '0;
    if (s.block_type != 2'd2 || !s.window_switching) begin
      sl_sfb = 5'(slot);
      sl_long = 1'b1;
    end else if (!s.mixed) begin
      sl_sfb = 5'(slot / 6'd3);
      sl_win = 2'(slot % 6'd3);
      sl_long = 1'b0;
    end else if (slot < 6'd8) begin
      sl_sfb = 5'(slot);
      sl_long = 1'b1;
    end else begin
      j = slot - 6'd8;
      sl_sfb = 5'(j / 6'd3) + 5'd3;
      sl_win = 2'(j % 6'd3);
      sl_long = 1'b0;
    end
    if (sl_long) sl_len = (sl_sfb < 5'd11) ? slen1(s.scalefac_compress) : slen2(s.scalefac_compress);
    else         sl_len = (sl_sfb < 5'd6)  ? slen1(s.scalefac_compress) : slen2(s.scalefac_compress);
    if (sl_long && gr && !(s.window_switching && s.block_type == 2'd2)) begin
      if (sl_sfb < 5'd6)       sl_reuse = F.scfsi[ch][0];
      else if (sl_sfb < 5'd11) sl_reuse = F.scfsi[ch][1];
      else if (sl_sfb < 5'd16) sl_reuse = F.scfsi[ch][2];
      else                     sl_reuse = F.scfsi[ch][3];
    end
  end
  logic [3:0] sl_val;
  assign sl_val = 4'(win[63:60] >> (3'd4 - sl_len));

  // Huffman ROM lookup
  logic [4:0] tsel;
  logic       h_sup;
  logic [1:0] hx, hy;
  logic [2:0] hlen;
  assign tsel = (idx < r1) ? s.table_select[0] : (idx < r2) ? s.table_select[1] : s.table_select[2];

  huffman_rom u_rom (
    .table_sel (tsel),
    .quad      (st == S_C1),
    .quad_b    (s.count1table_select),
    .bits      (win[63:58]),
    .supported (h_sup),
    .x         (hx),
    .y         (hy),
    .len       (hlen)
  );

  // pair decode: values, sign bits and total length
  logic [3:0] pair_len, quad_len;
  logic signed [13:0] px, py;
  logic signed [13:0] q [4];
  always_comb begin
    int p;
    logic [1:0] qa [4];
    p = int'(hlen);
    px = 14'(hx);
    if (hx != 0) begin
      if (win[63 - p]) px = -px;
      p++;
    end
    py = 14'(hy);
    if (hy != 0) begin
      if (win[63 - p]) py = -py;
      p++;
    end
    pair_len = 4'(p);
    // quadruple v,w,x,y
    qa[0] = {1'b0, hx[1]}; qa[1] = {1'b0, hx[0]}; qa[2] = {1'b0, hy[1]}; qa[3] = {1'b0, hy[0]};
    p = int'(hlen);
    for (int k = 0; k < 4; k++) begin
      q[k] = 14'(qa[k]);
      if (qa[k] != 0) begin
        if (win[63 - p]) q[k] = -q[k];
        p++;
      end
    end
    quad_len = 4'(p);
  end

  // bits consumed this cycle
  always_comb begin
    cons = '0;
    case (st)
      S_SKIP: if (wcnt >= 7'(skip)) cons = 4'(skip);
      S_SCF:  if (slot < nslots && !sl_reuse && wcnt >= 7'(sl_len)) cons = 4'(sl_len);
      S_BIG:  if (idx < nbig && enough8 && h_sup) cons = pair_len;
      S_C1:   if (idx < 10'd576 && rem > 0 && enough10 &&
                  $signed({1'b0, cpos}) + 33'(quad_len) <= $signed({1'b0, gend})) cons = quad_len;
      default: cons = '0;
    endcase
  end

  assign is_valid = (st == S_EMIT) || (st == S_ZERO);
  assign is_val   = (st == S_EMIT) ? pv[oi[1:0]] : 14'sd0;
  assign is_idx   = idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; ret_st <= S_IDLE;
      F <= '0; gr <= 1'b0; ch <= 1'b0;
      win <= '0; wcnt <= '0; cpos <= '0; faddr <= '0; target <= '0; skip <= '0;
      gend <= '0; idx <= '0; nbig <= '0; r1 <= '0; r2 <= '0; slot <= '0; nslots <= '0;
      sf_l_mem <= '0; sf_s <= '0; npv <= '0; oi <= '0;
      for (int k = 0; k < 4; k++) pv[k] <= '0;
      info <= '0; unsupported <= '0;
    end else begin
      // bit window: consume, then append a fetched byte
      begin
        logic [63:0] w1;
        logic [6:0]  c1;
        w1 = win << cons;
        c1 = wcnt - 7'(cons);
        if (rd_valid && st != S_JUMP) begin
          w1 = w1 | ({rd_data, 56'b0} >> c1);
          c1 = c1 + 7'd8;
        end
        win  <= w1;
        wcnt <= c1;
        cpos <= cpos + 32'(cons);
      end
      if (rd_gnt) faddr <= faddr + 32'd1;

      case (st)
        S_IDLE: if (fi_valid) begin
          F <= fi;
          gr <= 1'b0; ch <= 1'b0;
          target <= (fi.md_start - 32'(fi.main_data_begin)) << 3;
          st <= S_JUMP;
        end
        S_JUMP: if (!rd_valid) begin
          win <= '0; wcnt <= '0;
          faddr <= target >> 3;
          cpos <= {target[31:3], 3'b000};
          skip <= target[2:0];
          st <= S_SKIP;
        end
        S_SKIP: if (wcnt >= 7'(skip)) st <= S_GRSTART;
        S_GRSTART: begin
          gend <= cpos + 32'(s.part2_3_length);
          idx  <= '0;
          slot <= '0;
          nbig <= (s.big_values > 9'd288) ? 10'd576 : {s.big_values, 1'b0};
          if (s.window_switching) begin
            r1 <= 10'd36; r2 <= 10'd576;
          end else begin
            r1 <= sfb_long(int'(s.region0_count) + 1);
            r2 <= sfb_long(int'(s.region0_count) + int'(s.region1_count) + 2);
          end
          if (s.window_switching && s.block_type == 2'd2)
            nslots <= s.mixed ? 6'd35 : 6'd36;
          else
            nslots <= 6'd21;
          sf_s <= '0;
          if (!(gr && !(s.window_switching && s.block_type == 2'd2))) sf_l_mem[ch] <= '0;
          st <= S_SCF;
        end
        S_SCF: begin
          if (slot == nslots) begin
            info.meta.mode       <= F.mode;
            info.meta.ch         <= ch;
            info.meta.gr         <= gr;
            info.meta.block_type <= s.window_switching ? s.block_type : 2'd0;
            info.meta.mixed      <= s.window_switching && s.mixed;
            info.global_gain     <= s.global_gain;
            info.scalefac_scale  <= s.scalefac_scale;
            info.preflag         <= s.preflag;
            info.subblock_gain   <= s.subblock_gain;
            info.sf_l            <= sf_l_mem[ch];
            info.sf_s            <= sf_s;
            st <= S_BIG;
          end else if (sl_reuse) begin
            slot <= slot + 6'd1;
          end else if (wcnt >= 7'(sl_len)) begin
            if (sl_long) sf_l_mem[ch][sl_sfb] <= sl_val;
            else         sf_s[sl_sfb][sl_win] <= sl_val;
            slot <= slot + 6'd1;
          end
        end
        S_BIG: begin
          if (idx >= nbig) st <= S_C1;
          else if (!h_sup) begin
            unsupported <= unsupported + 16'd1;
            st <= S_ZERO;
          end else if (enough8) begin
            pv[0] <= px; pv[1] <= py;
            npv <= 3'd2; oi <= '0;
            ret_st <= S_BIG;
            st <= S_EMIT;
          end
        end
        S_C1: begin
          if (idx >= 10'd576) st <= S_GREND;
          else if (rem <= 0) st <= S_ZERO;
          else if (enough10) begin
            if (cons == 0) st <= S_ZERO;   // quadruple would run past part2_3_length
            else begin
              for (int k = 0; k < 4; k++) pv[k] <= q[k];
              npv <= 3'd4; oi <= '0;
              ret_st <= S_C1;
              st <= S_EMIT;
            end
          end
        end
        S_EMIT: if (is_ready) begin
          idx <= idx + 10'd1;
          oi  <= oi + 3'd1;
          if (idx == 10'd575) st <= S_GREND;
          else if (oi == npv - 3'd1) st <= ret_st;
        end
        S_ZERO: if (is_ready) begin
          idx <= idx + 10'd1;
          if (idx == 10'd575) st <= S_GREND;
        end
        S_GREND: begin
          target <= gend;
          if (!ch && F.nch2) begin
            ch <= 1'b1;
            st <= S_JUMP;
          end else if (!gr) begin
            ch <= 1'b0; gr <= 1'b1;
            st <= S_JUMP;
          end else begin
            // frame done: the next frame jumps to its own main data start
            cpos <= gend;
            win <= '0; wcnt <= '0;
            st <= S_IDLE;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
