// tb_mp3_gen_pkg: MPEG-1 Layer III bitstream generator for the testbenches.
// It builds frames (44.1 kHz, 128 kbit/s, optional CRC, mono or two
// channels) from granule descriptions chosen by a testbench: scalefactors,
// big_values pairs coded with Huffman tables 0-3, count1 quadruples coded
// with table A or B, and zeros above. Main data of consecutive frames are
// packed back to back so later frames start inside earlier frames' slots
// (main_data_begin > 0, the bit reservoir). The Huffman codes are written
// here as code strings, independently of the decoder's ROM.
package tb_mp3_gen_pkg;

  typedef struct {
    bit  ws;              // window switching
    int  block_type;
    bit  mixed;
    int  tsel [3];
    int  r0c, r1c;
    int  big_values;      // pairs
    int  c1end;           // first line after the count1 region
    bit  c1b;             // count1 table B
    int  gg, sfc;
    bit  preflag, sfs;
    int  sbg [3];
    int  sf_l [22];
    int  sf_s [13][3];
    int  isv [576];
    int  p23;             // filled by the encoder
  } gran_t;

  // the byte stream of whole frames
  byte unsigned stream [$];
  // main data bit writer
  bit  mdbits [$];
  // side information bit writer
  bit  sibits [$];

  bit to_si = 1'b0;     // put() target: side information or main data

  function automatic void put1(input bit v);
    if (to_si) sibits.push_back(v); else mdbits.push_back(v);
  endfunction

  function automatic void put(input int val, input int n);
    for (int k = n - 1; k >= 0; k--) put1(bit'((val >> k) & 1));
  endfunction

  function automatic void put_str(input string s);
    for (int k = 0; k < s.len(); k++) put1(s[k] == "1");
  endfunction

  function automatic int sfbl(input int i);
    int t [23] = '{0,4,8,12,16,20,24,30,36,44,52,62,74,90,110,134,162,196,238,288,342,418,576};
    return t[i];
  endfunction

  function automatic int slen1(input int c);
    int t [16] = '{0,0,0,0,3,1,1,1,2,2,2,3,3,3,4,4};
    return t[c];
  endfunction
  function automatic int slen2(input int c);
    int t [16] = '{0,1,2,3,0,1,2,3,1,2,3,1,2,3,2,3};
    return t[c];
  endfunction

  function automatic string pair_code(input int tab, input int x, input int y);
    string t1 [2][2] = '{'{"1", "001"}, '{"01", "000"}};
    string t2 [3][3] = '{'{"1", "010", "000001"}, '{"011", "001", "00001"}, '{"00011", "00010", "000000"}};
    string t3 [3][3] = '{'{"11", "10", "000001"}, '{"001", "01", "00001"}, '{"00011", "00010", "000000"}};
    case (tab)
      0: return "";
      1: return t1[x][y];
      2: return t2[x][y];
      default: return t3[x][y];
    endcase
  endfunction

  function automatic string quad_code_a(input int v);
    string t [16] = '{"1", "0101", "0100", "00101", "0110", "000101", "00100", "000100",
                      "0111", "00011", "00110", "000000", "00111", "000010", "000011", "000001"};
    return t[v];
  endfunction

  function automatic void put_val_sign(input int v);
    if (v != 0) put1(v < 0);
  endfunction

  function automatic int iabs(input int v);
    return v < 0 ? -v : v;
  endfunction

  // scalefactors + Huffman data of one granule/channel into mdbits;
  // returns part2_3_length
  function automatic int encode_granule(input gran_t g, input bit [3:0] scfsi, input bit gr);
    int start = mdbits.size();
    int r1, r2, nbig;
    bit short_b = g.ws && g.block_type == 2;
    // scalefactors
    if (!short_b) begin
      for (int b = 0; b < 21; b++) begin
        int grp = (b < 6) ? 0 : (b < 11) ? 1 : (b < 16) ? 2 : 3;
        if (!(gr && scfsi[grp]))
          put(g.sf_l[b], (b < 11) ? slen1(g.sfc) : slen2(g.sfc));
      end
    end else if (!g.mixed) begin
      for (int b = 0; b < 12; b++)
        for (int w = 0; w < 3; w++) put(g.sf_s[b][w], (b < 6) ? slen1(g.sfc) : slen2(g.sfc));
    end else begin
      for (int b = 0; b < 8; b++) put(g.sf_l[b], slen1(g.sfc));
      for (int b = 3; b < 12; b++)
        for (int w = 0; w < 3; w++) put(g.sf_s[b][w], (b < 6) ? slen1(g.sfc) : slen2(g.sfc));
    end
    // big values
    if (g.ws) begin r1 = 36; r2 = 576; end
    else begin r1 = sfbl(g.r0c + 1); r2 = sfbl(g.r0c + g.r1c + 2); end
    nbig = 2 * g.big_values;
    for (int i = 0; i < nbig; i += 2) begin
      int tab = (i < r1) ? g.tsel[0] : (i < r2) ? g.tsel[1] : g.tsel[2];
      put_str(pair_code(tab, iabs(g.isv[i]), iabs(g.isv[i+1])));
      put_val_sign(g.isv[i]);
      put_val_sign(g.isv[i+1]);
    end
    // count1
    for (int i = nbig; i < g.c1end; i += 4) begin
      int v = (iabs(g.isv[i]) << 3) | (iabs(g.isv[i+1]) << 2) | (iabs(g.isv[i+2]) << 1) | iabs(g.isv[i+3]);
      if (g.c1b) put(15 - v, 4);
      else       put_str(quad_code_a(v));
      for (int k = 0; k < 4; k++) put_val_sign(g.isv[i+k]);
    end
    return mdbits.size() - start;
  endfunction

  // side information of one granule/channel into sibits
  function automatic void put_gr_side(input gran_t g);
    put(g.p23, 12);
    put(g.big_values, 9);
    put(g.gg, 8);
    put(g.sfc, 4);
    put(g.ws, 1);
    if (g.ws) begin
      put(g.block_type, 2);
      put(g.mixed, 1);
      put(g.tsel[0], 5);
      put(g.tsel[1], 5);
      for (int w = 0; w < 3; w++) put(g.sbg[w], 3);
    end else begin
      for (int r = 0; r < 3; r++) put(g.tsel[r], 5);
      put(g.r0c, 4);
      put(g.r1c, 3);
    end
    put(g.preflag, 1);
    put(g.sfs, 1);
    put(g.c1b, 1);
  endfunction

  // Frames are collected first and laid out by finish_stream(): each
  // frame's main data follow the previous frame's directly (byte aligned),
  // so a frame's data start inside an earlier slot whenever the earlier
  // frames left room (main_data_begin > 0).
  byte unsigned mdall [$];      // main data of all frames, back to back
  int           f_start [$];    // start of each frame's data in mdall
  int           f_slot [$];     // main data slot size of each frame
  byte unsigned f_head [$][$];  // header (+ CRC) bytes of each frame
  bit           f_si [$][$];    // side information after main_data_begin

  function automatic void build_frame(input gran_t gin [2][2], input bit stereo, input bit crc,
                                      input bit [1:0][3:0] scfsi, input int ancillary);
    int nch = stereo ? 2 : 1;
    int si_len = stereo ? 32 : 17;
    gran_t g [2][2];
    byte unsigned h [$];
    g = gin;
    // main data
    mdbits.delete();
    to_si = 1'b0;
    for (int gr = 0; gr < 2; gr++)
      for (int c = 0; c < nch; c++) g[gr][c].p23 = encode_granule(g[gr][c], scfsi[c], bit'(gr));
    while (mdbits.size() % 8 != 0) mdbits.push_back(1'b0);
    begin
      // keep main_data_begin within its 9 bits: fill a large gap with
      // ancillary bytes of the earlier frames
      int s_k = 0;
      foreach (f_slot[k]) s_k += f_slot[k];
      while (s_k - mdall.size() > 120) mdall.push_back(8'h5A);
    end
    f_start.push_back(mdall.size());
    for (int k = 0; k < mdbits.size(); k += 8) begin
      int v = 0;
      for (int b = 0; b < 8; b++) v = (v << 1) | int'(mdbits[k + b]);
      mdall.push_back(byte'(v));
    end
    for (int k = 0; k < ancillary; k++) mdall.push_back(8'hA5);
    // side information without main_data_begin
    sibits.delete();
    to_si = 1'b1;
    put(0, stereo ? 3 : 5);
    for (int c = 0; c < nch; c++) for (int q = 0; q < 4; q++) put(int'(scfsi[c][q]), 1);
    for (int gr = 0; gr < 2; gr++)
      for (int c = 0; c < nch; c++) put_gr_side(g[gr][c]);
    while (sibits.size() < si_len * 8 - 9) sibits.push_back(1'b0);
    f_si.push_back(sibits);
    h.push_back(8'hFF);
    h.push_back(crc ? 8'hFA : 8'hFB);
    h.push_back(8'h90);
    h.push_back(stereo ? 8'h00 : 8'hC0);
    if (crc) begin h.push_back(8'h12); h.push_back(8'h34); end
    f_head.push_back(h);
    f_slot.push_back(417 - 4 - (crc ? 2 : 0) - si_len);
  endfunction

  // Lay the collected frames out into `stream`. Returns how many frames
  // use the bit reservoir; -1 if a frame's data do not fit.
  function automatic int finish_stream();
    int s_k = 0;
    int nres = 0;
    stream.delete();
    for (int f = 0; f < f_slot.size(); f++) begin
      int mdb = s_k - f_start[f];
      bit q [$];
      if (mdb < 0 || mdb > 511) return -1;
      if (mdb > 0) nres++;
      foreach (f_head[f][k]) stream.push_back(f_head[f][k]);
      sibits.delete();
      to_si = 1'b1;
      put(mdb, 9);
      q = f_si[f];
      foreach (q[k]) sibits.push_back(q[k]);
      for (int k = 0; k < sibits.size(); k += 8) begin
        int v = 0;
        for (int b = 0; b < 8; b++) v = (v << 1) | int'(sibits[k + b]);
        stream.push_back(byte'(v));
      end
      for (int k = 0; k < f_slot[f]; k++)
        stream.push_back((s_k + k < mdall.size()) ? mdall[s_k + k] : 8'h00);
      s_k += f_slot[f];
    end
    return nres;
  endfunction

  // A random granule. kind: 0 long, 1 start, 2 short, 3 stop, 4 mixed,
  // 5 all zero, 6 long with an unsupported table.
  function automatic gran_t random_granule(input int kind);
    gran_t g;
    g.ws = (kind >= 1 && kind <= 4);
    g.block_type = (kind == 4) ? 2 : (kind <= 3 ? kind : 0);
    g.mixed = (kind == 4);
    g.tsel[0] = 1 + $urandom_range(0, 2);
    g.tsel[1] = 1 + $urandom_range(0, 2);
    g.tsel[2] = (kind == 6) ? 7 : $urandom_range(0, 3);
    g.r0c = $urandom_range(0, 7);
    g.r1c = $urandom_range(0, 5);
    g.big_values = (kind == 5) ? 0 : $urandom_range(10, 70);
    g.c1end = 2 * g.big_values + ((kind == 5) ? 0 : 4 * $urandom_range(0, 20));
    g.c1b = $urandom_range(0, 1);
    g.gg = $urandom_range(150, 200);
    g.sfc = $urandom_range(0, 15);
    g.preflag = $urandom_range(0, 1);
    g.sfs = $urandom_range(0, 1);
    for (int w = 0; w < 3; w++) g.sbg[w] = $urandom_range(0, 7);
    for (int b = 0; b < 22; b++) g.sf_l[b] = 0;
    for (int b = 0; b < 13; b++) for (int w = 0; w < 3; w++) g.sf_s[b][w] = 0;
    for (int b = 0; b < 21; b++)
      g.sf_l[b] = $urandom_range(0, (1 << ((b < 11) ? slen1(g.sfc) : slen2(g.sfc))) - 1);
    for (int b = 0; b < 12; b++)
      for (int w = 0; w < 3; w++)
        g.sf_s[b][w] = $urandom_range(0, (1 << ((b < 6) ? slen1(g.sfc) : slen2(g.sfc))) - 1);
    if (g.mixed) for (int b = 0; b < 3; b++) for (int w = 0; w < 3; w++) g.sf_s[b][w] = 0;
    if (g.ws && g.block_type == 2 && !g.mixed) for (int b = 0; b < 22; b++) g.sf_l[b] = 0;
    if (g.mixed) for (int b = 8; b < 22; b++) g.sf_l[b] = 0;
    if (!(g.ws && g.block_type == 2)) for (int b = 0; b < 13; b++) for (int w = 0; w < 3; w++) g.sf_s[b][w] = 0;
    for (int i = 0; i < 576; i++) begin
      int r1, r2, tab, mx;
      if (g.ws) begin r1 = 36; r2 = 576; end
      else begin r1 = sfbl(g.r0c + 1); r2 = sfbl(g.r0c + g.r1c + 2); end
      tab = (i < r1) ? g.tsel[0] : (i < r2) ? g.tsel[1] : g.tsel[2];
      if (i < 2 * g.big_values) begin
        mx = (tab == 0) ? 0 : (tab == 1) ? 1 : 2;
        if (tab > 3) mx = 0;
        g.isv[i] = $urandom_range(0, mx);
        if ($urandom_range(0, 1)) g.isv[i] = -g.isv[i];
      end else if (i < g.c1end) begin
        g.isv[i] = int'($urandom_range(0, 2)) - 1;
      end else g.isv[i] = 0;
    end
    g.p23 = 0;
    return g;
  endfunction

endpackage
