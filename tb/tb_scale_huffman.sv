// tb_scale_huffman: checks the SCALE&HUFFMAN decoder on generated frames.
// The synchronizer, arbiter and main data buffer feed it from the main
// memory model. Six frames cover mono and stereo, long/start/stop/short/
// mixed blocks, scfsi reuse, count1 tables A and B, CRC, ancillary data,
// the bit reservoir and one granule with an unsupported Huffman table.
// Every decoded value is compared with the value the generator encoded, and
// the granule parameters passed on (global gain, scalefactors, subblock
// gains, flags, block type, channel) with the generator's.
module tb_scale_huffman;
  import pamp3_pkg::*;
  import tb_mp3_gen_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        mem_req, mem_ack, mem_reset, eos;
  logic [19:0] mem_addr, mem_boundary;
  logic [63:0] mem_out;
  logic [15:0] frames, unsupported;
  logic [31:0] header;
  logic        fi_valid, fi_ready, md_valid, md_ready;
  frame_info_t fi;
  logic [7:0]  md_data;
  logic [31:0] md_count, rd_addr, rd_floor;
  logic        rd_req, rd_gnt, rd_valid, ram_we, ram_re;
  logic [7:0]  rd_data, ram_wdata, ram_rdata;
  logic [10:0] ram_waddr, ram_raddr;
  logic        is_valid, is_ready;
  logic signed [13:0] is_val;
  logic [9:0]  is_idx;
  gr_info_t    info;
  int          stall_pct = 10;

  main_memory u_mem (.clk, .mem_req, .mem_addr, .mem_ack, .mem_out, .stall_pct);
  synchronizer u_sync (.clk, .rst_n, .mem_req, .mem_addr, .mem_ack, .mem_out, .mem_boundary,
                       .mem_reset, .fi_valid, .fi, .fi_ready, .md_valid, .md_data, .md_ready,
                       .md_count, .eos, .frames, .header);
  buff_rw_arbitor u_arb (.clk, .rst_n, .wr_valid (md_valid), .wr_data (md_data),
                         .wr_ready (md_ready), .wr_count (md_count), .rd_req, .rd_addr, .rd_gnt,
                         .rd_valid, .rd_data, .rd_floor, .ram_we, .ram_waddr, .ram_wdata,
                         .ram_re, .ram_raddr, .ram_rdata);
  main_data_buffer u_buf (.clk, .we (ram_we), .waddr (ram_waddr), .wdata (ram_wdata),
                          .re (ram_re), .raddr (ram_raddr), .rdata (ram_rdata));
  scale_huffman dut (.clk, .rst_n, .fi_valid, .fi, .fi_ready, .rd_req, .rd_addr, .rd_gnt,
                     .rd_valid, .rd_data, .rd_floor, .is_valid, .is_ready, .is_val, .is_idx,
                     .info, .unsupported);

  // expected granules in decoding order
  gran_t exp_g [$];
  bit    exp_ch [$];
  bit    exp_gr [$];
  int    exp_cut [$];   // first line output as zero (unsupported table)
  int    gi = 0;
  int    values = 0, value_errors = 0, info_errors = 0;

  function automatic int cut_of(input gran_t g);
    int r1, r2;
    if (g.ws) begin r1 = 36; r2 = 576; end
    else begin r1 = sfbl(g.r0c + 1); r2 = sfbl(g.r0c + g.r1c + 2); end
    for (int i = 0; i < 2 * g.big_values; i += 2) begin
      int tab = (i < r1) ? g.tsel[0] : (i < r2) ? g.tsel[1] : g.tsel[2];
      if (tab > 3) return i;
    end
    return 576;
  endfunction

  task automatic add(input int kinds [4], input bit stereo, input bit crc,
                     input bit [1:0][3:0] scfsi, input int anc);
    gran_t g [2][2];
    for (int gr = 0; gr < 2; gr++)
      for (int c = 0; c < 2; c++) g[gr][c] = random_granule(kinds[2*gr + c]);
    for (int c = 0; c < 2; c++)
      if (scfsi[c] != 0) begin
        g[1][c].sfc = g[0][c].sfc;
        for (int b = 0; b < 21; b++) begin
          int grp = (b < 6) ? 0 : (b < 11) ? 1 : (b < 16) ? 2 : 3;
          if (scfsi[c][grp]) g[1][c].sf_l[b] = g[0][c].sf_l[b];
          else g[1][c].sf_l[b] &= (1 << ((b < 11) ? slen1(g[1][c].sfc) : slen2(g[1][c].sfc))) - 1;
        end
      end
    build_frame(g, stereo, crc, scfsi, anc);
    for (int gr = 0; gr < 2; gr++)
      for (int c = 0; c < (stereo ? 2 : 1); c++) begin
        exp_g.push_back(g[gr][c]);
        exp_ch.push_back(bit'(c));
        exp_gr.push_back(bit'(gr));
        exp_cut.push_back(cut_of(g[gr][c]));
      end
  endtask

  always @(posedge clk) begin
    if (rst_n) is_ready <= ($urandom_range(0, 9) > 2);
    if (rst_n && is_valid && is_ready && gi < exp_g.size()) begin
      int e;
      e = (int'(is_idx) >= exp_cut[gi]) ? 0 : exp_g[gi].isv[is_idx];
      values++;
      if (int'(is_val) != e) begin
        value_errors++;
        if (value_errors < 10)
          $display("FAIL: granule %0d line %0d: got %0d expected %0d", gi, is_idx, is_val, e);
      end
      if (is_idx == 10'd0) begin
        // granule parameters
        gran_t g;
        bit bad;
        g = exp_g[gi];
        bad = 0;
        if (int'(info.global_gain) != g.gg || info.scalefac_scale != g.sfs || info.preflag != g.preflag) bad = 1;
        if (info.meta.ch != exp_ch[gi] || info.meta.gr != exp_gr[gi]) bad = 1;
        if (int'(info.meta.block_type) != (g.ws ? g.block_type : 0) || info.meta.mixed != g.mixed) bad = 1;
        for (int b = 0; b < 22; b++) if (int'(info.sf_l[b]) != g.sf_l[b]) bad = 1;
        for (int b = 0; b < 13; b++) for (int w = 0; w < 3; w++)
          if (int'(info.sf_s[b][w]) != g.sf_s[b][w]) bad = 1;
        if (g.ws) for (int w = 0; w < 3; w++) if (int'(info.subblock_gain[w]) != g.sbg[w]) bad = 1;
        if (bad) begin
          info_errors++;
          $display("FAIL: granule %0d parameters differ: gg %0d/%0d ch %0d/%0d bt %0d/%0d sfl0 %0d/%0d sbg0 %0d/%0d", gi,
                   info.global_gain, g.gg, info.meta.ch, exp_ch[gi], info.meta.block_type, g.block_type,
                   info.sf_l[0], g.sf_l[0], info.subblock_gain[0], g.sbg[0]);
        end
      end
      if (is_idx == 10'd575) gi++;
    end
  end

  initial begin
    int nwords, nres;
    is_ready = 1'b0;
    add('{5, 5, 5, 5}, 1'b0, 1'b0, '0, 0);
    add('{0, 2, 0, 0}, 1'b0, 1'b1, '0, 3);
    add('{1, 3, 0, 0}, 1'b0, 1'b0, {4'b0000, 4'b1010}, 0);
    add('{4, 0, 2, 6}, 1'b1, 1'b0, '0, 5);
    add('{0, 0, 0, 0}, 1'b1, 1'b0, {4'b1111, 4'b0110}, 0);
    add('{2, 4, 3, 1}, 1'b1, 1'b1, '0, 0);
    nres = finish_stream();
    while (stream.size() % 8 != 0) stream.push_back(8'h00);
    nwords = stream.size() / 8;
    for (int w = 0; w < nwords; w++) begin
      logic [63:0] v = '0;
      for (int b = 0; b < 8; b++) v = {v[55:0], stream[8*w + b]};
      u_mem.words[w] = v;
    end
    mem_boundary = 20'(nwords);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (gi == exp_g.size());
    repeat (20) @(posedge clk);
    checks++; if (nres <= 0) begin failures++; $display("FAIL: reservoir not exercised"); end
    checks += values; failures += value_errors;
    checks += exp_g.size(); failures += info_errors;
    checks++; if (unsupported != 16'd1) begin failures++; $display("FAIL: unsupported=%0d", unsupported); end
    checks++; if (frames != 16'd6) begin failures++; $display("FAIL: frames=%0d", frames); end
    $display("decoded %0d values of %0d granules, reservoir frames %0d", values, exp_g.size(), nres);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog (granule %0d of %0d)", gi, exp_g.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
