// tb_synchronizer: checks frame synchronisation, side-information hand-off
// and main data copying. The memory holds junk bytes (including a false
// sync pattern) followed by four generated frames (mono/stereo, with and
// without CRC, using the bit reservoir). Checks: every frame is found;
// main_data_begin, part2_3_length, big_values and global_gain of each
// handed-over frame match the generator; md_start equals the number of main
// data bytes written before the frame; the main data bytes written are the
// frames' slot contents in order; the end of the stream raises eos and
// pulses mem_reset once. The side-information sink and the main data sink
// stall at random.
module tb_synchronizer;
  import pamp3_pkg::*;
  import tb_mp3_gen_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        mem_req, mem_ack, mem_reset, eos;
  logic [19:0] mem_addr, mem_boundary;
  logic [63:0] mem_out;
  logic [15:0] frames;
  logic [31:0] header;
  logic        fi_valid, fi_ready, md_valid, md_ready;
  frame_info_t fi;
  logic [7:0]  md_data;
  logic [31:0] md_count = 0;
  int          stall_pct = 30;

  main_memory u_mem (.clk, .mem_req, .mem_addr, .mem_ack, .mem_out, .stall_pct);
  synchronizer dut (.clk, .rst_n, .mem_req, .mem_addr, .mem_ack, .mem_out, .mem_boundary,
                    .mem_reset, .fi_valid, .fi, .fi_ready, .md_valid, .md_data, .md_ready,
                    .md_count, .eos, .frames, .header);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  gran_t exp_g [$];
  bit    stereo_f [$];
  byte unsigned exp_md [$];
  int    nf = 0, resets = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      fi_ready <= ($urandom_range(0, 3) == 0);
      md_ready <= ($urandom_range(0, 3) != 0);
      if (mem_reset) resets++;
      if (md_valid && md_ready) begin
        check(md_count < exp_md.size() && md_data == exp_md[md_count],
              $sformatf("main data byte %0d", md_count));
        md_count <= md_count + 1;
      end
      if (fi_valid && fi_ready) begin
        int s_k, mdb;
        s_k = 0;
        for (int k = 0; k < nf; k++) s_k += f_slot[k];
        mdb = s_k - f_start[nf];
        check(int'(fi.main_data_begin) == mdb, $sformatf("frame %0d main_data_begin %0d/%0d", nf, fi.main_data_begin, mdb));
        check(fi.md_start == md_count, $sformatf("frame %0d md_start", nf));
        check(fi.nch2 == stereo_f[nf], $sformatf("frame %0d channel count", nf));
        for (int gr = 0; gr < 2; gr++)
          for (int c = 0; c < (stereo_f[nf] ? 2 : 1); c++) begin
            gran_t g;
            g = exp_g[4*nf + 2*gr + c];
            check(fi.si[gr][c].big_values == 9'(g.big_values) && fi.si[gr][c].global_gain == 8'(g.gg)
                  && fi.si[gr][c].window_switching == g.ws && fi.si[gr][c].part2_3_length != 0,
                  $sformatf("frame %0d side info gr%0d ch%0d", nf, gr, c));
          end
        nf++;
      end
    end
  end

  task automatic add(input int k0, input int k1, input bit stereo, input bit crc);
    gran_t g [2][2];
    g[0][0] = random_granule(k0); g[0][1] = random_granule(k1);
    g[1][0] = random_granule(k1); g[1][1] = random_granule(k0);
    build_frame(g, stereo, crc, '0, 0);
    exp_g.push_back(g[0][0]); exp_g.push_back(g[0][1]);
    exp_g.push_back(g[1][0]); exp_g.push_back(g[1][1]);
    stereo_f.push_back(stereo);
  endtask

  initial begin
    int nwords, s_k;
    byte unsigned junk [$] = '{8'h12, 8'hFF, 8'h00, 8'hFF, 8'hE3, 8'h44, 8'hFF, 8'hFB, 8'h00, 8'h00};
    fi_ready = 1'b0; md_ready = 1'b0;
    add(0, 2, 1'b0, 1'b0);
    add(4, 1, 1'b1, 1'b1);
    add(3, 0, 1'b0, 1'b1);
    add(2, 2, 1'b1, 1'b0);
    void'(finish_stream());
    s_k = 0;
    foreach (f_slot[k]) s_k += f_slot[k];
    for (int k = 0; k < s_k; k++) exp_md.push_back((k < mdall.size()) ? mdall[k] : 8'h00);
    for (int k = junk.size() - 1; k >= 0; k--) stream.push_front(junk[k]);
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
    wait (eos && md_count == exp_md.size());
    repeat (50) @(posedge clk);
    check(nf == 4, $sformatf("frames handed over %0d", nf));
    check(frames == 16'd4, "frame counter");
    check(resets == 1, $sformatf("mem_reset pulses %0d", resets));
    check(md_count == exp_md.size(), "main data byte count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog (frames %0d, bytes %0d)", nf, md_count);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
