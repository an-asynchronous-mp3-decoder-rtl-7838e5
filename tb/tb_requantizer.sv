// tb_requantizer: checks the re-quantizer against a real-number model of
// eq. 1, xr = sign(is) * |is|^(4/3) * 2^(C/4), with C computed here from the
// 44.1 kHz band tables written out independently of the design. Granules of
// every block type (long, start, stop, short, mixed) with random global
// gain, scalefactors, subblock gains, preflag and scalefac_scale are fed
// line by line with random values (small values mostly, some up to 8191).
// Each output is compared with the model (tolerance: ROM rounding of
// |is|^(4/3) plus 2 LSB; results beyond the Q4.28 range must saturate).
// The output side stalls at random.
module tb_requantizer;
  import pamp3_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic               is_valid, is_ready, xr_valid, xr_ready;
  logic signed [13:0] is_val;
  logic [9:0]         is_idx, xr_idx;
  gr_info_t           info;
  sample_t            xr;
  meta_t              xr_meta;

  requantizer dut (.clk, .rst_n, .is_valid, .is_ready, .is_val, .is_idx, .info,
                   .xr_valid, .xr_ready, .xr, .xr_idx, .xr_meta);

  int lb [23] = '{0,4,8,12,16,20,24,30,36,44,52,62,74,90,110,134,162,196,238,288,342,418,576};
  int sb [14] = '{0,4,8,12,16,22,30,40,52,66,84,106,136,192};
  int pt [22] = '{0,0,0,0,0,0,0,0,0,0,0,1,1,1,1,2,2,3,3,3,2,0};

  function automatic int exp_c(input gr_info_t g, input int i);
    int sh = g.scalefac_scale ? 2 : 1;
    if (g.meta.block_type == 2 && !(g.meta.mixed && i < 36)) begin
      for (int b = 0; b < 13; b++) begin
        int w0 = 3 * sb[b], wd = sb[b+1] - sb[b];
        if (i >= w0 && i < w0 + 3 * wd) begin
          int w = (i - w0) / wd;
          return int'(g.global_gain) - 210 - 8 * int'(g.subblock_gain[w]) - (int'(g.sf_s[b][w]) << sh);
        end
      end
      return 0;
    end
    for (int b = 0; b < 22; b++)
      if (i >= lb[b] && i < lb[b+1])
        return int'(g.global_gain) - 210 - ((int'(g.sf_l[b]) + (g.preflag ? pt[b] : 0)) << sh);
    return 0;
  endfunction

  // expected results in order
  real  exp_v [$];
  real  exp_tol [$];
  int   exp_i [$];
  meta_t exp_m [$];
  int   nsat = 0, nbig = 0;
  int   dbg_q [$];

  always @(posedge clk) begin
    xr_ready <= ($urandom_range(0, 3) != 0);
    if (xr_valid && xr_ready) begin
      real e, t, d;
      int ei, dbgv;
      meta_t em;
      e = exp_v.pop_front(); t = exp_tol.pop_front();
      ei = exp_i.pop_front(); em = exp_m.pop_front(); dbgv = dbg_q.pop_front();
      checks++;
      d = real'(xr) - e;
      if (d < 0) d = -d;
      if (d > t || xr_idx != 10'(ei) || xr_meta != em) begin
        failures++;
        if (failures < 10) $display("FAIL: line %0d got %0d expected %0f (line %0d) v*1e4+c=%0d", xr_idx, xr, e, ei, dbgv);
      end
    end
  end

  task automatic send(input int v, input int i);
    int c = exp_c(info, i);
    real scale = $pow(2.0, real'(c) / 4.0) * 268435456.0;
    real a = (v < 0) ? -real'(v) : real'(v);
    real e = $pow(a, 4.0 / 3.0) * scale;
    if (v < 0) e = -e;
    if (e > 2147483647.0) begin e = 2147483647.0; nsat++; end
    if (e < -2147483648.0) begin e = -2147483648.0; nsat++; end
    if (a > 1000) nbig++;
    exp_v.push_back(e);
    exp_tol.push_back(scale / 16384.0 + 2.0 + 1.0e-7 * (e < 0 ? -e : e));
    exp_i.push_back(i);
    dbg_q.push_back(v * 10000 + c);
    exp_m.push_back(info.meta);
    @(negedge clk);
    is_val = 14'(v); is_idx = 10'(i); is_valid = 1'b1;
    #1;
    while (!is_ready) @(negedge clk);
    @(posedge clk);
    #1 is_valid = 1'b0;
  endtask

  initial begin
    is_valid = 1'b0; info = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int gi = 0; gi < 12; gi++) begin
      gr_info_t g;
      g = '0;
      case (gi % 6)
        0: g.meta.block_type = 2'd0;
        1: g.meta.block_type = 2'd1;
        2: g.meta.block_type = 2'd2;
        3: g.meta.block_type = 2'd3;
        4: begin g.meta.block_type = 2'd2; g.meta.mixed = 1'b1; end
        default: g.meta.block_type = 2'd0;
      endcase
      g.meta.ch = gi[0];
      g.global_gain = 8'($urandom_range(120, 215));
      g.scalefac_scale = $urandom_range(0, 1);
      g.preflag = $urandom_range(0, 1);
      for (int w = 0; w < 3; w++) g.subblock_gain[w] = 3'($urandom);
      for (int b = 0; b < 22; b++) g.sf_l[b] = 4'($urandom);
      for (int b = 0; b < 13; b++) for (int w = 0; w < 3; w++) g.sf_s[b][w] = 4'($urandom);
      if (gi == 11) g.global_gain = 8'd250;     // drives large values into saturation
      @(negedge clk);
      info = g;
      for (int i = 0; i < 576; i++) begin
        int v;
        case ($urandom_range(0, 9))
          0, 1, 2: v = 0;
          3, 4, 5, 6: v = $urandom_range(1, 15);
          7, 8: v = $urandom_range(16, 400);
          default: v = $urandom_range(401, 8191);
        endcase
        if ($urandom_range(0, 1)) v = -v;
        send(v, i);
      end
    end
    while (exp_v.size() != 0) @(posedge clk);
    checks++;
    if (nsat == 0 || nbig == 0) begin failures++; $display("FAIL: saturation or large values not exercised"); end
    $display("saturated %0d, large %0d", nsat, nbig);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
