// imdct: the IMDCT stage: inverse MDCT, windowing and overlap-add for one
// subband (18 frequency lines in, 18 time samples out) at a time.
//
//  1. collect: 18 lines of a subband are received.
//  2. IMDCT (eq. 2), one multiply-accumulate per clock:
//       long blocks : x[i] = sum_{k<18} X[k] cos(pi/72 (2i+1+18)(2k+1)), i < 36
//       short blocks: y_w[i] = sum_{k<6} X[3k+w] cos(pi/24 (2i+1+6)(2k+1)),
//                     i < 12, for the three windows w (lines interleaved
//                     by the reorder stage).
//  3. windowing (eq. 3-7): long blocks use the window of their block type
//     (0 normal, 1 start, 3 stop); the three short windows are multiplied by
//     sin(pi/12 (i+1/2)) and overlapped at offsets 6, 12, 18 in a 36-sample
//     block. In mixed blocks subbands 0 and 1 are long (window type 0).
//  4. overlap: out[i] = z[i] + saved[ch][sb][i] for i < 18, and z[18..35]
//     is saved for the next granule of the same channel (overlap memory of
//     2 channels x 32 subbands x 18 samples; the memory is not reset, a
//     flag per channel and subband makes it read as zero until written).
//  5. frequency inversion: odd samples of odd subbands are negated, so the
//     output can go straight to the synthesis filterbank.
// Cosine and window tables are Q2.30 ROMs computed at initialisation.
//
// The original architecture computes step 2 with a fast algorithm (N/2-point DCT-IV
// split into two N/4-point SDCT-II, in five pipelined sub-stages); this
// module evaluates eq. 2 directly with a single multiplier instead, which
// gives the same result at 648 (long) or 216 (short) clocks per subband.
// Step 5 is part of standard Layer III decoding and is this design's
// placement of it.
module imdct
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
  output meta_t      out_meta,
  output logic [15:0] long_blocks,    // statistics: subbands done as long
  output logic [15:0] short_blocks    //             and as short blocks
);
  localparam real PI = 3.14159265358979323846;

  // ---- constant tables (Q2.30) ----
  coef_t cos36 [648];       // [i*18+k]
  coef_t cos12 [72];        // [i*6+k]
  coef_t win_l [3][36];     // block type 0, 1, 3
  coef_t win_s [12];

  initial begin
    for (int i = 0; i < 36; i++)
      for (int k = 0; k < 18; k++)
        cos36[i*18+k] = to_q30($cos(PI / 72.0 * real'(2*i + 1 + 18) * real'(2*k + 1)));
    for (int i = 0; i < 12; i++)
      for (int k = 0; k < 6; k++)
        cos12[i*6+k] = to_q30($cos(PI / 24.0 * real'(2*i + 1 + 6) * real'(2*k + 1)));
    for (int i = 0; i < 12; i++)
      win_s[i] = to_q30($sin(PI / 12.0 * (real'(i) + 0.5)));
    for (int i = 0; i < 36; i++) begin
      win_l[0][i] = to_q30($sin(PI / 36.0 * (real'(i) + 0.5)));
      // start window
      if (i < 18)      win_l[1][i] = to_q30($sin(PI / 36.0 * (real'(i) + 0.5)));
      else if (i < 24) win_l[1][i] = to_q30(1.0);
      else if (i < 30) win_l[1][i] = to_q30($sin(PI / 12.0 * (real'(i - 18) + 0.5)));
      else             win_l[1][i] = 0;
      // stop window
      if (i < 6)       win_l[2][i] = 0;
      else if (i < 12) win_l[2][i] = to_q30($sin(PI / 12.0 * (real'(i - 6) + 0.5)));
      else if (i < 18) win_l[2][i] = to_q30(1.0);
      else             win_l[2][i] = to_q30($sin(PI / 36.0 * (real'(i) + 0.5)));
    end
  end

  typedef enum logic [2:0] {I_COLLECT, I_MAC, I_WINDOW, I_OUT} istate_t;
  istate_t    st;
  sample_t    X [NSS];
  sample_t    z [36];
  sample_t    ys [3][12];
  sample_t    ovl [2][NSB][NSS];   // overlap memory (not reset)
  logic [1:0][NSB-1:0] ovl_ok;      // set once a subband's overlap is written
  logic signed [47:0] acc;
  logic [5:0] i;            // output index of the IMDCT / window index
  logic [4:0] k;            // input index / sample counter
  logic [1:0] w;            // short window
  logic [4:0] sb;
  meta_t      gmeta;
  logic       long_sb;
  logic [1:0] wsel;

  assign long_sb = (gmeta.block_type != 2'd2) || (gmeta.mixed && sb < 5'd2);
  always_comb begin
    case (gmeta.block_type)
      2'd1: wsel = 2'd1;
      2'd3: wsel = 2'd2;
      default: wsel = 2'd0;
    endcase
  end

  // one product of the IMDCT sum
  logic signed [63:0] prod;
  always_comb begin
    if (long_sb) prod = 64'(X[k]) * 64'(cos36[int'(i)*18 + int'(k)]);
    else         prod = 64'(X[3*int'(k) + int'(w)]) * 64'(cos12[int'(i)*6 + int'(k)]);
  end

  // short-block windowing and overlap of the three windows at sample j
  function automatic sample_t short_sample(input logic [5:0] j);
    logic signed [47:0] s = '0;
    for (int v = 0; v < 3; v++) begin
      int t = int'(j) - 6 - 6 * v;
      if (t >= 0 && t < 12) s += 48'(q_mul(ys[v][t], win_s[t]));
    end
    return sat32(s);
  endfunction

  sample_t ov_sum;
  assign ov_sum = ovl_ok[gmeta.ch][sb] ? sat32(48'(z[6'(k)]) + 48'(ovl[gmeta.ch][sb][k])) : z[6'(k)];

  assign in_ready  = (st == I_COLLECT);
  assign out_valid = (st == I_OUT);
  assign out_data  = (sb[0] && k[0]) ? -ov_sum : ov_sum;
  assign out_idx   = 10'(18 * int'(sb) + int'(k));
  assign out_meta  = gmeta;

  always_ff @(posedge clk) begin
    if (st == I_OUT && out_ready) ovl[gmeta.ch][sb][k] <= z[18 + int'(k)];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= I_COLLECT;
      acc <= '0; i <= '0; k <= '0; w <= '0; sb <= '0;
      gmeta <= '0;
      long_blocks <= '0; short_blocks <= '0;
      ovl_ok <= '0;
      for (int n = 0; n < NSS; n++) X[n] <= '0;
      for (int n = 0; n < 36; n++) z[n] <= '0;
      for (int v = 0; v < 3; v++)
        for (int n = 0; n < 12; n++) ys[v][n] <= '0;
    end else begin
      case (st)
        I_COLLECT: if (in_valid) begin
          X[k] <= in_data;
          if (k == 5'd0) begin
            gmeta <= in_meta;
            sb <= 5'(in_idx / 10'd18);
          end
          if (k == 5'd17) begin
            k <= '0; i <= '0; w <= '0; acc <= '0;
            st <= I_MAC;
          end else k <= k + 5'd1;
        end
        I_MAC: begin
          if (long_sb) begin
            if (k == 5'd17) begin
              z[i] <= sat32(acc + 48'(prod >>> 30));
              acc <= '0;
              k <= '0;
              if (i == 6'd35) begin
                i <= '0;
                long_blocks <= long_blocks + 16'd1;
                st <= I_WINDOW;
              end else i <= i + 6'd1;
            end else begin
              acc <= acc + 48'(prod >>> 30);
              k <= k + 5'd1;
            end
          end else begin
            if (k == 5'd5) begin
              ys[w][4'(i)] <= sat32(acc + 48'(prod >>> 30));
              acc <= '0;
              k <= '0;
              if (i == 6'd11) begin
                i <= '0;
                if (w == 2'd2) begin
                  w <= '0;
                  short_blocks <= short_blocks + 16'd1;
                  st <= I_WINDOW;
                end else w <= w + 2'd1;
              end else i <= i + 6'd1;
            end else begin
              acc <= acc + 48'(prod >>> 30);
              k <= k + 5'd1;
            end
          end
        end
        I_WINDOW: begin
          if (long_sb) z[i] <= q_mul(z[i], win_l[wsel][i]);
          else         z[i] <= short_sample(i);
          if (i == 6'd35) begin
            i <= '0; k <= '0;
            st <= I_OUT;
          end else i <= i + 6'd1;
        end
        I_OUT: if (out_ready) begin
          if (k == 5'd17) begin
            ovl_ok[gmeta.ch][sb] <= 1'b1;
            k <= '0;
            st <= I_COLLECT;
          end else k <= k + 5'd1;
        end
        default: st <= I_COLLECT;
      endcase
    end
  end
endmodule
