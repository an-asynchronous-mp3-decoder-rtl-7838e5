// filterbank: the polyphase synthesis filterbank stage. For every time slot
// it turns 32 subband samples of one channel into 32 PCM samples:
//  1. moving / DCT: V[i] = sum_{k<32} cos((16+i)(2k+1) pi/64) S[k],
//     i = 0..63, one multiply-accumulate per clock. The 64 new values are
//     pushed into the channel's 1024-entry V FIFO (a circular memory whose
//     start moves back by 64 per time slot).
//  2. matrix multiply and overall adding: for output j = 0..31,
//       pcm[j] = sum_{i<16} D[32i+j] * V[64i + j + 32*(i odd)]
//     (the U vector is formed by addressing the FIFO; 512 multiply-
//     accumulates per time slot).
//  3. scaling: Q4.28 to 16-bit PCM, rounded and saturated (1.0 -> 32767).
// The V FIFOs of both channels share one 2048-word memory, cleared after
// reset (2048 clocks). The cosine factors come from a 128-entry table of
// cos(n pi/64), addressed by (16+i)(2k+1) modulo 128.
//
// Window table D: the standard's 512 synthesis window coefficients are a
// published table, not a formula, and are not reproduced here. D is
// generated at initialisation from a prototype low-pass filter of the same
// length and cut-off (pi/64), a Blackman-windowed sinc centred at 255.5,
// with the sign of every odd block of 64 coefficients inverted as in the
// standard's window. The structure is the standard one; PCM values follow
// that generated window, so they are close to, not equal to, those of a
// reference decoder.
//
// The original architecture computes step 1 with B.G. Lee's fast 32-point DCT and the
// Konstantinides symmetry in six pipelined sub-stages; this module uses a
// direct matrix with one multiplier (2048 + 512 clocks per time slot).
module filterbank
  import pamp3_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  sample_t     in_data,
  input  logic [9:0]  in_idx,
  input  meta_t       in_meta,
  output logic        out_valid,
  input  logic        out_ready,
  output logic signed [15:0] out_pcm,
  output logic [9:0]  out_idx,
  output meta_t       out_meta,
  output logic [15:0] clips        // saturated PCM samples (statistics)
);
  localparam real PI = 3.14159265358979323846;

  coef_t cos128 [128];     // cos(n pi/64)
  coef_t dwin [512];

  initial begin
    for (int n = 0; n < 128; n++)
      cos128[n] = to_q30($cos(real'(n) * PI / 64.0));
    for (int n = 0; n < 512; n++)
      dwin[n] = to_q30(((n / 64) % 2 == 1 ? -1.0 : 1.0)
                       * $sin(PI * (real'(n) - 255.5) / 64.0) / (PI * (real'(n) - 255.5) / 64.0)
                       * (0.42 - 0.5 * $cos(2.0 * PI * (real'(n) + 0.5) / 512.0)
                               + 0.08 * $cos(4.0 * PI * (real'(n) + 0.5) / 512.0)));
  end

  typedef enum logic [2:0] {F_CLEAR, F_COLLECT, F_DCT, F_WIN, F_OUT} fstate_t;
  fstate_t     st;
  sample_t     S [32];
  sample_t     vfifo [2048];         // {channel, V index}
  logic [9:0]  voff [2];
  logic [10:0] cnt;                // clear counter / MAC counter
  logic [5:0]  vi;                 // V index
  logic [4:0]  j;                  // output index
  logic [3:0]  wi;                 // window term
  logic [4:0]  kk;
  logic signed [47:0] acc;
  meta_t       gmeta;
  logic [4:0]  slot;               // time slot of the collected vector
  logic        c;                  // channel being processed
  logic signed [15:0] pcm;

  assign c = gmeta.ch;

  logic signed [63:0] dprod, wprod;
  logic [9:0]  vaddr;
  logic [6:0]  nph;
  logic signed [47:0] tot;
  assign tot = acc + 48'(wprod >>> 30);
  always_comb begin
    // (16+i)(2k+1) pi/64 taken modulo 2 pi: the low 7 bits of the product
    nph   = 7'((7'(vi) + 7'd16) * {1'b0, kk, 1'b1});
    dprod = 64'(S[kk]) * 64'(cos128[nph]);
    vaddr = voff[c] + 10'(64 * int'(wi) + int'(j) + (wi[0] ? 32 : 0));
    wprod = 64'(vfifo[{c, vaddr}]) * 64'(dwin[32*int'(wi) + int'(j)]);
  end

  function automatic logic signed [15:0] to_pcm(input logic signed [47:0] a);
    logic signed [47:0] r;
    r = (a + 48'sd4096) >>> 13;
    if (r > 48'sd32767) return 16'sd32767;
    if (r < -48'sd32768) return -16'sd32768;
    return 16'(r);
  endfunction

  assign in_ready  = (st == F_COLLECT);
  assign out_valid = (st == F_OUT);
  assign out_pcm   = pcm;
  assign out_idx   = 10'(32 * int'(slot) + int'(j));
  assign out_meta  = gmeta;

  always_ff @(posedge clk) begin
    if (st == F_CLEAR) begin
      vfifo[cnt] <= '0;
    end else if (st == F_DCT && kk == 5'd31)
      vfifo[{c, 10'(voff[c] + 10'(vi))}] <= sat32(acc + 48'(dprod >>> 30));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= F_CLEAR;
      cnt <= '0; vi <= '0; j <= '0; wi <= '0; kk <= '0; acc <= '0;
      voff[0] <= '0; voff[1] <= '0;
      gmeta <= '0; slot <= '0; pcm <= '0; clips <= '0;
      for (int n = 0; n < 32; n++) S[n] <= '0;
    end else begin
      case (st)
        F_CLEAR: begin
          cnt <= cnt + 11'd1;
          if (cnt == 11'd2047) begin
            cnt <= '0;
            st <= F_COLLECT;
          end
        end
        F_COLLECT: if (in_valid) begin
          S[in_idx[4:0]] <= in_data;
          if (in_idx[4:0] == 5'd0) begin
            gmeta <= in_meta;
            slot  <= 5'(in_idx >> 5);
          end
          if (in_idx[4:0] == 5'd31) begin
            // make room for the new V vector
            voff[in_meta.ch] <= voff[in_meta.ch] - 10'd64;
            vi <= '0; kk <= '0; acc <= '0;
            st <= F_DCT;
          end
        end
        F_DCT: begin
          if (kk == 5'd31) begin
            acc <= '0;
            kk <= '0;
            if (vi == 6'd63) begin
              j <= '0; wi <= '0;
              st <= F_WIN;
            end else vi <= vi + 6'd1;
          end else begin
            acc <= acc + 48'(dprod >>> 30);
            kk <= kk + 5'd1;
          end
        end
        F_WIN: begin
          if (wi == 4'd15) begin
            pcm <= to_pcm(tot);
            if (to_pcm(tot) == 16'sd32767 || to_pcm(tot) == -16'sd32768) clips <= clips + 16'd1;
            acc <= '0;
            wi <= '0;
            st <= F_OUT;
          end else begin
            acc <= acc + 48'(wprod >>> 30);
            wi <= wi + 4'd1;
          end
        end
        F_OUT: if (out_ready) begin
          if (j == 5'd31) st <= F_COLLECT;
          else begin
            j <= j + 5'd1;
            st <= F_WIN;
          end
        end
        default: st <= F_COLLECT;
      endcase
    end
  end
endmodule
