// anti_alias: the alias-reduction stage. Two register banks of 18 x 32 bits
// hold the previous subband (bank A) and the subband being received
// (bank B). When bank B is full, eight butterflies are computed across the
// boundary between the two subbands, for i = 0..7:
//   A[17-i] <= A[17-i]*cs[i] - B[i]*ca[i]
//   B[i]    <= B[i]*cs[i]    + A[17-i]*ca[i]
// with cs[i] = 1/sqrt(1+c[i]^2), ca[i] = c[i]/sqrt(1+c[i]^2) and
// c = {-0.6, -0.535, -0.33, -0.185, -0.095, -0.041, -0.0142, -0.0037}
// (the standard's constants, stored here as Q2.30). Bank A, now final, is
// sent on (18 beats) and bank B moves into bank A while the next subband is
// received. After subband 31 bank B is sent as well.
// Long blocks get butterflies at all 31 boundaries, mixed blocks only
// between subbands 0 and 1, short blocks none (they pass unchanged).
//
// Timing per subband: 18 clocks to receive, 8 clocks of butterflies (one
// per clock), 18 clocks to send (fewer if out_ready stalls).
module anti_alias
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
  output logic [15:0] butterflies   // butterflies computed (statistics)
);
  function automatic coef_t cs(input logic [2:0] i);
    case (i)
      3'd0: return 32'sh36E1_2A02; 3'd1: return 32'sh386E_75FC;
      3'd2: return 32'sh3CC6_B73E; 3'd3: return 32'sh3EEE_A054;
      3'd4: return 32'sh3FB6_905C; 3'd5: return 32'sh3FF2_3F20;
      3'd6: return 32'sh3FFE_5932; default: return 32'sh3FFF_E34A;
    endcase
  endfunction
  function automatic coef_t ca(input logic [2:0] i);
    case (i)
      3'd0: return 32'shDF12_8065; 3'd1: return 32'shE1CF_24B8;
      3'd2: return 32'shEBF1_9FB1; 3'd3: return 32'shF45B_88BD;
      3'd4: return 32'shF9F2_7F16; 3'd5: return 32'shFD60_D1E4;
      3'd6: return 32'shFF17_5EE3; default: return 32'shFFC3_612E;
    endcase
  endfunction

  typedef enum logic [2:0] {A_COLLECT, A_BFLY, A_OUTA, A_OUTB} astate_t;
  astate_t    st;
  sample_t    bank_a [NSS];
  sample_t    bank_b [NSS];
  logic [4:0] k;        // sample counter inside a subband
  logic [4:0] sb;       // subband being collected into bank B
  logic [2:0] bi;       // butterfly index
  meta_t      gmeta;
  logic       do_bfly;

  // butterflies at this boundary (between subbands sb-1 and sb)?
  assign do_bfly = (gmeta.block_type != 2'd2) || (gmeta.mixed && sb == 5'd1);

  assign in_ready  = (st == A_COLLECT);
  assign out_valid = (st == A_OUTA) || (st == A_OUTB);
  assign out_data  = (st == A_OUTA) ? bank_a[k] : bank_b[k];
  assign out_idx   = (st == A_OUTA) ? 10'(18 * (int'(sb) - 1) + int'(k))
                                    : 10'(18 * int'(sb) + int'(k));
  assign out_meta  = gmeta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= A_COLLECT;
      k <= '0; sb <= '0; bi <= '0;
      gmeta <= '0;
      butterflies <= '0;
      for (int n = 0; n < NSS; n++) begin
        bank_a[n] <= '0;
        bank_b[n] <= '0;
      end
    end else begin
      case (st)
        A_COLLECT: if (in_valid) begin
          bank_b[k] <= in_data;
          if (in_idx == 10'd0) gmeta <= in_meta;
          if (k == 5'd17) begin
            k <= '0;
            if (sb == 5'd0) begin
              // first subband: nothing to pair with yet
              for (int n = 0; n < NSS; n++) bank_a[n] <= (n == 17) ? in_data : bank_b[n];
              sb <= 5'd1;
            end else begin
              bi <= '0;
              st <= A_BFLY;
            end
          end else k <= k + 5'd1;
        end
        A_BFLY: begin
          if (do_bfly) begin
            bank_a[17 - int'(bi)] <= q_mul(bank_a[17 - int'(bi)], cs(bi)) - q_mul(bank_b[5'(bi)], ca(bi));
            bank_b[5'(bi)]            <= q_mul(bank_b[5'(bi)], cs(bi)) + q_mul(bank_a[17 - int'(bi)], ca(bi));
            butterflies <= butterflies + 16'd1;
          end
          bi <= bi + 3'd1;
          if (bi == 3'd7 || !do_bfly) begin
            k <= '0;
            st <= A_OUTA;
          end
        end
        A_OUTA: if (out_ready) begin
          if (k == 5'd17) begin
            k <= '0;
            if (sb == 5'd31) st <= A_OUTB;
            else begin
              for (int n = 0; n < NSS; n++) bank_a[n] <= bank_b[n];
              sb <= sb + 5'd1;
              st <= A_COLLECT;
            end
          end else k <= k + 5'd1;
        end
        A_OUTB: if (out_ready) begin
          if (k == 5'd17) begin
            k <= '0;
            sb <= '0;
            st <= A_COLLECT;
          end else k <= k + 5'd1;
        end
        default: st <= A_COLLECT;
      endcase
    end
  end
endmodule
