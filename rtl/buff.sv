// buff: the BUFF stage between the IMDCT and the synthesis filterbank.
// The IMDCT delivers a granule subband by subband (18 time samples of
// subband 0, then of subband 1, ...); the filterbank needs it time slot by
// time slot (the 32 subband samples of time 0, then of time 1, ...).
//
// The buffer has two banks of 576 x 32 bits used in turn: while one bank is
// written with a granule from the IMDCT (address 18*sb + t), the other is
// read by the filterbank (address 18*sb + t for output index 32*t + sb).
// A bank becomes readable when its 576th sample is written and writable
// again when its 576th sample has been read, so the two sides run
// concurrently and stall only when both banks are full (writer) or empty
// (reader). Each bank keeps the meta data of its granule.
// Reads are synchronous; one sample is sent every two clocks.
module buff
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
  output logic [15:0] swaps        // granules handed over (statistics)
);
  sample_t    mem [2][GRANULE];
  logic [1:0] full;
  meta_t      bmeta [2];
  logic       wsel, rsel;
  logic [9:0] widx;
  logic [4:0] rt, rsb;             // read time slot / subband
  logic       rphase;              // 0: read issued, 1: data on out_data
  sample_t    q;

  assign in_ready  = !full[wsel];
  assign out_valid = full[rsel] && rphase;
  assign out_data  = q;
  assign out_idx   = 10'(32 * int'(rt) + int'(rsb));
  assign out_meta  = bmeta[rsel];

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) mem[wsel][in_idx] <= in_data;
    if (full[rsel] && !rphase) q <= mem[rsel][10'(18 * int'(rsb) + int'(rt))];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full <= '0; wsel <= 1'b0; rsel <= 1'b0; widx <= '0;
      rt <= '0; rsb <= '0; rphase <= 1'b0; swaps <= '0;
      bmeta[0] <= '0; bmeta[1] <= '0;
    end else begin
      logic [1:0] nfull;
      nfull = full;
      if (in_valid && in_ready) begin
        if (widx == 10'd0) bmeta[wsel] <= in_meta;
        if (widx == 10'd575) begin
          widx <= '0;
          nfull[wsel] = 1'b1;
          wsel <= !wsel;
          swaps <= swaps + 16'd1;
        end else widx <= widx + 10'd1;
      end
      if (full[rsel]) begin
        if (!rphase) rphase <= 1'b1;
        else if (out_ready) begin
          rphase <= 1'b0;
          if (rsb == 5'd31) begin
            rsb <= '0;
            if (rt == 5'd17) begin
              rt <= '0;
              nfull[rsel] = 1'b0;
              rsel <= !rsel;
            end else rt <= rt + 5'd1;
          end else rsb <= rsb + 5'd1;
        end
      end
      full <= nfull;
    end
  end
endmodule
