// huffman_rom: direct-lookup Huffman code ROM of the SCALE&HUFFMAN decoder.
//
// The decoder presents the next 6 bits of the stream (MSB = next bit) and
// the table number; the ROM answers in the same cycle with the decoded
// values and the code length. Big-value tables return a pair (x, y), the
// count1 tables (quad = 1) return a quadruple v,w,x,y in x[1],x[0],y[1],y[0].
// Sign bits and linbits are not part of the code and are handled by the
// decoder.
//
// Contents are the ISO 11172-3 Layer III tables 0, 1, 2 and 3 and the
// count1 tables A and B. The other big-value tables (5-24, with linbits)
// are not held: for them 'supported' is low.
module huffman_rom (
  input  logic [4:0] table_sel,   // big-value table number
  input  logic       quad,        // 1: count1 table
  input  logic       quad_b,      // count1 table B (else A)
  input  logic [5:0] bits,        // next 6 stream bits, bits[5] first
  output logic       supported,
  output logic [1:0] x,
  output logic [1:0] y,
  output logic [2:0] len
);
  always_comb begin
    supported = 1'b1;
    x = '0;
    y = '0;
    len = '0;
    if (quad) begin
      if (quad_b) begin
        // table B: fixed 4-bit code, inverted vwxy
        {x, y} = ~bits[5:2];
        len = 3'd4;
      end else begin
        casez (bits)
          6'b1?????: begin {x, y} = 4'b0000; len = 3'd1; end
          6'b0101??: begin {x, y} = 4'b0001; len = 3'd4; end
          6'b0100??: begin {x, y} = 4'b0010; len = 3'd4; end
          6'b00101?: begin {x, y} = 4'b0011; len = 3'd5; end
          6'b0110??: begin {x, y} = 4'b0100; len = 3'd4; end
          6'b000101: begin {x, y} = 4'b0101; len = 3'd6; end
          6'b00100?: begin {x, y} = 4'b0110; len = 3'd5; end
          6'b000100: begin {x, y} = 4'b0111; len = 3'd6; end
          6'b0111??: begin {x, y} = 4'b1000; len = 3'd4; end
          6'b00011?: begin {x, y} = 4'b1001; len = 3'd5; end
          6'b00110?: begin {x, y} = 4'b1010; len = 3'd5; end
          6'b000000: begin {x, y} = 4'b1011; len = 3'd6; end
          6'b00111?: begin {x, y} = 4'b1100; len = 3'd5; end
          6'b000010: begin {x, y} = 4'b1101; len = 3'd6; end
          6'b000011: begin {x, y} = 4'b1110; len = 3'd6; end
          default:   begin {x, y} = 4'b1111; len = 3'd6; end  // 000001
        endcase
      end
    end else begin
      case (table_sel)
        5'd0: len = 3'd0;
        5'd1: casez (bits)
          6'b1?????: begin x = 2'd0; y = 2'd0; len = 3'd1; end
          6'b01????: begin x = 2'd1; y = 2'd0; len = 3'd2; end
          6'b001???: begin x = 2'd0; y = 2'd1; len = 3'd3; end
          default:   begin x = 2'd1; y = 2'd1; len = 3'd3; end
        endcase
        5'd2: casez (bits)
          6'b1?????: begin x = 2'd0; y = 2'd0; len = 3'd1; end
          6'b011???: begin x = 2'd1; y = 2'd0; len = 3'd3; end
          6'b010???: begin x = 2'd0; y = 2'd1; len = 3'd3; end
          6'b001???: begin x = 2'd1; y = 2'd1; len = 3'd3; end
          6'b00011?: begin x = 2'd2; y = 2'd0; len = 3'd5; end
          6'b00010?: begin x = 2'd2; y = 2'd1; len = 3'd5; end
          6'b00001?: begin x = 2'd1; y = 2'd2; len = 3'd5; end
          6'b000001: begin x = 2'd0; y = 2'd2; len = 3'd6; end
          default:   begin x = 2'd2; y = 2'd2; len = 3'd6; end
        endcase
        5'd3: casez (bits)
          6'b11????: begin x = 2'd0; y = 2'd0; len = 3'd2; end
          6'b10????: begin x = 2'd0; y = 2'd1; len = 3'd2; end
          6'b01????: begin x = 2'd1; y = 2'd1; len = 3'd2; end
          6'b001???: begin x = 2'd1; y = 2'd0; len = 3'd3; end
          6'b00011?: begin x = 2'd2; y = 2'd0; len = 3'd5; end
          6'b00010?: begin x = 2'd2; y = 2'd1; len = 3'd5; end
          6'b00001?: begin x = 2'd1; y = 2'd2; len = 3'd5; end
          6'b000001: begin x = 2'd0; y = 2'd2; len = 3'd6; end
          default:   begin x = 2'd2; y = 2'd2; len = 3'd6; end
        endcase
        default: supported = 1'b0;
      endcase
    end
  end
endmodule
