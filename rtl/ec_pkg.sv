// ec_pkg: types and constants shared by the embedded compression codec.
//
// A 4x2 block holds eight 8-bit pixels, numbered as in the codec's block
// layout: top row 0 1 4 5, bottom row 2 3 6 7, so pixels 0..3 form the left
// 2x2 sub-block and 4..7 the right one. In a packed block_t, pixel i sits in
// bits [8i+7:8i].
//
// The compressed segment is 32 bits, most significant field first:
// Mode(2) | Start Plane(2) | Decision L(2) | Decision R(2) | Coded L(12) | Coded R(12).
// The field order and widths follow the codec's published segment format.
// The numeric codes of the fields (mode = preset value of {B7,B6},
// decision 0..3 = group A, B, C, no comparison) are this design's choice.
//
// A bitplane of a 2x2 sub-block is a 4-bit vector with the sub-block's first
// pixel in the most significant bit. The three pattern groups of eight
// bitplanes are the published ones; their union is all sixteen 4-bit values.
package ec_pkg;

  typedef logic [7:0]      pixel_t;
  typedef pixel_t [7:0]    block_t;     // block_t[i] = pixel i
  typedef pixel_t [3:0]    sub_t;       // one 2x2 sub-block, sub_t[j] = pixel j
  typedef logic [3:0]      plane_t;     // one bitplane of a 2x2 sub-block

  typedef enum logic [1:0] {
    DEC_GROUP_A = 2'd0,
    DEC_GROUP_B = 2'd1,
    DEC_GROUP_C = 2'd2,
    DEC_NO_CMP  = 2'd3
  } decision_e;

  typedef struct packed {
    logic [1:0]  mode;      // preset value of {B7,B6}; B5 is preset to 0
    logic [1:0]  sp;        // start plane: number of leading planes equal to the preset
    decision_e   dec_l;
    decision_e   dec_r;
    logic [11:0] coded_l;
    logic [11:0] coded_r;
  } segment_t;

  // Predefined bitplane of group g (0..2), pattern index k (0..7).
  function automatic plane_t pattern(input logic [1:0] g, input logic [2:0] k);
    plane_t t;
    unique case (k)
      3'd0: t = 4'b0000;
      3'd1: t = 4'b1111;
      3'd2: t = 4'b1110;
      3'd3: t = 4'b0111;
      default: begin
        unique case (g)
          2'd0: begin
            unique case (k)
              3'd4: t = 4'b0011;
              3'd5: t = 4'b1100;
              3'd6: t = 4'b0001;
              default: t = 4'b1000;
            endcase
          end
          2'd1: begin
            unique case (k)
              3'd4: t = 4'b1010;
              3'd5: t = 4'b1001;
              3'd6: t = 4'b0110;
              default: t = 4'b0101;
            endcase
          end
          default: begin
            unique case (k)
              3'd4: t = 4'b1101;
              3'd5: t = 4'b1011;
              3'd6: t = 4'b0010;
              default: t = 4'b0100;
            endcase
          end
        endcase
      end
    endcase
    return t;
  endfunction

  // Bitplane b (7 = MSB) of a 2x2 sub-block.
  function automatic plane_t plane_of(input sub_t s, input logic [2:0] b);
    plane_t p;
    for (int j = 0; j < 4; j++) p[3-j] = s[j][b];
    return p;
  endfunction

endpackage
