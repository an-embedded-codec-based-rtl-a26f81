// ec_side_compare: predefined bitplane comparison for one 2x2 sub-block.
//
// The four bitplanes from the start plane downward (taken from the
// comparison-rounded pixels) are looked up in each of the three pattern
// groups of eight. A group can code the sub-block when it holds the first
// three of those planes; the 12-bit code is then four 3-bit pattern
// indices, first plane in the top bits. If the group also holds the fourth
// plane the code is exact; otherwise the fourth plane is replaced by the
// group pattern at the smallest Hamming distance (lowest index on a tie),
// which minimises the summed error of that plane. A group that codes all
// four planes exactly is preferred; among equals the order is A, B, C.
// When no group qualifies, "no comparison" stores the three planes from the
// start plane of the no-comparison-rounded pixels, 4 bits each.
// The three-of-four qualifying rule and the groups follow the published
// algorithm; the exact/inexact preference and the nearest-pattern choice are
// this design's reading of it. Purely combinational.
module ec_side_compare
  import ec_pkg::*;
(
  input  sub_t        cmp_sub,
  input  sub_t        nocmp_sub,
  input  logic [1:0]  sp,
  output decision_e   dec,
  output logic [11:0] coded
);
  // Index of pattern p in group g, and whether it is there.
  function automatic logic [3:0] lookup(input logic [1:0] g, input plane_t p);
    logic [3:0] r;
    r = 4'b0000;
    for (int n = 7; n >= 0; n--)
      if (pattern(g, 3'(n)) == p) r = {1'b1, 3'(n)};
    return r;
  endfunction

  // Index of the pattern of group g nearest to p in Hamming distance.
  function automatic logic [2:0] nearest(input logic [1:0] g, input plane_t p);
    logic [2:0] best_n;
    logic [2:0] best_d;
    logic [2:0] d;
    best_n = 3'd0;
    best_d = 3'd5;
    for (int n = 0; n < 8; n++) begin
      d = 3'($countones(pattern(g, 3'(n)) ^ p));
      if (d < best_d) begin
        best_d = d;
        best_n = 3'(n);
      end
    end
    return best_n;
  endfunction

  plane_t      q [4];
  logic [3:0]  lk    [3][4];
  logic        ok3   [3];
  logic        ok4   [3];
  logic [11:0] gcode [3];

  always_comb begin
    for (int k = 0; k < 4; k++) q[k] = plane_of(cmp_sub, 3'(7 - int'(sp) - k));

    for (int g = 0; g < 3; g++) begin
      for (int k = 0; k < 4; k++) lk[g][k] = lookup(2'(g), q[k]);
      ok3[g]   = lk[g][0][3] && lk[g][1][3] && lk[g][2][3];
      ok4[g]   = ok3[g] && lk[g][3][3];
      gcode[g] = {lk[g][0][2:0], lk[g][1][2:0], lk[g][2][2:0],
                  lk[g][3][3] ? lk[g][3][2:0] : nearest(2'(g), q[3])};
    end

    if      (ok4[0]) begin dec = DEC_GROUP_A; coded = gcode[0]; end
    else if (ok4[1]) begin dec = DEC_GROUP_B; coded = gcode[1]; end
    else if (ok4[2]) begin dec = DEC_GROUP_C; coded = gcode[2]; end
    else if (ok3[0]) begin dec = DEC_GROUP_A; coded = gcode[0]; end
    else if (ok3[1]) begin dec = DEC_GROUP_B; coded = gcode[1]; end
    else if (ok3[2]) begin dec = DEC_GROUP_C; coded = gcode[2]; end
    else begin
      dec   = DEC_NO_CMP;
      coded = {plane_of(nocmp_sub, 3'(7 - int'(sp))),
               plane_of(nocmp_sub, 3'(6 - int'(sp))),
               plane_of(nocmp_sub, 3'(5 - int'(sp)))};
    end
  end
endmodule
