// ecc2d_pkg: shared types and functions of the two-dimensional (2D) ECC.
//
// A 16-bit data word is split into four groups X, Y, Z and W of four bits
// each. Written as a 4x4 matrix, the groups are the columns and the bit
// index 1..4 is the row:
//
//            X   Y   Z   W
//   row 1    X1  Y1  Z1  W1   \  upper half (Region 1)
//   row 2    X2  Y2  Z2  W2   /
//   row 3    X3  Y3  Z3  W3   \  lower half (Region 2)
//   row 4    X4  Y4  Z4  W4   /
//
// Sixteen redundant bits are computed from it by XOR:
//   diagonal bits  D1 = X1^Y2^Z1^W2   D2 = X2^Y1^Z2^W1   (rows 1-2)
//                  D3 = X3^Y4^Z3^W4   D4 = X4^Y3^Z4^W3   (rows 3-4)
//   parity bits    Pi = Xi^Yi^Zi^Wi              (row parity, i = 1..4)
//   check bits     Cg13 = g1^g3, Cg24 = g2^g4    (per group g = X,Y,Z,W)
// Data and redundancy together form the 32-bit stored codeword.
//
// Packing: the first-named bit is the most significant one, so the data word
// is {X1..X4, Y1..Y4, Z1..Z4, W1..W4} (X1 in bit 15) and the redundancy is
// {D1..D4, P1..P4, Cx13,Cy13,Cz13,Cw13, Cx24,Cy24,Cz24,Cw24} (D1 in bit 15).
// The grouping and the equations follow the published scheme; the bit
// packing and the region encoding are choices of this design.
package ecc2d_pkg;

  localparam int unsigned DATA_W = 16;
  localparam int unsigned RED_W  = 16;
  localparam int unsigned CW_W   = DATA_W + RED_W;

  // Data word viewed as four groups; index [1] is the first bit of a group.
  typedef struct packed {
    logic [1:4] x;
    logic [1:4] y;
    logic [1:4] z;
    logic [1:4] w;
  } data_t;

  // Redundant bits. c13/c24 are indexed by group: [1]=X, [2]=Y, [3]=Z, [4]=W.
  // The syndrome has the same layout (SD, SP, SC13, SC24).
  typedef struct packed {
    logic [1:4] d;
    logic [1:4] p;
    logic [1:4] c13;
    logic [1:4] c24;
  } red_t;

  typedef struct packed {
    data_t data;
    red_t  red;
  } codeword_t;

  // Result of the region selection (Table of regions):
  // REGION1 - more set syndrome bits in rows 1-2 than in rows 3-4
  // REGION2 - fewer
  // REGION3 - equal (also the error-free word)
  typedef enum logic [1:0] {
    REGION1 = 2'd1,
    REGION2 = 2'd2,
    REGION3 = 2'd3
  } region_e;

  // Row i of the matrix, as {Xi, Yi, Zi, Wi}.
  function automatic logic [1:4] get_row(input data_t m, input int unsigned i);
    return {m.x[i], m.y[i], m.z[i], m.w[i]};
  endfunction

  // Redundancy of a data word.
  function automatic red_t calc_red(input data_t m);
    red_t r;
    r.d[1] = m.x[1] ^ m.y[2] ^ m.z[1] ^ m.w[2];
    r.d[2] = m.x[2] ^ m.y[1] ^ m.z[2] ^ m.w[1];
    r.d[3] = m.x[3] ^ m.y[4] ^ m.z[3] ^ m.w[4];
    r.d[4] = m.x[4] ^ m.y[3] ^ m.z[4] ^ m.w[3];
    for (int unsigned i = 1; i <= 4; i++) begin
      r.p[i] = ^get_row(m, i);
    end
    r.c13 = {m.x[1] ^ m.x[3], m.y[1] ^ m.y[3], m.z[1] ^ m.z[3], m.w[1] ^ m.w[3]};
    r.c24 = {m.x[2] ^ m.x[4], m.y[2] ^ m.y[4], m.z[2] ^ m.z[4], m.w[2] ^ m.w[4]};
    return r;
  endfunction

endpackage
