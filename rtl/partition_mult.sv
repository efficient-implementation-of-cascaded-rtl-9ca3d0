// Partition multiplier: an N x N unsigned multiplier (N = R*S) built from
// R x R component multipliers with no carries between segments.
//
// Both operands are cut into S segments of R bits, A = A0..A(S-1) and
// B = B0..B(S-1). Every segment of A is multiplied by every segment of B in a
// component multiplier (S*S of them). For each segment Bj the products of the
// even segments of A (A0*Bj, A2*Bj, ...) are 2R bits wide and sit 2R bits
// apart, so they are simply concatenated; the result is (A_E * Bj), where A_E
// is A with its odd segments zeroed. The same is done with the odd segments,
// giving (A_O * Bj) / 2^R. Each concatenation is shifted to the weight of Bj
// (the odd ones R bits further), and two binary adder trees sum them to A_E*B
// and A_O*B. A last adder gives A*B = A_E*B + A_O*B. No carry ever runs
// between the products inside a concatenation: the carry chains are only in
// the adder trees.
//
// The segmentation into even and odd halves, the concatenation, the shifts
// (0, R, 2R, 3R for the even group; R, 2R, 3R, 4R for the odd one), the
// pairwise adder tree and the final adder follow the published structure,
// shown there for N = 32, R = 8, S = 4. Each adder adds only where its two
// operands overlap and passes the low bits of the lower operand through,
// which is what keeps the carry chains short. Signals are stored 2N bits
// wide; bits that are always zero are removed by synthesis. Generalising the
// published four-segment tree, S must be a power of two, at least 2.
//
// Interface: a, b are N-bit unsigned operands, p = a * b (2N bits).
// Timing: purely combinational.
module partition_mult #(
  parameter int unsigned R = 8,   // bits per segment (r)
  parameter int unsigned S = 4    // number of segments per operand (s)
) (
  input  logic [R*S-1:0]   a,
  input  logic [R*S-1:0]   b,
  output logic [2*R*S-1:0] p
);

  localparam int unsigned N  = R * S;
  localparam int unsigned PW = 2 * N;
  localparam int unsigned H  = S / 2;   // segments per parity group

  initial begin
    assert (S >= 2 && (S & (S - 1)) == 0)
      else $error("partition_mult: S must be a power of two, at least 2");
  end

  // Component products prod[i][j] = A_i * B_j.
  logic [2*R-1:0] prod [S][S];

  for (genvar i = 0; i < S; i++) begin : g_a
    for (genvar j = 0; j < S; j++) begin : g_b
      component_mult #(.R(R)) u_cm (
        .a(a[i*R +: R]),
        .b(b[j*R +: R]),
        .p(prod[i][j])
      );
    end
  end

  // Concatenation of the even (resp. odd) products for each B segment.
  logic [N-1:0] cat_e [S];
  logic [N-1:0] cat_o [S];

  for (genvar j = 0; j < S; j++) begin : g_cat
    for (genvar k = 0; k < H; k++) begin : g_k
      assign cat_e[j][k*2*R +: 2*R] = prod[2*k][j];
      assign cat_o[j][k*2*R +: 2*R] = prod[2*k+1][j];
    end
  end

  // Adder trees, heap ordered: node 1 is the root, leaves S..2S-1 hold the
  // concatenations of B segments 0..S-1. A node adds its right child, shifted
  // by the width its left child covers (SH bits), to its left child. The SH
  // low bits of the left child have nothing to add to and pass through; only
  // the upper part goes through a carry chain (33 bits at the first level
  // for N = 32, 41 + 1 at the second). The odd tree is built the same way
  // and is R bits short of its true weight.
  logic [PW-1:0] tree_e [1:2*S-1];
  logic [PW-1:0] tree_o [1:2*S-1];

  for (genvar j = 0; j < S; j++) begin : g_leaf
    assign tree_e[S+j] = PW'(cat_e[j]);
    assign tree_o[S+j] = PW'(cat_o[j]);
  end

  for (genvar n = 1; n < S; n++) begin : g_node
    localparam int unsigned SH = R * (S >> $clog2(n + 1));
    assign tree_e[n] = {tree_e[2*n][PW-1:SH] + tree_e[2*n+1][PW-SH-1:0], tree_e[2*n][SH-1:0]};
    assign tree_o[n] = {tree_o[2*n][PW-1:SH] + tree_o[2*n+1][PW-SH-1:0], tree_o[2*n][SH-1:0]};
  end

  // A*B = A_E*B + A_O*B: the odd sum enters R bits up, the low R bits of
  // the even sum pass through.
  assign p = {tree_e[1][PW-1:R] + tree_o[1][PW-R-1:0], tree_e[1][R-1:0]};

endmodule
