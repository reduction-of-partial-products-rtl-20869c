// vedic_pkg: widths and types shared by the 8x8 vertically-and-crosswise
// (Urdhava Tiryakbhyam) multiplier built from 2x2 multipliers.
//
// The operands are split into four 2-bit digits, digit i holding bits
// (2i+1, 2i). The partial product of a-digit i and b-digit j is the 4-bit
// product of the two digits and carries weight 2^(2(i+j)). The 16 partial
// products are held in a packed 4x4 array pp[i][j]. The usual numbering
// p1..p16 runs over a-digits from the top and, inside each, over b-digits
// from the top: p1 = a(7,6)*b(7,6), p2 = a(7,6)*b(5,4), ..., p16 =
// a(1,0)*b(1,0), so p_k is pp[3 - (k-1)/4][3 - (k-1)%4].
//
// The reduction step packs the 16 partial products into seven numbers
// X1..X7 (struct reduced_t) whose widths are fixed by the 8x8 layout.
package vedic_pkg;

  localparam int unsigned N      = 8;       // operand width
  localparam int unsigned DIGITS = N / 2;   // 2-bit digits per operand
  localparam int unsigned PW     = 2 * N;   // product width

  typedef logic [1:0]     digit_t;          // one 2-bit digit
  typedef logic [3:0]     pp_t;             // output of one 2x2 multiplier
  typedef logic [N-1:0]   operand_t;
  typedef logic [PW-1:0]  product_t;

  // pp[i][j] = a-digit i times b-digit j, weight 2^(2(i+j))
  typedef pp_t [DIGITS-1:0][DIGITS-1:0] pp_mat_t;

  // The seven numbers left after the reduction. Each field is given with the
  // weight of its least significant bit in the comment; the field itself is
  // stored unshifted.
  typedef struct packed {
    logic [15:0] x1;   // p1 p3 p8 p16, weight 2^0
    logic [11:0] x2;   // p2 p4 p12,    weight 2^2
    logic [11:0] x3;   // p5 p7 p15,    weight 2^2
    logic [7:0]  x4;   // p6 p11,       weight 2^4
    logic [7:0]  x5;   // p9 p14,       weight 2^4
    logic [3:0]  x6;   // p10,          weight 2^6
    logic [3:0]  x7;   // p13,          weight 2^6
  } reduced_t;

endpackage
