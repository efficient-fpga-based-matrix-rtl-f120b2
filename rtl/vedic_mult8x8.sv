// 8x8 unsigned multiplier built from MUX sub-multipliers in Urdhva
// Tiryakbhyam ("vertically and crosswise") order.
//
// Each operand is cut into three digit groups of mixed radix:
//   a = { A = a[7:6], B = a[5:3], C = a[2:0] }
//   b = { D = b[7:6], E = b[5:3], F = b[2:0] }
// A and D carry weight 2^6, B and E 2^3, C and F 2^0. Nine cross products are
// formed at once by MUX multipliers (one 2x2: A*D; four 3x2: B*D, A*E, D*C,
// A*F; four 3x3: B*E, E*C, B*F, C*F). Four column adders then sum the
// products of equal weight, each taking the carry (everything above the low
// three bits) of the column below it:
//   R[2:0]   = C*F                                  (no adder)
//   R[5:3]   from  E*C + B*F + carry1
//   R[8:6]   from  D*C + B*E + A*F + carry2
//   R[11:9]  from  B*D + A*E + carry3
//   R[15:12] from  A*D + carry4
// The grouping, the choice of sub-multiplier per cross product and the adder
// chain follow the paper. For each 3x2 product the 2-bit group drives the mux
// select, and for each 3x3 product the group of a does; the paper does not say
// which operand is the select there. Purely combinational.
module vedic_mult8x8 (
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] r
);
  logic [1:0] ga, gd;        // A, D : 2-bit groups
  logic [2:0] gb, gc, ge, gf; // B, C, E, F : 3-bit groups

  assign ga = a[7:6];
  assign gb = a[5:3];
  assign gc = a[2:0];
  assign gd = b[7:6];
  assign ge = b[5:3];
  assign gf = b[2:0];

  logic [3:0] p_ad;
  logic [4:0] p_bd, p_ae, p_dc, p_af;
  logic [5:0] p_be, p_ec, p_bf, p_cf;

  mux_mult_s2 #(.BW(2)) u_ad (.a(ga), .b(gd), .y(p_ad));
  mux_mult_s2 #(.BW(3)) u_bd (.a(gd), .b(gb), .y(p_bd));
  mux_mult_s2 #(.BW(3)) u_ae (.a(ga), .b(ge), .y(p_ae));
  mux_mult_s2 #(.BW(3)) u_dc (.a(gd), .b(gc), .y(p_dc));
  mux_mult_s2 #(.BW(3)) u_af (.a(ga), .b(gf), .y(p_af));
  mux_mult_s3 #(.BW(3)) u_be (.a(gb), .b(ge), .y(p_be));
  mux_mult_s3 #(.BW(3)) u_ec (.a(gc), .b(ge), .y(p_ec));
  mux_mult_s3 #(.BW(3)) u_bf (.a(gb), .b(gf), .y(p_bf));
  mux_mult_s3 #(.BW(3)) u_cf (.a(gc), .b(gf), .y(p_cf));

  // Column sums. Widths hold the largest possible value of each column:
  // s2 <= 49+49+7 = 105, s3 <= 21+49+21+13 = 104, s4 <= 21+21+13 = 55,
  // s5 <= 9+6 = 15.
  logic [6:0] s2, s3;
  logic [5:0] s4;
  logic [3:0] s5;

  always_comb begin
    s2 = 7'(p_ec) + 7'(p_bf) + 7'(p_cf[5:3]);
    s3 = 7'(p_dc) + 7'(p_be) + 7'(p_af) + 7'(s2[6:3]);
    s4 = 6'(p_bd) + 6'(p_ae) + 6'(s3[6:3]);
    s5 = p_ad + 4'(s4[5:3]);
  end

  assign r = {s5, s4[2:0], s3[2:0], s2[2:0], p_cf[2:0]};
endmodule
