// 16x16 unsigned multiplier from four 8x8 MUX/Vedic multipliers.
//
// With a = {aH, aL} and b = {bH, bL} (8-bit halves), the four 8x8 products
// aL*bL, aL*bH, aH*bL and aH*bH are formed at once. Two adders combine them
// crosswise:
//   r[7:0]   = low byte of aL*bL
//   middle   = aL*bH + aH*bL + high byte of aL*bL  -> r[15:8], carry up
//   r[31:16] = aH*bH + carry of the middle sum
// The four multipliers and two adders follow the paper; the widths are the
// exact ones the sums need. Purely combinational.
module vedic_mult16x16 (
  input  logic [15:0] a,
  input  logic [15:0] b,
  output logic [31:0] r
);
  logic [15:0] p_ll, p_lh, p_hl, p_hh;

  vedic_mult8x8 u_hh (.a(a[15:8]), .b(b[15:8]), .r(p_hh));
  vedic_mult8x8 u_lh (.a(a[7:0]),  .b(b[15:8]), .r(p_lh));
  vedic_mult8x8 u_hl (.a(a[15:8]), .b(b[7:0]),  .r(p_hl));
  vedic_mult8x8 u_ll (.a(a[7:0]),  .b(b[7:0]),  .r(p_ll));

  logic [17:0] mid;   // <= 2*65025 + 255
  logic [15:0] hi;    // never overflows: the full product fits 32 bits

  always_comb begin
    mid = 18'(p_lh) + 18'(p_hl) + 18'(p_ll[15:8]);
    hi  = p_hh + 16'(mid[17:8]);
  end

  assign r = {hi, mid[7:0], p_ll[7:0]};
endmodule
