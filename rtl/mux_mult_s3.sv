// MUX-based 3xBW multiplier (the "3x3" multiplier for BW=3).
//
// The 3-bit multiplicand a is the select of an 8:1 multiplexer; the multiplier
// b feeds eight data lines that hold the eight possible products, built from
// shifts and adders only:
//   000 : 0                    100 : b<<2
//   001 : b                    101 : b + (b<<2)
//   010 : b<<1                 110 : (b<<1) + (b<<2)
//   011 : b + (b<<1)           111 : b + (b<<1) + (b<<2)
// so the mux output is a*b. This follows the paper's description of the 8:1
// mux multiplier. The output is BW+3 bits (6 for 3x3), the exact product
// width; wider outputs would only carry zeros. Purely combinational.
module mux_mult_s3 #(
  parameter int unsigned BW = 3
) (
  input  logic [2:0]      a,
  input  logic [BW-1:0]   b,
  output logic [BW+2:0]   y
);
  localparam int unsigned YW = BW + 3;

  logic [YW-1:0] b0, b1, b2;   // b, b<<1, b<<2
  logic [YW-1:0] line [8];

  always_comb begin
    b0 = YW'(b);
    b1 = b0 << 1;
    b2 = b0 << 2;
    line[0] = '0;
    line[1] = b0;
    line[2] = b1;
    line[3] = b0 + b1;
    line[4] = b2;
    line[5] = b0 + b2;
    line[6] = b1 + b2;
    line[7] = b0 + b1 + b2;
  end

  always_comb y = line[a];
endmodule
