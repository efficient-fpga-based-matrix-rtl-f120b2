// MUX-based 2xBW multiplier (the "2x2" multiplier for BW=2, "3x2" for BW=3).
//
// The 2-bit multiplicand a does not enter any arithmetic: it is the select of
// a 4:1 multiplexer. The multiplier b feeds the four data lines, each of which
// already holds one of the four possible products:
//   line 00 : 0
//   line 01 : b
//   line 10 : b shifted left by one
//   line 11 : b plus (b shifted left by one), the only adder in the block
// so the mux output is a*b. The structure follows the paper's 4:1-mux figure
// and truth table; only the parameterisation over BW is this design's own.
// Purely combinational; y is BW+2 bits wide, the exact product width.
module mux_mult_s2 #(
  parameter int unsigned BW = 2
) (
  input  logic [1:0]      a,
  input  logic [BW-1:0]   b,
  output logic [BW+1:0]   y
);
  logic [BW+1:0] line [4];

  always_comb begin
    line[0] = '0;
    line[1] = (BW+2)'(b);
    line[2] = (BW+2)'(b) << 1;
    line[3] = (BW+2)'(b) + ((BW+2)'(b) << 1);
  end

  always_comb begin
    unique case (a)
      2'b00:   y = line[0];
      2'b01:   y = line[1];
      2'b10:   y = line[2];
      default: y = line[3];
    endcase
  end
endmodule
