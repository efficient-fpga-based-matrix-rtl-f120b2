// Coefficient vector register: holds the N elements c1..cN of the column
// vector C and presents one of them at a time to the multiply-accumulate unit.
//
// Loading is serial: each cycle with load=1 shifts din in at the top (position
// N) and moves every element one place towards the output end, so after N
// loads the first element written (c1) sits at the output, c2 behind it, and
// so on. While a matrix row is processed the register rotates once per
// element (rotate=1): the output element is recycled to the top, so after N
// rotations the vector is back in place for the next row and is never
// reloaded. head is always the element at the output end (registered).
// The serial vector at the multiplier input follows the paper's matrix
// figure; the rotation that reuses it across rows is this design's reading of
// how the same vector meets every row. rst clears all elements; load has
// priority over rotate.
module coef_shift_reg #(
  parameter int unsigned DW = 8,
  parameter int unsigned N  = 28
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          load,
  input  logic [DW-1:0] din,
  input  logic          rotate,
  output logic [DW-1:0] head
);
  logic [DW-1:0] c [N];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < N; i++) c[i] <= '0;
    end else if (load || rotate) begin
      for (int i = 0; i < N - 1; i++) c[i] <= c[i+1];
      c[N-1] <= load ? din : c[0];
    end
  end

  assign head = c[0];
endmodule
