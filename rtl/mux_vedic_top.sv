// Top level: the MUX/Vedic matrix-vector multiplier and the stand-alone
// 16x16 MUX/Vedic multiplier, side by side.
//
// The matrix-vector engine (see matvec_engine) multiplies a ROWS x COLS
// matrix of DW-bit unsigned elements, streamed in one word per cycle, by a
// COLS x 1 vector loaded the same way, and keeps the ROWS results in its RAM;
// its defaults are a 1028 x 28 matrix of 8-bit elements. Its multiplier is
// the 8x8 MUX/Vedic multiplier. The 16x16 multiplier, built from four 8x8
// ones, is brought out on its own ports (m16_a, m16_b -> m16_r, purely
// combinational) so that both multiplier sizes of the design are available.
module mux_vedic_top
  import mvm_pkg::*;
#(
  parameter int unsigned DW    = mvm_pkg::DATA_W,
  parameter int unsigned ROWS  = mvm_pkg::MAT_ROWS,
  parameter int unsigned COLS  = mvm_pkg::MAT_COLS,
  parameter int unsigned ACC_W = mvm_pkg::acc_width(DW, COLS),
  localparam int unsigned RW   = $clog2(ROWS),
  localparam int unsigned CW   = (COLS > 1) ? $clog2(COLS) : 1
) (
  input  logic             clk,
  input  logic             rst,
  // matrix-vector engine
  input  logic             start,
  input  logic             in_valid,
  input  logic [DW-1:0]    data_in,
  input  logic [RW-1:0]    rd_addr,
  output logic [ACC_W-1:0] data_out,
  output logic [RW-1:0]    row,
  output logic [CW-1:0]    index,
  output logic             busy,
  output logic             done,
  // stand-alone 16x16 multiplier
  input  logic [15:0]      m16_a,
  input  logic [15:0]      m16_b,
  output logic [31:0]      m16_r
);
  matvec_engine #(.DW(DW), .ROWS(ROWS), .COLS(COLS), .ACC_W(ACC_W)) u_mvm (
    .clk, .rst, .start, .in_valid, .data_in, .rd_addr,
    .data_out, .row, .index, .busy, .done
  );

  vedic_mult16x16 u_m16 (.a(m16_a), .b(m16_b), .r(m16_r));
endmodule
