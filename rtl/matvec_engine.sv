// Matrix-vector multiplier G = A * C for an ROWS x COLS matrix A and a
// COLS x 1 vector C of unsigned DW-bit elements, using one MUX/Vedic
// multiply-accumulate unit and a result RAM.
//
// Operation. A pulse on start begins a new operation. The next COLS words
// accepted on data_in (in_valid=1) are the vector elements c1..cCOLS; they are
// shifted into the coefficient register. The ROWS*COLS words after that are
// the matrix, row by row, a(r,1)..a(r,COLS). Every matrix word is registered
// (the "a" register) and, one cycle later, multiplied by the vector element
// that the rotating coefficient register presents, and added into the
// accumulator G. When a row's last product has been added, G is written into
// the result RAM at the row's address the following cycle, while the next
// row already accumulates. One word can be accepted every cycle with no
// stalls; words offered before start, or after the last matrix word, are
// ignored. done rises with the write of the last row and stays high until
// the next start; busy is high from start until then.
//
// Timing: a matrix word accepted at clock edge t reaches G at edge t+1; the
// row result is in the RAM after edge t+2 for the row's last word. The whole
// operation takes COLS + ROWS*COLS accepted words plus two cycles.
// Results are read through rd_addr/data_out with one cycle of read latency,
// at any time. row and index give the row and element position of the next
// matrix word expected.
//
// The datapath (serial vector, register for the matrix element, multiplier,
// adder, D flip-flop accumulator, RAM) follows the paper's matrix figure. The
// loading order, the control sequence and the interface are this design's
// own; the port names start, data_in, data_out, row, index and done are taken
// from the paper's simulation window.
module matvec_engine
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
  input  logic             start,
  input  logic             in_valid,
  input  logic [DW-1:0]    data_in,
  input  logic [RW-1:0]    rd_addr,
  output logic [ACC_W-1:0] data_out,
  output logic [RW-1:0]    row,
  output logic [CW-1:0]    index,
  output logic             busy,
  output logic             done
);
  typedef enum logic [1:0] {
    S_IDLE,   // waiting for start (also after done)
    S_LOADC,  // receiving the vector C
    S_RUNA,   // receiving the matrix A
    S_FLUSH   // last word received, pipeline draining
  } state_t;

  state_t state;

  // ---------------------------------------------------------------- control
  logic load_c, take_a;
  assign load_c = (state == S_LOADC) && in_valid;
  assign take_a = (state == S_RUNA)  && in_valid;

  logic last_col, last_row;
  assign last_col = (32'(index) == COLS - 1);
  assign last_row = (32'(row)   == ROWS - 1);

  // Stage 1: the registered matrix element and its position.
  logic [DW-1:0] a_reg;
  logic          a_vld, a_first, a_last;
  logic [RW-1:0] a_row;

  // Stage 2: pending RAM write of a finished row.
  logic          w_pend;
  logic [RW-1:0] w_row;

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_IDLE;
      row     <= '0;
      index   <= '0;
      done    <= 1'b0;
      a_reg   <= '0;
      a_vld   <= 1'b0;
      a_first <= 1'b0;
      a_last  <= 1'b0;
      a_row   <= '0;
      w_pend  <= 1'b0;
      w_row   <= '0;
    end else begin
      a_vld  <= take_a;
      w_pend <= a_vld && a_last;
      if (take_a) begin
        a_reg   <= data_in;
        a_first <= (index == '0);
        a_last  <= last_col;
        a_row   <= row;
      end
      if (a_vld && a_last) w_row <= a_row;

      if (start) begin
        state <= S_LOADC;
        row   <= '0;
        index <= '0;
        done  <= 1'b0;
      end else begin
        unique case (state)
          S_IDLE: ;
          S_LOADC: if (load_c) begin
            if (last_col) begin
              index <= '0;
              state <= S_RUNA;
            end else begin
              index <= index + 1'b1;
            end
          end
          S_RUNA: if (take_a) begin
            if (last_col) begin
              index <= '0;
              if (last_row) state <= S_FLUSH;
              else          row   <= row + 1'b1;
            end else begin
              index <= index + 1'b1;
            end
          end
          S_FLUSH: if (w_pend && 32'(w_row) == ROWS - 1) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end

  assign busy = (state != S_IDLE);

  // --------------------------------------------------------------- datapath
  logic [DW-1:0]    c_head;
  logic [ACC_W-1:0] g;

  coef_shift_reg #(.DW(DW), .N(COLS)) u_coef (
    .clk    (clk),
    .rst    (rst),
    .load   (load_c),
    .din    (data_in),
    .rotate (a_vld),
    .head   (c_head)
  );

  mac_unit #(.DW(DW), .ACC_W(ACC_W)) u_mac (
    .clk   (clk),
    .rst   (rst),
    .en    (a_vld),
    .first (a_first),
    .a     (a_reg),
    .c     (c_head),
    .g     (g)
  );

  result_ram #(.DEPTH(ROWS), .W(ACC_W)) u_ram (
    .clk   (clk),
    .rst   (rst),
    .we    (w_pend),
    .waddr (w_row),
    .wdata (g),
    .raddr (rd_addr),
    .rdata (data_out)
  );

  // A row result is written exactly once, after all COLS of its products.
  row_write_after_last: assert property (@(posedge clk) disable iff (rst)
                                         w_pend |-> $past(a_vld && a_last))
    else $error("matvec_engine: RAM write without a finished row");
endmodule
