// dct2d_top: HEVC forward 2D DCT for 4x4, 8x8, 16x16 and 32x32 transform
// units, built on DSP-slice multiple constant multipliers.
//
// A transform unit (TU) of N x N residuals enters one column per cycle. The
// column 1D DCT (9-bit inputs, shift log2(N) - 1) writes each transformed
// column into the transpose memory. When all N columns are in, the memory is
// read one row per cycle into the row 1D DCT (16-bit inputs, shift
// log2(N) + 6), which delivers the final coefficients one row per cycle. The
// two 1D units use different DSP groupings, because their multipliers see
// different input widths.
//
// Flow control: in_ready is high while columns of the current TU are being
// accepted. After the last column it drops until the transposed rows have all
// been issued to the row DCT (the pipeline drain of the column DCT plus N
// cycles), since one transpose buffer serves one TU at a time. The output has
// no back-pressure.
//
// Interface: in_valid/in_ready/in_size (sampled with the first column)/in_col
// (in_col[r] = residual in row r, lanes r >= N ignored). out_valid/out_size/
// out_row/out_coef: out_coef[c] is coefficient (out_row, c) of the TU, lanes
// c >= N are zero. Latency from the last column in to the first row out:
// 3 (column DCT) + 1 (memory) + 3 (row DCT) cycles. A 32x32 TU takes
// 32 + 4 + 32 = 68 cycles of input time.
module dct2d_top
  import dct_pkg::*;
#(
  parameter int IN_W  = RES_W,
  parameter int OUT_W = COEF_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  tu_size_e                in_size,
  input  logic signed [IN_W-1:0]  in_col [NMAX],
  output logic                    out_valid,
  output tu_size_e                out_size,
  output logic [4:0]              out_row,
  output logic signed [OUT_W-1:0] out_coef [NMAX]
);

  typedef enum logic [1:0] {S_COL, S_DRAIN, S_ROW} state_e;

  state_e   state;
  tu_size_e tu_size, col_size;
  logic [4:0] col_cnt, wr_cnt, row_cnt;
  logic [5:0] tu_n;
  logic       accept;

  // Size of the TU being accepted: taken from the first column.
  assign col_size = (col_cnt == 5'd0) ? in_size : tu_size;
  assign tu_n     = 6'd1 << log2n(tu_size);
  assign in_ready = (state == S_COL);
  assign accept   = in_valid && in_ready;

  // Column pass.
  logic                    colq_valid;
  tu_size_e                colq_size;
  logic signed [COEF_W-1:0] colq [NMAX];

  dct1d #(.IN_W(IN_W), .ROW(1'b0), .SHIFT_ADD(BIT_DEPTH - 9), .OUT_W(COEF_W)) u_col (
    .clk(clk), .rst_n(rst_n), .in_valid(accept), .in_size(col_size), .x(in_col),
    .out_valid(colq_valid), .out_size(colq_size), .y(colq)
  );

  // Transpose memory.
  logic signed [COEF_W-1:0] row_data [NMAX];

  transpose_mem #(.N(NMAX), .W(COEF_W)) u_tmem (
    .clk(clk), .wr_en(colq_valid), .wr_col(wr_cnt), .wr_data(colq),
    .rd_row(row_cnt), .rd_data(row_data)
  );

  // Row pass.
  logic row_issue;
  assign row_issue = (state == S_ROW);

  dct1d #(.IN_W(COEF_W), .ROW(1'b1), .SHIFT_ADD(6), .OUT_W(OUT_W)) u_row (
    .clk(clk), .rst_n(rst_n), .in_valid(row_issue), .in_size(tu_size), .x(row_data),
    .out_valid(out_valid), .out_size(out_size), .y(out_coef)
  );

  // Controller.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_COL;
      tu_size <= TU4;
      col_cnt <= '0;
      wr_cnt  <= '0;
      row_cnt <= '0;
    end else begin
      if (colq_valid) wr_cnt <= wr_cnt + 5'd1;
      unique case (state)
        S_COL: if (accept) begin
          if (col_cnt == 5'd0) tu_size <= in_size;
          if (6'(col_cnt) == (6'd1 << log2n(col_size)) - 6'd1) begin
            col_cnt <= '0;
            state   <= S_DRAIN;
          end else begin
            col_cnt <= col_cnt + 5'd1;
          end
        end
        S_DRAIN: if (colq_valid && 6'(wr_cnt) == tu_n - 6'd1) begin
          wr_cnt <= '0;
          state  <= S_ROW;
        end
        S_ROW: begin
          if (6'(row_cnt) == tu_n - 6'd1) begin
            row_cnt <= '0;
            state   <= S_COL;
          end else begin
            row_cnt <= row_cnt + 5'd1;
          end
        end
        default: state <= S_COL;
      endcase
    end
  end

  // Row index of the output coefficients.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_row <= '0;
    else if (out_valid) out_row <= (6'(out_row) == (6'd1 << log2n(out_size)) - 6'd1) ? 5'd0 : out_row + 5'd1;
  end

  // The column DCT must never deliver more columns than the TU has.
  a_no_extra_col: assert property (@(posedge clk) disable iff (!rst_n)
    colq_valid |-> state != S_ROW);

endmodule
