// transpose_mem: N x N buffer between the column and the row 1D DCT.
//
// The column pass delivers one column of intermediate coefficients per cycle;
// the row pass needs one row per cycle. The buffer is written a whole column
// at a time (wr_col selects it) and read a whole row at a time (rd_row selects
// it, read combinationally). Since a full row must be readable in one cycle
// and a full column writable in one cycle, it is a register array rather than
// a RAM. A single buffer holds one transform unit; the controller makes sure
// reads of one unit finish before the next unit is written.
//
// Ports: wr_en, wr_col, wr_data[r] (element r of the column); rd_row,
// rd_data[c] (element c of the row). Write takes effect at the clock edge.
module transpose_mem #(
  parameter int N = 32,
  parameter int W = 16
) (
  input  logic                 clk,
  input  logic                 wr_en,
  input  logic [$clog2(N)-1:0] wr_col,
  input  logic signed [W-1:0]  wr_data [N],
  input  logic [$clog2(N)-1:0] rd_row,
  output logic signed [W-1:0]  rd_data [N]
);

  logic signed [W-1:0] mem [N][N];   // mem[row][col]

  always_ff @(posedge clk) begin
    if (wr_en)
      for (int r = 0; r < N; r++) mem[r][wr_col] <= wr_data[r];
  end

  always_comb begin
    for (int c = 0; c < N; c++) rd_data[c] = mem[rd_row][c];
  end

endmodule
