// dct_odd_datapath: the N x N "odd" matrix product of a 2N-point HEVC DCT in
// partial-butterfly form (N = 4: second 4x4 datapath, N = 8: 8x8 datapath,
// N = 16: 16x16 datapath).
//
// With O[k] = x[k] - x[2N-1-k], the odd-numbered outputs of the 2N-point DCT
// are y[2r+1] = sum_k C_2N[2r+1][k] * O[k]. Every column k of that matrix holds
// each of the N odd constants once (up to sign), so each input O[k] gets one
// multiple constant multiplier (mcm_block) producing its N products, and each
// output is a signed sum of one product from every multiplier. The DSP
// grouping of the multipliers is a parameter (column and row passes differ).
//
// Ports: o[k] (V_W-bit signed), y[r] = y[2r+1] of the 2N-point DCT before any
// scaling, ACC_W-bit signed. Latency 2 clock cycles (the multipliers'); the
// adder trees are combinational. One vector per cycle.
module dct_odd_datapath
  import mcm_pkg::*;
  import dct_pkg::*;
#(
  parameter int         N      = 16,
  parameter int         V_W    = 10,
  parameter int         ACC_W  = 32,
  parameter group_tab_t GROUPS = dct_pkg::COL_G16
) (
  input  logic                    clk,
  input  logic signed [V_W-1:0]   o [N],
  output logic signed [ACC_W-1:0] y [N]
);

  localparam int          PROD_W = V_W + 7;   // all constants are below 128
  localparam const_list_t CONSTS = odd_consts(N);

  // Index of the multiplier output that carries magnitude c.
  function automatic int const_idx(int c);
    for (int j = 0; j < N; j++) if (CONSTS[j] == longint'(c)) return j;
    return 0;
  endfunction

  logic signed [PROD_W-1:0] p    [N][N];   // p[k][j] = o[k] * CONSTS[j]
  logic signed [ACC_W-1:0]  term [N][N];   // term[r][k] = C[2r+1][k] * o[k]

  for (genvar k = 0; k < N; k++) begin : g_mcm
    mcm_block #(
      .V_W(V_W), .PROD_W(PROD_W), .N_OUT(N), .OUT_CONSTS(CONSTS), .GROUPS(GROUPS)
    ) u_mcm (
      .clk(clk), .v(o[k]), .prod(p[k])
    );
  end

  for (genvar r = 0; r < N; r++) begin : g_row
    for (genvar k = 0; k < N; k++) begin : g_col
      localparam int C = coef(2 * N, 2 * r + 1, k);
      localparam int J = const_idx(C < 0 ? -C : C);
      if (C < 0) begin : g_neg
        assign term[r][k] = -ACC_W'(p[k][J]);
      end else begin : g_pos
        assign term[r][k] = ACC_W'(p[k][J]);
      end
    end
  end

  always_comb begin
    for (int r = 0; r < N; r++) begin
      y[r] = '0;
      for (int k = 0; k < N; k++) y[r] = y[r] + term[r][k];
    end
  end

endmodule
