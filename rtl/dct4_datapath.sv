// dct4_datapath: the 4-point HEVC DCT core (first 4x4 datapath).
//
// A butterfly forms E[k] = x[k] + x[3-k] and O[k] = x[k] - x[3-k] (k = 0, 1),
// one bit wider than x. Each of these four values goes through a multiple
// constant multiplier for the 4-point constants {64, 83, 36}: an mcm_auto,
// which runs the DSP mapping algorithm at elaboration time. 64 becomes a
// shift; 83 and 36 share one slice for inputs up to 18 bits (the column
// pass) and take one slice each above (the row pass), which is the published
// grouping for this datapath. Then
//   y0 = 64 E0 + 64 E1    y2 = 64 E0 - 64 E1
//   y1 = 83 O0 + 36 O1    y3 = 36 O0 - 83 O1.
// One multiplier per butterfly output mirrors the datapath's structure of a
// single input times three constants; the products the sums do not use are
// left to synthesis to remove.
//
// Ports: x[k] (IN_W-bit signed), y[r] unscaled (ACC_W-bit signed). Latency 2
// clock cycles; one vector per cycle.
module dct4_datapath
  import dct_pkg::*;
#(
  parameter int IN_W  = 12,
  parameter int ACC_W = 32
) (
  input  logic                    clk,
  input  logic signed [IN_W-1:0]  x [4],
  output logic signed [ACC_W-1:0] y [4]
);

  localparam int V_W    = IN_W + 1;
  localparam int PROD_W = V_W + 7;

  logic signed [V_W-1:0]    bf [4];      // E0, E1, O0, O1
  logic signed [PROD_W-1:0] p  [4][3];   // p[i][j] = bf[i] * {64, 83, 36}[j]

  assign bf[0] = V_W'(x[0]) + V_W'(x[3]);
  assign bf[1] = V_W'(x[1]) + V_W'(x[2]);
  assign bf[2] = V_W'(x[0]) - V_W'(x[3]);
  assign bf[3] = V_W'(x[1]) - V_W'(x[2]);

  for (genvar i = 0; i < 4; i++) begin : g_mcm
    mcm_auto #(
      .V_W(V_W), .PROD_W(PROD_W), .N_OUT(3), .OUT_CONSTS(DCT4_CONSTS)
    ) u_mcm (
      .clk(clk), .v(bf[i]), .prod(p[i])
    );
  end

  assign y[0] = ACC_W'(p[0][0]) + ACC_W'(p[1][0]);
  assign y[2] = ACC_W'(p[0][0]) - ACC_W'(p[1][0]);
  assign y[1] = ACC_W'(p[2][1]) + ACC_W'(p[3][2]);
  assign y[3] = ACC_W'(p[2][2]) - ACC_W'(p[3][1]);

endmodule
