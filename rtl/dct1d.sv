// dct1d: multi-size HEVC forward 1D DCT, one column (or row) of up to 32
// samples per clock cycle.
//
// Partial-butterfly decomposition: for a 32-point input, E32[k] = x[k] +
// x[31-k] feeds a 16-point DCT and O32[k] = x[k] - x[31-k] the 16x16 odd
// datapath; the 16-point DCT splits the same way into the 8x8 odd datapath and
// an 8-point DCT, that one into the second 4x4 odd datapath and the 4-point
// core. A smaller transform enters the chain lower down: 4x4 uses only the
// 4-point core, 8x8 adds the second 4x4 datapath, 16x16 the 8x8 datapath and
// 32x32 all four. The outputs interleave: even outputs come from the smaller
// DCT, odd outputs from the odd datapath of that level.
//
// The raw sums are rounded and shifted right by log2(N) + SHIFT_ADD, then
// saturated to OUT_W bits and registered: SHIFT_ADD = BIT_DEPTH - 9 for the
// column pass and 6 for the row pass, as in the HEVC reference transform.
// ROW selects the published DSP groupings of the row pass for the odd
// datapaths (the 4-point core works out its own). Inputs wider at each
// butterfly level give the multipliers IN_W+1 .. IN_W+4 bits (10..13 for the
// column pass with 9-bit residuals, 17..20 for the row pass with 16-bit
// intermediates).
//
// Ports: in_valid/in_size/x in, out_valid/out_size/y out; y[m] for m >= N is
// zero. Latency 3 clock cycles, one vector per cycle, no back-pressure.
module dct1d
  import mcm_pkg::*;
  import dct_pkg::*;
#(
  parameter int IN_W      = 9,
  parameter bit ROW       = 1'b0,
  parameter int SHIFT_ADD = -1,
  parameter int ACC_W     = 32,
  parameter int OUT_W     = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  tu_size_e                in_size,
  input  logic signed [IN_W-1:0]  x [NMAX],
  output logic                    out_valid,
  output tu_size_e                out_size,
  output logic signed [OUT_W-1:0] y [NMAX]
);

  localparam int W1 = IN_W + 1;
  localparam int W2 = IN_W + 2;
  localparam int W3 = IN_W + 3;

  logic signed [W1-1:0] e32 [16], o32 [16], in16 [16];
  logic signed [W2-1:0] e16 [8],  o16 [8],  in8 [8];
  logic signed [W3-1:0] e8 [4],   o8 [4],   in4 [4];

  // Butterfly chain with the size-dependent entry points.
  always_comb begin
    for (int k = 0; k < 16; k++) begin
      e32[k]  = W1'(x[k]) + W1'(x[31-k]);
      o32[k]  = W1'(x[k]) - W1'(x[31-k]);
      in16[k] = (in_size == TU32) ? e32[k] : W1'(x[k]);
    end
    for (int k = 0; k < 8; k++) begin
      e16[k] = W2'(in16[k]) + W2'(in16[15-k]);
      o16[k] = W2'(in16[k]) - W2'(in16[15-k]);
      in8[k] = (in_size >= TU16) ? e16[k] : W2'(x[k]);
    end
    for (int k = 0; k < 4; k++) begin
      e8[k]  = W3'(in8[k]) + W3'(in8[7-k]);
      o8[k]  = W3'(in8[k]) - W3'(in8[7-k]);
      in4[k] = (in_size >= TU8) ? e8[k] : W3'(x[k]);
    end
  end

  logic signed [ACC_W-1:0] y4 [4], od4 [4], od8 [8], od16 [16];

  dct4_datapath #(.IN_W(W3), .ACC_W(ACC_W)) u_dp4 (
    .clk(clk), .x(in4), .y(y4)
  );
  dct_odd_datapath #(.N(4), .V_W(W3), .ACC_W(ACC_W),
                     .GROUPS(ROW ? dct_pkg::ROW_G44 : dct_pkg::COL_G44)) u_dp44 (
    .clk(clk), .o(o8), .y(od4)
  );
  dct_odd_datapath #(.N(8), .V_W(W2), .ACC_W(ACC_W),
                     .GROUPS(ROW ? dct_pkg::ROW_G8 : dct_pkg::COL_G8)) u_dp8 (
    .clk(clk), .o(o16), .y(od8)
  );
  dct_odd_datapath #(.N(16), .V_W(W1), .ACC_W(ACC_W),
                     .GROUPS(ROW ? dct_pkg::ROW_G16 : dct_pkg::COL_G16)) u_dp16 (
    .clk(clk), .o(o32), .y(od16)
  );

  // Valid and size follow the two multiplier cycles.
  logic     v_d1, v_d2;
  tu_size_e s_d1, s_d2;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_d1 <= 1'b0;
      v_d2 <= 1'b0;
      s_d1 <= TU4;
      s_d2 <= TU4;
    end else begin
      v_d1 <= in_valid;
      v_d2 <= v_d1;
      s_d1 <= in_size;
      s_d2 <= s_d1;
    end
  end

  // Interleave the levels and pick the transform size.
  logic signed [ACC_W-1:0] y8 [8], y16 [16], y32 [32], raw [NMAX];
  logic signed [OUT_W-1:0] y_next [NMAX];
  always_comb begin
    for (int i = 0; i < 4; i++)  begin y8[2*i]  = y4[i];  y8[2*i+1]  = od4[i];  end
    for (int i = 0; i < 8; i++)  begin y16[2*i] = y8[i];  y16[2*i+1] = od8[i];  end
    for (int i = 0; i < 16; i++) begin y32[2*i] = y16[i]; y32[2*i+1] = od16[i]; end
    for (int m = 0; m < NMAX; m++) begin
      unique case (s_d2)
        TU4:     raw[m] = (m < 4)  ? y4[m % 4]   : '0;
        TU8:     raw[m] = (m < 8)  ? y8[m % 8]   : '0;
        TU16:    raw[m] = (m < 16) ? y16[m % 16] : '0;
        default: raw[m] = y32[m];
      endcase
    end
  end

  // Round, shift by log2(N) + SHIFT_ADD and saturate.
  localparam logic signed [ACC_W-1:0] OUT_MAX = ACC_W'((1 << (OUT_W - 1)) - 1);
  localparam logic signed [ACC_W-1:0] OUT_MIN = -ACC_W'(1 << (OUT_W - 1));
  always_comb begin
    int sh;
    logic signed [ACC_W-1:0] r;
    sh = log2n(s_d2) + SHIFT_ADD;
    for (int m = 0; m < NMAX; m++) begin
      r = (raw[m] + (ACC_W'(1) <<< (sh - 1))) >>> sh;
      if (r > OUT_MAX)      y_next[m] = OUT_MAX[OUT_W-1:0];
      else if (r < OUT_MIN) y_next[m] = OUT_MIN[OUT_W-1:0];
      else                  y_next[m] = r[OUT_W-1:0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_size  <= TU4;
    end else begin
      out_valid <= v_d2;
      out_size  <= s_d2;
    end
  end

  always_ff @(posedge clk) y <= y_next;

endmodule
