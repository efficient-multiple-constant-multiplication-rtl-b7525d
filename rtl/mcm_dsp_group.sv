// mcm_dsp_group: up to MAX_K constant multiplications of one signed input,
// computed together on a single DSP slice.
//
// Each constant M_i is rewritten as M_i = 2^s_i * (1 + 2^n_i * MM_i)
// (see mcm_pkg). Then V*M_i = {Q_i, V[n_i-1:0]} << s_i with
// Q_i = MM_i*V + (V >>> n_i), so only the Q_i need the multiplier. The slice
// forms all of them in one step:
//   multiplier operand : sum_i MM_i << O_i          (a constant)
//   other operand      : V
//   C addend           : sum_i field_i(V >>> n_i) << O_i
// where field_i(x) is x in two's complement on W_i = v + bitlen(M_i >> s_i) - n_i
// bits and O_i = W_1 + ... + W_(i-1). Field i of P then holds exactly Q_i:
// the sign bits that the C fields carry above each V >>> n_i cancel the borrow
// a negative lower field takes from the field above it. This is the method's
// "{signext, V[v-1:n]}" C operand written for a signed B port; with the input
// zero-extended in B instead, the correction becomes the published
// V[v-1] * (2^(m-s) - M/2^s) term and P is the same number. Outside the slice
// only wiring remains: slicing Q_i out of P, appending V[n_i-1:0] and shifting
// by s_i.
//
// The packed constant normally goes to the 25-bit port and V to the 18-bit
// port. When V is wider than 18 bits (possible only for a single constant),
// the two are swapped. A group that does not fit one slice stops elaboration.
//
// Ports: v input (V_W-bit signed); prod[i] = v * CONSTS[i] as a PROD_W-bit
// signed number, zero for empty slots. Latency: 2 clock cycles (the slice's
// input and output registers); a new input is taken every cycle.
module mcm_dsp_group
  import mcm_pkg::*;
#(
  parameter int     V_W    = 9,
  parameter group_t CONSTS = '{0: 78913, 1: 100663360, default: 0},
  parameter int     PROD_W = 40
) (
  input  logic                     clk,
  input  logic signed [V_W-1:0]    v,
  output logic signed [PROD_W-1:0] prod [MAX_K]
);

  localparam longint unsigned APK  = packed_mm(V_W, CONSTS);
  localparam bit              SWAP = (V_W > DSP_B_W);

  if (!group_fits(V_W, CONSTS)) begin : g_check_fit
    $error("mcm_dsp_group: constants do not fit one DSP slice for a %0d-bit input", V_W);
  end

  logic signed [DSP_A_W-1:0] dsp_a;
  logic signed [DSP_B_W-1:0] dsp_b;
  logic        [DSP_P_W-1:0] dsp_c;
  logic        [DSP_P_W-1:0] dsp_p;
  logic        [DSP_P_W-1:0] c_fld [MAX_K];
  logic signed [V_W-1:0]     v_d1, v_d2;

  if (SWAP) begin : g_swap
    assign dsp_a = DSP_A_W'(v);
    assign dsp_b = DSP_B_W'(APK);
  end else begin : g_noswap
    assign dsp_a = DSP_A_W'(APK);
    assign dsp_b = DSP_B_W'(v);
  end

  for (genvar i = 0; i < MAX_K; i++) begin : g_slot
    localparam longint unsigned M = CONSTS[i];
    localparam int S = manip_s(M);
    localparam int N = manip_n(M);
    localparam int W = field_w(V_W, M);
    localparam int O = field_off(V_W, CONSTS, i);
    if (M != 0) begin : g_used
      if (V_W + bitlen(M) > PROD_W) begin : g_check_w
        $error("mcm_dsp_group: PROD_W too small for constant %0d", M);
      end
      logic [W-1:0]        fld;
      logic signed [W-1:0] q;
      logic [63:0]         v_ext;
      // C field: V >>> n in two's complement on W bits (W > V_W always).
      assign fld      = W'(v >>> N);
      assign c_fld[i] = {{(DSP_P_W-W){1'b0}}, fld} << O;
      // Product: {Q, V[n-1:0]} << s, V taken from the matching cycle.
      assign q       = dsp_p[O +: W];
      assign v_ext   = 64'(v_d2);
      assign prod[i] = PROD_W'(signed'({q, v_ext[N-1:0]})) <<< S;
    end else begin : g_empty
      assign c_fld[i] = '0;
      assign prod[i]  = '0;
    end
  end

  always_comb begin
    dsp_c = '0;
    for (int i = 0; i < MAX_K; i++) dsp_c = dsp_c | c_fld[i];
  end

  always_ff @(posedge clk) begin
    v_d1 <= v;
    v_d2 <= v_d1;
  end

  dsp48_mac #(.A_W(DSP_A_W), .B_W(DSP_B_W), .P_W(DSP_P_W)) u_dsp (
    .clk(clk), .a(dsp_a), .b(dsp_b), .c(dsp_c), .p(dsp_p)
  );

endmodule
