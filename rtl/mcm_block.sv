// mcm_block: multiplies one signed input by a list of constants, using as few
// DSP slices as the given grouping allows.
//
// This is the shape of the multiplier that the DSP-mapping flow produces for a
// list of constants:
//   * a constant that is a power of two costs only a shift of the input;
//   * a constant that is a power-of-two multiple of a constant already on a
//     DSP slice costs only a shift of that product;
//   * every other constant sits in one row of GROUPS, and each row is one DSP
//     slice that forms all its products at once (mcm_dsp_group).
// The grouping itself is a parameter, computed by mcm_auto's mapping search
// or given by hand (the published HEVC groupings); this module checks
// at elaboration that every group fits a slice and that every constant of
// OUT_CONSTS has a source, and stops elaboration otherwise.
//
// Ports: v (V_W-bit signed input); prod[j] = v * OUT_CONSTS[j] as a PROD_W-bit
// signed number. All products appear 2 clock cycles after v, one input per
// cycle.
module mcm_block
  import mcm_pkg::*;
#(
  parameter int          V_W        = 10,
  parameter int          PROD_W     = 18,
  parameter int          N_OUT      = 16,
  // 32-point HEVC odd constants; default grouping is the column 16x16 one.
  parameter const_list_t OUT_CONSTS = '{90, 90, 88, 85, 82, 78, 73, 67,
                                        61, 54, 46, 38, 31, 22, 13, 4},
  parameter group_tab_t  GROUPS     = '{0: '{0: 13, 1: 67, default: 0}, 1: '{0: 22, 1: 85, default: 0}, 2: '{0: 82, 1: 78, default: 0}, 3: '{0: 31, 1: 90, default: 0}, 4: '{0: 38, 1: 73, default: 0}, 5: '{0: 46, 1: 61, default: 0}, 6: '{0: 54, default: 0}, default: '0}
) (
  input  logic                     clk,
  input  logic signed [V_W-1:0]    v,
  output logic signed [PROD_W-1:0] prod [N_OUT]
);

  localparam int N_DSP = tab_rows(GROUPS);

  // Source of a constant: kind 0 = DSP product, 1 = shifted input,
  // 2 = shifted DSP product, 3 = none. Encoded as kind*65536 + g*256 + slot*16 + p.
  function automatic int find_src(longint unsigned c);
    for (int g = 0; g < MAX_DSP; g++)
      for (int i = 0; i < MAX_K; i++)
        if (GROUPS[g][i] == c && c != 0) return g * 256 + i * 16;
    if (is_pow2(c)) return 1 * 65536 + ctz(c);
    for (int g = 0; g < MAX_DSP; g++)
      for (int i = 0; i < MAX_K; i++)
        for (int p = 1; p < 16; p++)
          if (GROUPS[g][i] != 0 && (GROUPS[g][i] << p) == c)
            return 2 * 65536 + g * 256 + i * 16 + p;
    return 3 * 65536;
  endfunction

  logic signed [PROD_W-1:0] gp [MAX_DSP][MAX_K];
  logic signed [V_W-1:0]    v_d1, v_d2;

  always_ff @(posedge clk) begin
    v_d1 <= v;
    v_d2 <= v_d1;
  end

  for (genvar g = 0; g < MAX_DSP; g++) begin : g_dsp
    if (g < N_DSP) begin : g_used
      mcm_dsp_group #(.V_W(V_W), .CONSTS(GROUPS[g]), .PROD_W(PROD_W)) u_grp (
        .clk(clk), .v(v), .prod(gp[g])
      );
    end else begin : g_unused
      for (genvar i = 0; i < MAX_K; i++) begin : g_zero
        assign gp[g][i] = '0;
      end
    end
  end

  for (genvar j = 0; j < N_OUT; j++) begin : g_out
    localparam int SRC  = find_src(OUT_CONSTS[j]);
    localparam int KIND = SRC / 65536;
    localparam int G    = (SRC / 256) % 256;
    localparam int I    = (SRC / 16) % 16;
    localparam int P    = SRC % 16;
    if (KIND == 0) begin : g_direct
      assign prod[j] = gp[G][I];
    end else if (KIND == 1) begin : g_shift_in
      assign prod[j] = PROD_W'(v_d2) <<< P;
    end else if (KIND == 2) begin : g_shift_prod
      assign prod[j] = gp[G][I] <<< P;
    end else begin : g_nosrc
      $error("mcm_block: constant %0d has no DSP group and is no shift", OUT_CONSTS[j]);
      assign prod[j] = '0;
    end
  end

endmodule
