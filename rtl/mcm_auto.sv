// mcm_auto: multiple constant multiplier that works out its own DSP grouping.
//
// Given only the input width and the list of constants, it runs the DSP
// mapping algorithm (mcm_map_pkg::map_constants) at elaboration time and
// builds an mcm_block from the result: power-of-two constants and
// power-of-two multiples of other constants become shifts, and the rest are
// packed onto as few DSP slices as the algorithm finds. This is the whole
// flow from a constant list to MCM hardware; the HEVC DCT datapaths instead
// pass the published groupings to mcm_block directly.
//
// Ports and timing are those of mcm_block: prod[j] = v * OUT_CONSTS[j] as a
// PROD_W-bit signed number, 2 clock cycles after v, one input per cycle.
// The defaults are the two-constant example of the method: a 9-bit signed
// input times 78913 and 100663360, both on one slice.
module mcm_auto
  import mcm_pkg::*;
  import mcm_map_pkg::*;
#(
  parameter int          V_W        = 9,
  parameter int          PROD_W     = 37,
  parameter int          N_OUT      = 2,
  parameter const_list_t OUT_CONSTS = '{0: 78913, 1: 100663360, default: 0}
) (
  input  logic                     clk,
  input  logic signed [V_W-1:0]    v,
  output logic signed [PROD_W-1:0] prod [N_OUT]
);

  localparam group_tab_t GROUPS = map_constants(V_W, OUT_CONSTS);
  localparam int         N_DSP  = tab_rows(GROUPS);

  if (N_DSP == 0 && dsp_const_count(OUT_CONSTS) != 0) begin : g_no_map
    $error("mcm_auto: no grouping of the constants within %0d DSP slices", MAX_DSP);
  end

  mcm_block #(
    .V_W(V_W), .PROD_W(PROD_W), .N_OUT(N_OUT), .OUT_CONSTS(OUT_CONSTS), .GROUPS(GROUPS)
  ) u_mcm (
    .clk(clk), .v(v), .prod(prod)
  );

endmodule
