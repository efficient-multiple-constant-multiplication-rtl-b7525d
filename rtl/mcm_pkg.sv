// mcm_pkg: shared types and elaboration-time arithmetic for multiple constant
// multiplication (MCM) on DSP slices.
//
// A positive constant M is rewritten as M = 2^s * (1 + 2^n * MM): s is the
// number of trailing zeros of M, and n the number of trailing zeros of
// (M >> s) - 1. This choice gives the smallest MM. For a v-bit signed input V,
//   V * M = { MM*V + (V >>> n) , V[n-1:0] } << s,
// so a DSP slice only has to form Q = MM*V + (V >>> n), which is
// v + bitlen(M >> s) - n bits wide. Several such Q fields are packed side by
// side in one multiply-add. The cost function below decides whether a set of
// constants fits one 25x18 slice; it follows the method's published cost
// rule (sum of per-constant widths plus v per extra constant, at most 24).
//
// Everything here is evaluated at elaboration time; nothing is hardware.
package mcm_pkg;

  // Limits of the tables that configure an MCM block.
  localparam int MAX_K   = 8;   // constants packed into one DSP slice
  localparam int MAX_DSP = 16;  // DSP slices in one MCM block
  localparam int MAX_OUT = 16;  // products delivered by one MCM block

  // Multiplier port widths of the DSP slice (signed 25 x 18, 48-bit P).
  localparam int DSP_A_W = 25;
  localparam int DSP_B_W = 18;
  localparam int DSP_P_W = 48;

  // Largest cost that still fits one slice (the packed operand must stay a
  // positive 25-bit signed number).
  localparam int MAX_COST = 24;

  // A group of constants sharing one slice; 0 marks an unused slot.
  // (Packed arrays, so that rows can be handed down as parameters.)
  typedef logic [0:MAX_K-1][63:0] group_t;
  // The DSP groups of an MCM block; unused rows are all zero.
  typedef logic [0:MAX_DSP-1][0:MAX_K-1][63:0] group_tab_t;
  // The list of constants whose products an MCM block delivers.
  typedef logic [0:MAX_OUT-1][63:0] const_list_t;

  // Number of bits needed to hold the unsigned value x (0 for x == 0).
  function automatic int bitlen(longint unsigned x);
    int r = 0;
    while (x != 0) begin
      x = x >> 1;
      r++;
    end
    return r;
  endfunction

  // Number of trailing zero bits of x (0 for x == 0).
  function automatic int ctz(longint unsigned x);
    int r = 0;
    if (x == 0) return 0;
    while (x[0] == 1'b0) begin
      x = x >> 1;
      r++;
    end
    return r;
  endfunction

  function automatic bit is_pow2(longint unsigned x);
    return (x != 0) && ((x & (x - 1)) == 0);
  endfunction

  // Manipulation M = 2^s * (1 + 2^n * MM).
  function automatic int manip_s(longint unsigned m);
    return ctz(m);
  endfunction

  function automatic int manip_n(longint unsigned m);
    return ctz((m >> ctz(m)) - 1);
  endfunction

  function automatic longint unsigned manip_mm(longint unsigned m);
    return ((m >> manip_s(m)) - 1) >> manip_n(m);
  endfunction

  // Width of the field Q = MM*V + (V >>> n) for a v-bit signed input.
  function automatic int field_w(int v, longint unsigned m);
    if (m == 0) return 0;
    return v + bitlen(m >> manip_s(m)) - manip_n(m);
  endfunction

  // Cost of placing the constants of a group on one slice:
  //   sum over constants of (bitlen(1 + 2^n*MM) - n) + v * (k - 1).
  // Empty slots are skipped and do not count in k.
  function automatic int group_cost(int v, group_t g);
    int cost = 0;
    int k = 0;
    for (int i = 0; i < MAX_K; i++) begin
      if (g[i] != 0) begin
        cost += bitlen(g[i] >> manip_s(g[i])) - manip_n(g[i]);
        k++;
      end
    end
    if (k > 1) cost += v * (k - 1);
    return cost;
  endfunction

  function automatic int group_size(group_t g);
    int k = 0;
    for (int i = 0; i < MAX_K; i++) if (g[i] != 0) k++;
    return k;
  endfunction

  // Offset of slot i's field in the packed product.
  function automatic int field_off(int v, group_t g, int i);
    int o = 0;
    for (int j = 0; j < i; j++) o += field_w(v, g[j]);
    return o;
  endfunction

  // The packed manipulated constant sum_i MM_i << offset_i.
  function automatic longint unsigned packed_mm(int v, group_t g);
    longint unsigned a = 0;
    for (int i = 0; i < MAX_K; i++)
      if (g[i] != 0) a |= manip_mm(g[i]) << field_off(v, g, i);
    return a;
  endfunction

  // Whether a group can be placed on one slice. The packed constant goes to
  // the 25-bit port and V to the 18-bit port; a single constant with an input
  // wider than 18 bits goes the other way round.
  function automatic bit group_fits(int v, group_t g);
    int pw;
    pw = bitlen(packed_mm(v, g)) + 1;   // as a positive signed number
    if (group_size(g) == 0) return 1'b0;
    if (group_cost(v, g) > MAX_COST) return 1'b0;
    if (v <= DSP_B_W && pw <= DSP_A_W) return 1'b1;
    if (v <= DSP_A_W && pw <= DSP_B_W) return 1'b1;
    return 1'b0;
  endfunction

  // Number of used rows in a DSP group table.
  function automatic int tab_rows(group_tab_t t);
    int r = 0;
    for (int d = 0; d < MAX_DSP; d++)
      for (int i = 0; i < MAX_K; i++)
        if (t[d][i] != 0) r = d + 1;
    return r;
  endfunction

endpackage
