// tb_mcm_auto: checks the DSP mapping algorithm and the MCM blocks built
// from it.
//   * For the eight multiplier blocks of the HEVC 2D DCT (column pass with
//     13/12/11/10-bit inputs, row pass with 20/19/18/17-bit inputs) the
//     mapping must need the published number of slices: 1, 2, 4, 7 and
//     2, 4, 5, 10. Every grouping must fit its slices and hold each constant
//     that needs a slice exactly once, and nothing else.
//   * Two constants 78913 and 100663360 on a 9-bit input share one slice;
//     eight small constants on a 2-bit input share one slice.
//   * Two mcm_auto blocks work out their groupings at elaboration time (the
//     two constants above on a 9-bit input, and the eight 16-point odd
//     constants on an 11-bit input); their products are compared with
//     64-bit products for random inputs, two cycles later.
module tb_mcm_auto;
  import mcm_pkg::*;
  import mcm_map_pkg::*;
  import dct_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  function automatic void chk(string tag, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("%s: got %0d expected %0d", tag, got, exp);
    end
  endfunction

  // Checks a computed grouping for the constants c at input width v and
  // returns its number of slices.
  function automatic int check_tab(string tag, int v, const_list_t c, group_tab_t t);
    int seen;
    for (int d = 0; d < tab_rows(t); d++) begin
      chk($sformatf("%s slice %0d fits", tag, d), group_fits(v, t[d]), 1);
      chk($sformatf("%s slice %0d size", tag, d),
          group_size(t[d]) <= max_const_dsp(v), 1);
    end
    for (int j = 0; j < MAX_OUT; j++) begin
      seen = 0;
      for (int d = 0; d < MAX_DSP; d++)
        for (int i = 0; i < MAX_K; i++)
          if (t[d][i] != 0 && t[d][i] == c[j]) seen++;
      if (needs_dsp(c, j)) chk($sformatf("%s constant %0d placed once", tag, c[j]), seen, 1);
      else if (c[j] != 0 && j == 0) chk($sformatf("%s constant %0d not placed", tag, c[j]), seen, 0);
    end
    for (int d = 0; d < MAX_DSP; d++)
      for (int i = 0; i < MAX_K; i++)
        if (t[d][i] != 0) begin
          seen = 0;
          for (int j = 0; j < MAX_OUT; j++) if (c[j] == t[d][i] && needs_dsp(c, j)) seen++;
          chk($sformatf("%s slot (%0d,%0d) holds a listed constant", tag, d, i), seen, 1);
        end
    return tab_rows(t);
  endfunction

  function automatic string tab_str(group_tab_t t);
    string s = "";
    for (int d = 0; d < tab_rows(t); d++) begin
      s = {s, "("};
      for (int i = 0; i < MAX_K; i++)
        if (t[d][i] != 0) s = {s, (i > 0) ? "," : "", $sformatf("%0d", t[d][i])};
      s = {s, ")"};
    end
    return s;
  endfunction

  // Elaboration-time mappings.
  localparam const_list_t FIG2 = '{0: 78913, 1: 100663360, default: 0};
  localparam const_list_t ODD8 = odd_consts(8);

  logic signed [8:0]  va;
  logic signed [10:0] vb;
  logic signed [36:0] pa [2];
  logic signed [17:0] pb [8];

  mcm_auto u_a (.clk(clk), .v(va), .prod(pa));
  mcm_auto #(.V_W(11), .PROD_W(18), .N_OUT(8), .OUT_CONSTS(ODD8))
    u_b (.clk(clk), .v(vb), .prod(pb));

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct {
    string       tag;
    int          v;
    const_list_t c;
    int          slices;
  } case_t;

  initial begin
    case_t       cases [10];
    const_list_t k4, k_small;
    group_tab_t  t;
    int          n;
    longint      ha [3], hb [3];

    k4    = '{0: 36, 1: 64, 2: 83, default: 0};
    k_small = '{0: 3, 1: 5, 2: 9, 3: 17, 4: 33, 5: 65, 6: 129, 7: 257, default: 0};
    cases[0] = '{"column 1st 4x4", 13, k4,             1};
    cases[1] = '{"column 2nd 4x4", 12, odd_consts(4),  2};
    cases[2] = '{"column 8x8",     11, odd_consts(8),  4};
    cases[3] = '{"column 16x16",   10, odd_consts(16), 7};
    cases[4] = '{"row 1st 4x4",    20, k4,             2};
    cases[5] = '{"row 2nd 4x4",    19, odd_consts(4),  4};
    cases[6] = '{"row 8x8",        18, odd_consts(8),  5};
    cases[7] = '{"row 16x16",      17, odd_consts(16), 10};
    cases[8] = '{"two wide",        9, FIG2,           1};
    cases[9] = '{"eight small",     2, k_small,          1};

    n = 0;
    for (int i = 0; i < 10; i++) begin
      t = map_constants(cases[i].v, cases[i].c);
      n = check_tab(cases[i].tag, cases[i].v, cases[i].c, t);
      chk($sformatf("%s slices", cases[i].tag), n, cases[i].slices);
      $display("%-15s v=%0d: %0d slices %s", cases[i].tag, cases[i].v, n, tab_str(t));
    end

    // Products of the generated blocks.
    for (int s = 0; s < 1000; s++) begin
      @(negedge clk);
      va = (s == 0) ? -9'sd256 : 9'($urandom);
      vb = (s == 0) ? -11'sd1024 : 11'($urandom);
      ha[2] = ha[1]; ha[1] = ha[0]; ha[0] = longint'(va);
      hb[2] = hb[1]; hb[1] = hb[0]; hb[0] = longint'(vb);
      if (s >= 2) begin
        for (int j = 0; j < 2; j++) chk($sformatf("fig2 prod %0d", j), longint'(pa[j]), ha[2] * longint'(FIG2[j]));
        for (int j = 0; j < 8; j++) chk($sformatf("odd8 prod %0d", j), longint'(pb[j]), hb[2] * longint'(ODD8[j]));
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
