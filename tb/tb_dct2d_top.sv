// tb_dct2d_top: end-to-end test of the 2D DCT at its default parameters.
//
// Sends a sequence of transform units of random size (4x4 to 32x32) with
// random residuals, column by column, with random gaps on the input, and
// checks every output row against a reference 2D transform (column pass with
// shift log2(N)-1, row pass with shift log2(N)+6, both from tb_ref_pkg). It
// also checks the timing: the first row leaves 7 cycles after the last column
// was accepted, rows then follow on consecutive cycles, and in_ready comes
// back 3 + N cycles after the last column. Each mechanism must occur at least
// once: every TU size, a size change between TUs, a stall (in_valid held while
// in_ready is low) and an input gap inside a TU. Finally it totals the DSP
// slices the design builds (one multiplier block per datapath input, each
// with its grouping) and expects 380, the published count.
module tb_dct2d_top;
  import dct_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;

  int checks = 0, failures = 0;
  int n_size [4];
  int n_switch = 0, n_stall = 0, n_gap = 0, n_rows = 0;

  logic              in_valid, in_ready, out_valid;
  tu_size_e          in_size, out_size;
  logic signed [8:0]  in_col [32];
  logic [4:0]        out_row;
  logic signed [15:0] out_coef [32];

  dct2d_top dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
                 .in_size(in_size), .in_col(in_col), .out_valid(out_valid),
                 .out_size(out_size), .out_row(out_row), .out_coef(out_coef));

  typedef struct {
    tu_size_e s;
    int       row;
    longint   c [32];
    longint   t_first;   // cycle the first row must appear, -1 if not the first row
  } row_t;
  row_t exp_q [$];
  int   busy_q [$];   // sizes of TUs whose in_ready-low period is pending
  int   low_run = 0;

  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic chk(string tag, int m, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s[%0d]: got %0d expected %0d (cycle %0d)", tag, m, got, exp, cycle);
    end
  endtask

  localparam int N_TU = 40;
  int n_dsp;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Stimulus and reference.
  initial begin
    longint x [32][32], ycol [32][32], col [32], res [32];
    tu_size_e prev;
    int n;
    rst_n = 0;
    in_valid = 0;
    in_size = TU4;
    for (int k = 0; k < 32; k++) in_col[k] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    prev = TU4;
    for (int tu = 0; tu < N_TU; tu++) begin
      tu_size_e s;
      s = (tu < 4) ? tu_size_e'(3 - tu) : tu_size_e'($urandom % 4);
      n = 4 << int'(s);
      n_size[int'(s)]++;
      if (tu > 0 && s != prev) n_switch++;
      prev = s;
      for (int r = 0; r < 32; r++)
        for (int c = 0; c < 32; c++)
          x[r][c] = (tu == 1) ? -256 : longint'($signed(9'($urandom)));
      // Reference: columns, then rows.
      for (int c = 0; c < n; c++) begin
        for (int r = 0; r < 32; r++) col[r] = (r < n) ? x[r][c] : 0;
        dct1(n, log2i(n) - 1, col, res);
        for (int r = 0; r < 32; r++) ycol[r][c] = res[r];
      end
      // Drive the columns.
      for (int c = 0; c < n; c++) begin
        if (c > 0 && ($urandom % 6) == 0) begin
          in_valid = 0;
          n_gap++;
          @(negedge clk);
        end
        in_valid = 1;
        in_size  = s;
        for (int r = 0; r < 32; r++) in_col[r] = (r < n) ? 9'(x[r][c]) : 9'($urandom);
        while (!in_ready) begin
          n_stall++;
          @(negedge clk);
        end
        @(negedge clk);
      end
      in_valid = 0;
      busy_q.push_back(n);
      for (int r = 0; r < n; r++) begin
        row_t e;
        longint rowv [32];
        for (int c = 0; c < 32; c++) rowv[c] = (c < n) ? ycol[r][c] : 0;
        dct1(n, log2i(n) + 6, rowv, e.c);
        e.s = s;
        e.row = r;
        e.t_first = (r == 0) ? cycle - 1 + 7 : -1;
        exp_q.push_back(e);
      end
      // Sometimes hold the next TU ready at once, to hit the stall.
      if (($urandom % 2) == 0) repeat ($urandom % 3) @(negedge clk);
    end
    wait (exp_q.size() == 0);
    repeat (5) @(negedge clk);
    n_dsp = 4 * (mcm_pkg::tab_rows(mcm_map_pkg::map_constants(13, DCT4_CONSTS)) +
                 mcm_pkg::tab_rows(mcm_map_pkg::map_constants(20, DCT4_CONSTS)))
          + 4 * (mcm_pkg::tab_rows(COL_G44) + mcm_pkg::tab_rows(ROW_G44))
          + 8 * (mcm_pkg::tab_rows(COL_G8) + mcm_pkg::tab_rows(ROW_G8))
          + 16 * (mcm_pkg::tab_rows(COL_G16) + mcm_pkg::tab_rows(ROW_G16));
    chk("DSP slices", 0, n_dsp, 380);
    for (int s = 0; s < 4; s++) if (n_size[s] == 0) begin failures++; $display("size %0d never sent", s); end
    if (n_switch == 0) begin failures++; $display("no size change"); end
    if (n_stall == 0)  begin failures++; $display("no stall"); end
    if (n_gap == 0)    begin failures++; $display("no input gap"); end
    $display("TUs per size 4/8/16/32: %0d %0d %0d %0d, size changes %0d, stall cycles %0d, gaps %0d, rows %0d",
             n_size[0], n_size[1], n_size[2], n_size[3], n_switch, n_stall, n_gap, n_rows);
    $display("DSP slices: %0d", n_dsp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Output monitor.
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      if (exp_q.size() == 0) begin
        failures++;
        if (failures < 10) $display("unexpected output row at cycle %0d", cycle);
      end else begin
        row_t e;
        e = exp_q.pop_front();
        n_rows++;
        chk("size", 0, out_size, e.s);
        chk("row", 0, out_row, e.row);
        if (e.t_first >= 0) chk("first-row cycle", 0, cycle, e.t_first);
        for (int m = 0; m < 32; m++) chk("coef", m, out_coef[m], e.c[m]);
      end
    end
  end

  // in_ready stays low for 3 + N cycles after the last column of a TU.
  always @(negedge clk) begin
    if (rst_n) begin
      if (!in_ready) low_run++;
      else if (low_run > 0) begin
        int nb;
        nb = (busy_q.size() > 0) ? busy_q.pop_front() : -1;
        chk("in_ready low cycles", nb, low_run, 3 + nb);
        low_run = 0;
      end
    end
  end

  // Rows of one TU leave on consecutive cycles.
  always @(negedge clk) begin
    if (rst_n && !out_valid && exp_q.size() > 0 && exp_q[0].row != 0) begin
      failures++;
      if (failures < 10) $display("gap inside the output rows at cycle %0d", cycle);
    end
  end
endmodule
