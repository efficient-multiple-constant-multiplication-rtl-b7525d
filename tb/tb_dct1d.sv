// tb_dct1d: checks the multi-size 1D DCT against the reference transform
// (tb_ref_pkg::dct1) with a random size and random data every cycle and
// random idle cycles. uc is the column-pass unit at its defaults (9-bit
// residuals, shift log2(N)-1); ur the row-pass unit (16-bit inputs, shift
// log2(N)+6), whose full-range inputs also drive the output saturation.
// Output valid, size and data must appear exactly 3 cycles after the input.
module tb_dct1d;
  import dct_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;

  int checks = 0, failures = 0;
  int size_seen [4];

  logic              iv;
  tu_size_e          isz;
  logic signed [8:0]  xc [32];
  logic signed [15:0] xr [32];
  logic              ovc, ovr;
  tu_size_e          osc, osr;
  logic signed [15:0] yc [32], yr [32];

  dct1d uc (.clk(clk), .rst_n(rst_n), .in_valid(iv), .in_size(isz), .x(xc),
            .out_valid(ovc), .out_size(osc), .y(yc));
  dct1d #(.IN_W(16), .ROW(1'b1), .SHIFT_ADD(6)) ur (
            .clk(clk), .rst_n(rst_n), .in_valid(iv), .in_size(isz), .x(xr),
            .out_valid(ovr), .out_size(osr), .y(yr));

  typedef struct {
    logic     v;
    tu_size_e s;
    longint   yc [32];
    longint   yr [32];
  } exp_t;
  exp_t h [4];

  task automatic chk(string tag, int m, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s[%0d]: got %0d expected %0d", tag, m, got, exp);
    end
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint xl [32];
    int n;
    rst_n = 0;
    iv = 0;
    isz = TU4;
    for (int d = 0; d < 4; d++) h[d].v = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      iv  = ($urandom % 5) != 0;
      isz = tu_size_e'($urandom % 4);
      n   = 4 << int'(isz);
      for (int k = 0; k < 32; k++) begin
        xc[k] = 9'($urandom);
        xr[k] = 16'($urandom);
      end
      if (t == 5) for (int k = 0; k < 32; k++) xc[k] = -9'sd256;
      for (int d = 3; d > 0; d--) h[d] = h[d-1];
      h[0].v = iv;
      h[0].s = isz;
      if (iv) size_seen[int'(isz)]++;
      for (int k = 0; k < 32; k++) xl[k] = xc[k];
      dct1(n, log2i(n) - 1, xl, h[0].yc);
      for (int k = 0; k < 32; k++) xl[k] = xr[k];
      dct1(n, log2i(n) + 6, xl, h[0].yr);
      if (t >= 3) begin
        chk("valid", 0, ovc, h[3].v);
        chk("valid_row", 0, ovr, h[3].v);
        if (h[3].v) begin
          chk("size", 0, osc, h[3].s);
          for (int m = 0; m < 32; m++) begin
            chk("col", m, yc[m], h[3].yc[m]);
            chk("row", m, yr[m], h[3].yr[m]);
          end
        end
      end
    end
    for (int s = 0; s < 4; s++) if (size_seen[s] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
