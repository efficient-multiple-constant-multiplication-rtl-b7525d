// tb_dct_odd_datapath: checks the odd-part datapaths against the reference
// DCT matrix (tb_ref_pkg): y[r] = sum_k C_2N[2r+1][k] * o[k], two cycles after
// the input, one random vector per cycle.
//   u16: default, 16x16 with 10-bit inputs and the column grouping;
//   u8:  8x8 with 18-bit inputs and the row grouping;
//   u4:  4x4 with 12-bit inputs and the column grouping.
module tb_dct_odd_datapath;
  import dct_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic signed [9:0]  o16 [16];
  logic signed [17:0] o8 [8];
  logic signed [11:0] o4 [4];
  logic signed [31:0] y16 [16], y8 [8], y4 [4];

  dct_odd_datapath u16 (.clk(clk), .o(o16), .y(y16));
  dct_odd_datapath #(.N(8), .V_W(18), .GROUPS(ROW_G8)) u8 (.clk(clk), .o(o8), .y(y8));
  dct_odd_datapath #(.N(4), .V_W(12), .GROUPS(COL_G44)) u4 (.clk(clk), .o(o4), .y(y4));

  longint h16 [3][16], h8 [3][8], h4 [3][4];

  task automatic chk(string tag, int r, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s[%0d]: got %0d expected %0d", tag, r, got, exp);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      for (int k = 0; k < 16; k++) o16[k] = (t == 0) ? -10'sd512 : 10'($urandom);
      for (int k = 0; k < 8; k++)  o8[k]  = (t == 1) ? -18'sd131072 : 18'($urandom);
      for (int k = 0; k < 4; k++)  o4[k]  = 12'($urandom);
      h16[2] = h16[1]; h16[1] = h16[0];
      h8[2] = h8[1];   h8[1] = h8[0];
      h4[2] = h4[1];   h4[1] = h4[0];
      for (int k = 0; k < 16; k++) h16[0][k] = o16[k];
      for (int k = 0; k < 8; k++)  h8[0][k]  = o8[k];
      for (int k = 0; k < 4; k++)  h4[0][k]  = o4[k];
      if (t >= 2) begin
        for (int r = 0; r < 16; r++) begin
          longint e;
          e = 0;
          for (int k = 0; k < 16; k++) e += longint'(mat(32, 2 * r + 1, k)) * h16[2][k];
          chk("y16", r, y16[r], e);
        end
        for (int r = 0; r < 8; r++) begin
          longint e;
          e = 0;
          for (int k = 0; k < 8; k++) e += longint'(mat(16, 2 * r + 1, k)) * h8[2][k];
          chk("y8", r, y8[r], e);
        end
        for (int r = 0; r < 4; r++) begin
          longint e;
          e = 0;
          for (int k = 0; k < 4; k++) e += longint'(mat(8, 2 * r + 1, k)) * h4[2][k];
          chk("y4", r, y4[r], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
