// tb_dct4_datapath: checks the 4-point core against the reference 4-point
// matrix, y = C_4 * x unscaled, two cycles after each random input vector.
// u0 has 12-bit inputs (one slice for 83 and 36), u1 19-bit (one slice each).
module tb_dct4_datapath;
  import dct_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic signed [11:0] x0 [4];
  logic signed [18:0] x1 [4];
  logic signed [31:0] y0 [4], y1 [4];

  dct4_datapath u0 (.clk(clk), .x(x0), .y(y0));
  dct4_datapath #(.IN_W(19)) u1 (.clk(clk), .x(x1), .y(y1));

  longint h0 [3][4], h1 [3][4];

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
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      for (int k = 0; k < 4; k++) begin
        x0[k] = (t == 0) ? -12'sd2048 : 12'($urandom);
        x1[k] = (t == 1) ? ((k < 2) ? 19'sd262143 : -19'sd262144) : 19'($urandom);
      end
      h0[2] = h0[1]; h0[1] = h0[0];
      h1[2] = h1[1]; h1[1] = h1[0];
      for (int k = 0; k < 4; k++) begin
        h0[0][k] = x0[k];
        h1[0][k] = x1[k];
      end
      if (t >= 2) begin
        for (int r = 0; r < 4; r++) begin
          longint e0, e1;
          e0 = 0;
          e1 = 0;
          for (int k = 0; k < 4; k++) begin
            e0 += longint'(mat(4, r, k)) * h0[2][k];
            e1 += longint'(mat(4, r, k)) * h1[2][k];
          end
          chk("y0", r, y0[r], e0);
          chk("y1", r, y1[r], e1);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
