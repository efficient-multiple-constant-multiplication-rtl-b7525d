// tb_mcm_block: checks multiple constant multipliers built from DSP groups
// and shifts against 64-bit products, two cycles after each input.
//   u0: default block, the 16 odd constants of the 32-point DCT on a 10-bit
//       input with the column grouping (7 slices; 4 and 88 by shifts),
//       every input value;
//   u1: the same constants on a 17-bit input with the row grouping
//       (10 slices), random inputs;
//   u2: the 4-point constants 64, 83, 36 on a 13-bit input (64 by a shift).
module tb_mcm_block;
  import mcm_pkg::*;
  import dct_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  localparam const_list_t K16 = '{90, 90, 88, 85, 82, 78, 73, 67,
                                  61, 54, 46, 38, 31, 22, 13, 4};
  localparam const_list_t K4  = '{64, 83, 36, 0, 0, 0, 0, 0,
                                  0, 0, 0, 0, 0, 0, 0, 0};

  logic signed [9:0]  v0;
  logic signed [16:0] v1;
  logic signed [12:0] v2;
  logic signed [17:0] p0 [16];
  logic signed [23:0] p1 [16];
  logic signed [19:0] p2 [3];

  mcm_block u0 (.clk(clk), .v(v0), .prod(p0));
  mcm_block #(.V_W(17), .PROD_W(24), .N_OUT(16), .OUT_CONSTS(K16), .GROUPS(ROW_G16))
    u1 (.clk(clk), .v(v1), .prod(p1));
  mcm_block #(.V_W(13), .PROD_W(20), .N_OUT(3), .OUT_CONSTS(K4), .GROUPS(COL_G4))
    u2 (.clk(clk), .v(v2), .prod(p2));

  longint h0 [3], h1 [3], h2 [3];

  task automatic chk(string tag, int j, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s[%0d]: got %0d expected %0d", tag, j, got, exp);
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
    for (int t = 0; t < 1100; t++) begin
      @(negedge clk);
      v0 = 10'(t);
      v1 = (t == 0) ? -17'sd65536 : 17'($urandom);
      v2 = (t == 0) ? -13'sd4096 : 13'($urandom);
      for (int d = 2; d > 0; d--) begin
        h0[d] = h0[d-1]; h1[d] = h1[d-1]; h2[d] = h2[d-1];
      end
      h0[0] = v0; h1[0] = v1; h2[0] = v2;
      if (t >= 2) begin
        for (int j = 0; j < 16; j++) begin
          chk("u0", j, p0[j], h0[2] * longint'(K16[j]));
          chk("u1", j, p1[j], h1[2] * longint'(K16[j]));
        end
        for (int j = 0; j < 3; j++) chk("u2", j, p2[j], h2[2] * longint'(K4[j]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
