// tb_mcm_dsp_group: checks several constant groups on one DSP slice each,
// every cycle against products computed in 64-bit integer arithmetic.
//   u0: 9-bit input, constants 78913 and 100663360 (27 bits, too wide for
//       the multiplier without manipulation), all 512 inputs;
//   u1: 4-bit input, four constants 3, 5, 7, 9 on one slice, all inputs;
//   u2: 18-bit input, pair 25 and 90 (cost exactly 24), random inputs;
//   u3: 20-bit input, single constant 83 (input on the 25-bit port);
//   u4: 2-bit input, eight constants on one slice (the most the cost rule
//       admits: each manipulated constant takes at least one bit).
// The products must appear exactly two cycles after their input.
module tb_mcm_dsp_group;
  import mcm_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic signed [8:0]  v0;
  logic signed [3:0]  v1;
  logic signed [17:0] v2;
  logic signed [19:0] v3;
  logic signed [39:0] p0 [MAX_K];
  logic signed [11:0] p1 [MAX_K];
  logic signed [25:0] p2 [MAX_K];
  logic signed [27:0] p3 [MAX_K];
  logic signed [1:0]  v4;
  logic signed [9:0]  p4 [MAX_K];

  localparam group_t G0 = '{0: 78913, 1: 100663360, default: 0};
  localparam group_t G1 = '{0: 3, 1: 5, 2: 7, 3: 9, default: 0};
  localparam group_t G2 = '{0: 25, 1: 90, default: 0};
  localparam group_t G3 = '{0: 83, default: 0};
  localparam group_t G4 = '{3, 5, 9, 17, 33, 65, 6, 10};

  mcm_dsp_group #(.V_W(9),  .CONSTS(G0), .PROD_W(40)) u0 (.clk(clk), .v(v0), .prod(p0));
  mcm_dsp_group #(.V_W(4),  .CONSTS(G1), .PROD_W(12)) u1 (.clk(clk), .v(v1), .prod(p1));
  mcm_dsp_group #(.V_W(18), .CONSTS(G2), .PROD_W(26)) u2 (.clk(clk), .v(v2), .prod(p2));
  mcm_dsp_group #(.V_W(20), .CONSTS(G3), .PROD_W(28)) u3 (.clk(clk), .v(v3), .prod(p3));
  mcm_dsp_group #(.V_W(2),  .CONSTS(G4), .PROD_W(10)) u4 (.clk(clk), .v(v4), .prod(p4));

  longint h0 [3], h1 [3], h2 [3], h3 [3], h4 [3];

  task automatic chk(string tag, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s: got %0d expected %0d", tag, got, exp);
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
    for (int t = 0; t < 1200; t++) begin
      @(negedge clk);
      v0 = 9'(t < 512 ? t : $urandom);
      v1 = 4'(t);
      v4 = 2'(t);
      v2 = (t < 2) ? (t == 0 ? -18'sd131072 : 18'sd131071) : 18'($urandom);
      v3 = (t < 2) ? (t == 0 ? -20'sd524288 : 20'sd524287) : 20'($urandom);
      for (int d = 2; d > 0; d--) begin
        h0[d] = h0[d-1]; h1[d] = h1[d-1]; h2[d] = h2[d-1]; h3[d] = h3[d-1]; h4[d] = h4[d-1];
      end
      h0[0] = v0; h1[0] = v1; h2[0] = v2; h3[0] = v3; h4[0] = v4;
      if (t >= 2) begin
        for (int i = 0; i < MAX_K; i++) begin
          chk("u0", p0[i], h0[2] * longint'(G0[i]));
          chk("u1", p1[i], h1[2] * longint'(G1[i]));
          chk("u2", p2[i], h2[2] * longint'(G2[i]));
          chk("u3", p3[i], h3[2] * longint'(G3[i]));
          chk("u4", p4[i], h4[2] * longint'(G4[i]));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
