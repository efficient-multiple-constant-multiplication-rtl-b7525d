// tb_dsp48_mac: drives random operands into the DSP slice model every cycle
// and checks P = A*B + C (mod 2^48) two cycles later, including the extreme
// operand values.
module tb_dsp48_mac;
  logic clk = 0;
  always #5 clk = ~clk;

  logic signed [24:0] a;
  logic signed [17:0] b;
  logic        [47:0] c, p;
  longint exp_q [$];
  int checks = 0, failures = 0;

  dsp48_mac dut (.clk(clk), .a(a), .b(b), .c(c), .p(p));

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
      if (t < 4) begin
        a = (t[0]) ? -25'sd16777216 : 25'sd16777215;
        b = (t[1]) ? -18'sd131072 : 18'sd131071;
      end else begin
        a = $signed(25'($urandom));
        b = $signed(18'($urandom));
      end
      c = {$urandom, $urandom};
      exp_q.push_back((longint'(a) * longint'(b) + longint'(c)) & 64'hFFFF_FFFF_FFFF);
      if (t >= 2) begin
        longint e;
        e = exp_q.pop_front();
        checks++;
        if (longint'(p) != e) begin
          failures++;
          if (failures < 10) $display("mismatch t=%0d p=%h exp=%h", t, p, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
