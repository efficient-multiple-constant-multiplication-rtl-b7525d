// tb_transpose_mem: writes random columns into the buffer, then reads every
// row and checks element (r, c) equals element r of the column written to c.
// A second pass rewrites only some columns and checks the others are kept.
module tb_transpose_mem;
  logic clk = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic              wr_en;
  logic [4:0]        wr_col, rd_row;
  logic signed [15:0] wr_data [32], rd_data [32];
  logic signed [15:0] model [32][32];

  transpose_mem dut (.clk(clk), .wr_en(wr_en), .wr_col(wr_col), .wr_data(wr_data),
                     .rd_row(rd_row), .rd_data(rd_data));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0;
    wr_col = 0;
    rd_row = 0;
    for (int pass = 0; pass < 2; pass++) begin
      for (int c = 0; c < 32; c++) begin
        @(negedge clk);
        wr_en  = (pass == 0) || (c % 3 == 0);
        wr_col = 5'(c);
        for (int r = 0; r < 32; r++) begin
          wr_data[r] = 16'($urandom);
          if (wr_en) model[r][c] = wr_data[r];
        end
      end
      @(negedge clk);
      wr_en = 0;
      for (int r = 0; r < 32; r++) begin
        rd_row = 5'(r);
        #1;
        for (int c = 0; c < 32; c++) begin
          checks++;
          if (rd_data[c] !== model[r][c]) begin
            failures++;
            if (failures < 10) $display("(%0d,%0d): got %0d expected %0d", r, c, rd_data[c], model[r][c]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
