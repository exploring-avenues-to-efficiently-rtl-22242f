// tb_inxs_central_buffer: fills all 1024 rows, then checks wide reads and
// word-masked writes against a reference copy.
module tb_inxs_central_buffer;
  logic clk = 0;
  logic rd_en, wr_en;
  logic [9:0] rd_row, wr_row;
  logic [63:0][15:0] rd_data, wr_data;
  logic [63:0] wr_mask;
  int checks = 0, failures = 0;

  inxs_central_buffer dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [63:0][15:0] m [1024];

  initial begin
    rd_en = 0; wr_en = 0; rd_row = 0; wr_row = 0; wr_mask = 0; wr_data = 0;
    @(negedge clk);
    for (int r = 0; r < 1024; r++) begin
      for (int w = 0; w < 64; w++) m[r][w] = 16'($urandom);
      wr_en = 1; wr_row = 10'(r); wr_mask = '1; wr_data = m[r];
      @(negedge clk);
    end
    for (int it = 0; it < 3000; it++) begin
      int r;
      r = $urandom_range(0, 1023);
      wr_en = ($urandom_range(0, 1) == 1); wr_row = 10'(r);
      wr_mask = {$urandom, $urandom};
      for (int w = 0; w < 64; w++) wr_data[w] = 16'($urandom);
      rd_en = 1; rd_row = 10'($urandom_range(0, 1023));
      @(negedge clk);
      checks++;
      if (rd_data !== m[rd_row]) failures++;
      if (wr_en) for (int w = 0; w < 64; w++) if (wr_mask[w]) m[r][w] = wr_data[w];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
