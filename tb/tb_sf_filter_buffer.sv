// tb_sf_filter_buffer: fills all 4608 rows of the filter buffer with rows
// derived from their address, then checks random and sequential reads
// (1024-bit rows, 1-cycle latency) and the read-during-write rule.
module tb_sf_filter_buffer;
  logic clk = 0;
  logic wr_en, rd_en;
  logic [12:0] wr_addr, rd_addr;
  logic [1023:0] wr_data, rd_data;
  int checks = 0, failures = 0;

  sf_filter_buffer dut (.*);
  always #5 clk = ~clk;

  function automatic logic [1023:0] pat(int a, int salt);
    logic [1023:0] r;
    for (int w = 0; w < 32; w++) r[w*32 +: 32] = 32'(a * 2654435761 + w * 40503 + salt);
    return r;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; rd_en = 0; wr_addr = 0; rd_addr = 0; wr_data = 0;
    @(negedge clk);
    for (int a = 0; a < 4608; a++) begin
      wr_en = 1; wr_addr = 13'(a); wr_data = pat(a, 0);
      @(negedge clk);
    end
    wr_en = 0;
    for (int k = 0; k < 3000; k++) begin
      int a;
      a = (k < 1000) ? k : $urandom_range(0, 4607);
      rd_en = 1; rd_addr = 13'(a);
      @(negedge clk); rd_en = 0;
      checks++;
      if (rd_data !== pat(a, 0)) failures++;
    end
    // read and write the same row in one cycle: old data, then new
    rd_en = 1; rd_addr = 13'd100; wr_en = 1; wr_addr = 13'd100; wr_data = pat(100, 9);
    @(negedge clk); rd_en = 0; wr_en = 0;
    checks++; if (rd_data !== pat(100, 0)) failures++;
    rd_en = 1; @(negedge clk); rd_en = 0;
    checks++; if (rd_data !== pat(100, 9)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
