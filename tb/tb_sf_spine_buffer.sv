// tb_sf_spine_buffer: loads random spines of random length in one cycle and
// reads them back through the head/pop interface.
module tb_sf_spine_buffer;
  import sf_pkg::*;
  logic clk = 0, rst_n = 0;
  logic load, flush, pop, head_valid;
  spike_t [127:0] load_data;
  logic [7:0] load_len;
  spike_t head;
  int checks = 0, failures = 0;

  sf_spine_buffer #(.SPINE_LEN(128)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = 0; flush = 0; pop = 0; load_len = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk);
    checks++; if (head_valid) failures++;
    for (int it = 0; it < 50; it++) begin
      int n;
      n = (it == 0) ? 128 : $urandom_range(0, 128);
      for (int i = 0; i < 128; i++) load_data[i] = spike_t'($urandom());
      load_len = 8'(n); load = 1;
      @(negedge clk); load = 0;
      for (int i = 0; i < n; i++) begin
        checks++;
        if (!head_valid || head !== load_data[i]) failures++;
        pop = 1; @(negedge clk); pop = 0;
      end
      checks++; if (head_valid) failures++;
      if (it % 10 == 5) begin
        load = 1; @(negedge clk); load = 0; flush = 1; @(negedge clk); flush = 0;
        checks++; if (head_valid && n > 0) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
