// tb_inxs_shift_add: feeds groups of 8 random ADC samples (slice 0..7) and
// checks the shifted sum sum(sample_j * 4^j), saturated to 32767, one cycle
// after the last slice, with idle cycles inserted at random.
module tb_inxs_shift_add;
  logic clk = 0, rst_n = 0;
  logic in_valid, out_valid;
  logic [7:0] in_sample;
  logic [2:0] in_slice;
  logic [15:0] out_inc;
  int checks = 0, failures = 0, sats = 0;

  inxs_shift_add dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; in_sample = 0; in_slice = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int it = 0; it < 2000; it++) begin
      longint s;
      s = 0;
      for (int j = 0; j < 8; j++) begin
        @(negedge clk);
        while ($urandom_range(0, 4) == 0) begin in_valid = 0; @(negedge clk); end
        in_valid = 1; in_slice = 3'(j);
        in_sample = (it % 5 == 0) ? 8'($urandom) : ((j > 5) ? 8'd0 : 8'($urandom_range(0, 40)));
        s += longint'(in_sample) << (2 * j);
        #1 checks++;
        if (out_valid) failures++;   // nothing before the last slice
      end
      @(negedge clk); in_valid = 0;
      checks++;
      if (s > 32767) begin s = 32767; sats++; end
      if (!out_valid || longint'(out_inc) != s) failures++;
    end
    checks++; if (sats == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
