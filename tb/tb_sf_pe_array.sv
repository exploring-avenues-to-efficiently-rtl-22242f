// tb_sf_pe_array: applies random weight rows to the 128-PE array and checks
// the fire mask, fire tick and done mask against 128 reference neurons.
module tb_sf_pe_array;
  logic clk = 0, rst_n = 0;
  logic clear, en;
  logic [127:0][7:0] weights;
  logic [7:0] tick, fire_tick;
  logic signed [7:0] threshold;
  logic [127:0] fire_mask, done_mask;
  int checks = 0, failures = 0;

  sf_pe_array #(.N_PE(128)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int v[128];
  bit d[128];
  logic [127:0] expm;

  initial begin
    clear = 0; en = 0; tick = 0; threshold = 8'sd50; weights = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int step = 0; step < 20; step++) begin
      @(negedge clk); clear = 1; @(negedge clk); clear = 0;
      foreach (v[i]) begin v[i] = 0; d[i] = 0; end
      for (int t = 0; t < 60; t++) begin
        @(negedge clk);
        en = ($urandom_range(0, 4) != 0);
        tick = 8'(t / 2);
        for (int i = 0; i < 128; i++) weights[i] = 8'($urandom_range(0, 24) - 6);
        expm = '0;
        if (en) for (int i = 0; i < 128; i++) if (!d[i]) begin
          v[i] += int'($signed(weights[i]));
          if (v[i] > 127) v[i] = 127;
          if (v[i] < -128) v[i] = -128;
          if (v[i] >= 50) begin d[i] = 1; expm[i] = 1; end
        end
        @(posedge clk); #1;
        checks++;
        if (fire_mask !== expm || (en && fire_tick !== tick)) failures++;
        for (int i = 0; i < 128; i++) if (done_mask[i] !== d[i]) begin failures++; break; end
      end
      en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
