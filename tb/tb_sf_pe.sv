// tb_sf_pe: self-checking test of one SpinalFlow PE against a reference
// integrate-and-fire model (saturating 8-bit potential, fire once when the
// potential reaches the threshold, clear between spines).
module tb_sf_pe;
  logic clk = 0, rst_n = 0;
  logic clear, en, fire, done;
  logic signed [7:0] weight, threshold, potential;
  logic [7:0] tick, fire_t;
  int checks = 0, failures = 0;

  sf_pe dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ref_v, nfires;
  bit ref_done, exp_fire;
  logic [7:0] exp_t;

  initial begin
    clear = 0; en = 0; weight = 0; tick = 0; threshold = 8'sd40;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int step = 0; step < 200; step++) begin
      threshold = 8'($urandom_range(10, 100));
      @(negedge clk); clear = 1; @(negedge clk); clear = 0;
      ref_v = 0; ref_done = 0; nfires = 0;
      for (int t = 0; t < 40; t++) begin
        @(negedge clk);
        en = ($urandom_range(0, 3) != 0);
        weight = 8'($signed($urandom_range(0, 60)) - 20);
        tick = 8'(t);
        exp_fire = 0;
        if (en && !ref_done) begin
          ref_v = ref_v + int'(weight);
          if (ref_v > 127) ref_v = 127;
          if (ref_v < -128) ref_v = -128;
          if (ref_v >= int'(threshold)) begin ref_done = 1; exp_fire = 1; exp_t = tick; end
        end
        @(posedge clk); #1;
        checks++;
        if (fire !== exp_fire || (exp_fire && fire_t !== exp_t) || int'(potential) != ref_v || done !== ref_done) begin
          failures++;
          if (failures < 5) $display("mismatch step %0d t %0d: fire %b/%b pot %0d/%0d", step, t, fire, exp_fire, potential, ref_v);
        end
        nfires += int'(fire);
      end
      en = 0;
      checks++;
      if (nfires > 1) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
