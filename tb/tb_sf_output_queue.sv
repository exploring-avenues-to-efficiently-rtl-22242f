// tb_sf_output_queue: pushes random fire masks in tick order and checks the
// emitted spine: one spike per accepted cycle, ascending PE within a tick,
// positions 0,1,2..., then a spine_done pulse carrying the spike count.
// The output side applies random back-pressure so the queue fills up.
module tb_sf_output_queue;
  import sf_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_last, almost_full, out_valid, out_ready, spine_done, empty;
  logic [127:0] in_mask;
  logic [7:0] in_tick, spine_len;
  spike_t out_spike;
  logic [6:0] out_idx;
  int checks = 0, failures = 0, af_seen = 0;

  sf_output_queue #(.N_PE(128), .DEPTH(8)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  spike_t exp_q[$];
  int     exp_len[$];
  int     pos;

  // checker
  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready) begin
      checks++;
      if (exp_q.size() == 0 || out_spike !== exp_q[0] || int'(out_idx) != pos) begin
        failures++;
        if (failures < 5) $display("bad spike %h idx %0d", out_spike, out_idx);
      end
      if (exp_q.size() != 0) void'(exp_q.pop_front());
      pos++;
    end
    if (spine_done) begin
      checks++;
      if (exp_len.size() == 0 || int'(spine_len) != exp_len[0] || pos != exp_len[0]) failures++;
      if (exp_len.size() != 0) void'(exp_len.pop_front());
      pos = 0;
    end
    if (almost_full) af_seen++;
  end

  initial begin
    in_valid = 0; in_last = 0; in_mask = 0; in_tick = 0; out_ready = 0; pos = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    fork
      forever begin @(negedge clk); out_ready = ($urandom_range(0, 2) == 0); end
    join_none
    for (int sp = 0; sp < 20; sp++) begin
      int n;
      logic [127:0] used;
      n = 0; used = '0;
      for (int t = 0; t < 40; t++) begin
        @(negedge clk);
        while (almost_full) @(negedge clk);
        in_valid = 1; in_last = (t == 39); in_tick = 8'(t);
        in_mask = '0;
        if ($urandom_range(0, 2) == 0)
          for (int k = 0; k < $urandom_range(1, 4); k++) in_mask[$urandom_range(0, 127)] = 1'b1;
        if (sp == 3 && t == 10) in_mask = '1;  // a burst of spikes in one tick
        in_mask &= ~used;                      // a PE fires once per spine
        used |= in_mask;
        for (int i = 0; i < 128; i++) if (in_mask[i]) begin
          exp_q.push_back('{t: 8'(t), id: 8'(i)}); n++;
        end
        if (in_last) exp_len.push_back(n);
        @(posedge clk); #1 in_valid = 0; in_last = 0;
      end
    end
    while (exp_len.size() != 0) @(negedge clk);
    checks++; if (!empty || exp_q.size() != 0) failures++;
    checks++; if (af_seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
