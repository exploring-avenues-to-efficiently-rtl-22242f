// tb_sf_merge_unit: loads 16 random sorted spines and checks that the merged
// stream is the chronologically sorted union (one spike per ready cycle),
// with ready toggled randomly.
module tb_sf_merge_unit;
  import sf_pkg::*;
  logic clk = 0, rst_n = 0;
  logic flush, load, ready, out_valid;
  logic [3:0] load_idx, out_idx;
  spike_t [127:0] load_data;
  logic [7:0] load_len;
  spike_t out_spike;
  int checks = 0, failures = 0;

  sf_merge_unit #(.N_BUF(16), .SPINE_LEN(128)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  spike_t sp[16][$];
  int     total, got, last_t;

  initial begin
    flush = 0; load = 0; ready = 0; load_idx = 0; load_len = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int it = 0; it < 6; it++) begin
      @(negedge clk); flush = 1; @(negedge clk); flush = 0;
      total = 0;
      for (int b = 0; b < 16; b++) begin
        int n, t;
        n = (it == 0) ? 128 : $urandom_range(0, 128);
        sp[b].delete();
        t = 0;
        for (int i = 0; i < n; i++) begin
          t += $urandom_range(0, 3);
          if (t > 255) t = 255;
          sp[b].push_back('{t: 8'(t), id: 8'(i)});
        end
        for (int i = 0; i < 128; i++) load_data[i] = (i < n) ? sp[b][i] : '0;
        load_len = 8'(n); load_idx = 4'(b); load = 1;
        @(negedge clk); load = 0;
        total += n;
      end
      got = 0; last_t = 0;
      while (got < total) begin
        ready = ($urandom_range(0, 3) != 0);
        #1;
        if (ready) begin
          checks++;
          if (!out_valid || sp[out_idx].size() == 0) begin failures++; break; end
          if (out_spike !== sp[out_idx][0] || int'(out_spike.t) < last_t) failures++;
          // the chosen head must be no later than any other head
          for (int b = 0; b < 16; b++)
            if (sp[b].size() != 0 && sp[b][0].t < out_spike.t) failures++;
          last_t = int'(out_spike.t);
          void'(sp[out_idx].pop_front());
          got++;
        end
        @(negedge clk);
      end
      ready = 0; #1;
      checks++; if (out_valid) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
