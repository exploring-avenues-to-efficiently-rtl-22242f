// tb_sf_min_finder: random heads for the 16-input min finder, checked against
// a linear search for the earliest valid tick (lowest index on ties).
module tb_sf_min_finder;
  import sf_pkg::*;
  logic [15:0] in_valid;
  spike_t [15:0] in_spike;
  logic out_valid;
  spike_t out_spike;
  logic [3:0] out_idx;
  int checks = 0, failures = 0;

  sf_min_finder #(.N_IN(16)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 5000; it++) begin
      int best;
      in_valid = 16'($urandom());
      if (it % 7 == 0) in_valid = '0;
      for (int i = 0; i < 16; i++) begin
        in_spike[i].t  = 8'($urandom_range(0, (it % 3 == 0) ? 3 : 255));
        in_spike[i].id = 8'($urandom());
      end
      best = -1;
      for (int i = 0; i < 16; i++)
        if (in_valid[i] && (best < 0 || in_spike[i].t < in_spike[best].t)) best = i;
      #1;
      checks++;
      if (best < 0) begin
        if (out_valid) failures++;
      end else if (!out_valid || int'(out_idx) != best || out_spike !== in_spike[best]) begin
        failures++;
        if (failures < 5) $display("it %0d: got idx %0d want %0d", it, out_idx, best);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
