// tb_sf_stdp_unit: self-checking test of the STDP input spike buffer and
// per-PE subtractors. Each of 40 rounds clears the unit, records a random
// number of spikes (sorted ticks, random filter rows) while random PEs fire
// at random ticks, then reads the buffer out with a random (or, in every
// fourth round, always-high) out_ready. Every entry is compared with a model:
// row, input tick, fired mask and dt = t_in - t_out for every PE. Checks the
// readout timing (in cycles from the cycle start is driven): first entry
// valid 2 cycles later, and with out_ready high busy is low N+2 cycles
// later. Includes an empty round and one
// that fills all 2048 entries.
module tb_sf_stdp_unit;
  import sf_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic clear, rec_en, start, busy, out_valid, out_ready;
  logic [T_W-1:0] rec_tick, pe_fire_tick, out_tin;
  logic [FB_AW-1:0] rec_row, out_row;
  logic [N_PE-1:0] pe_fire, out_fired;
  logic signed [N_PE-1:0][T_W:0] out_dt;
  logic [$clog2(2049)-1:0] count;

  sf_stdp_unit dut (.*);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int m_t[$], m_row[$];
  int m_tout[N_PE];
  bit m_fired[N_PE];

  initial begin
    clear = 0; rec_en = 0; start = 0; out_ready = 0; rec_tick = 0; rec_row = 0; pe_fire = 0; pe_fire_tick = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int rnd = 0; rnd < 40; rnd++) begin
      int n, t, t0, first, k;
      n = (rnd == 3) ? 0 : (rnd == 5) ? 2048 : $urandom_range(1, 300);
      m_t.delete(); m_row.delete();
      foreach (m_fired[p]) m_fired[p] = 0;
      @(negedge clk); clear = 1; @(negedge clk); clear = 0;
      t = 0;
      for (int i = 0; i < n; i++) begin
        if ($urandom_range(0, 3) == 0 && t < 255) t++;
        rec_en = 1; rec_tick = T_W'(t); rec_row = FB_AW'($urandom_range(0, 4607));
        m_t.push_back(t); m_row.push_back(int'(rec_row));
        pe_fire = '0;
        if ($urandom_range(0, 9) == 0)
          for (int p = 0; p < N_PE; p++)
            if (!m_fired[p] && $urandom_range(0, 15) == 0) begin pe_fire[p] = 1; m_fired[p] = 1; m_tout[p] = t; end
        pe_fire_tick = T_W'(t);
        @(negedge clk);
      end
      rec_en = 0; pe_fire = '0;
      checks++; if (int'(count) != n) begin failures++; $display("count %0d expected %0d", count, n); end
      // readout
      start = 1; t0 = $time; @(negedge clk); start = 0;
      k = 0; first = -1;
      while (busy || out_valid) begin
        out_ready = (rnd % 4 == 0) ? 1'b1 : 1'($urandom_range(0, 1));
        if (out_valid && first < 0) first = ($time - t0) / 10;
        #1;
        if (out_valid && out_ready) begin
          checks++;
          if (k >= n || int'(out_row) != m_row[k] || int'(out_tin) != m_t[k]) begin
            failures++;
            if (failures < 5) $display("entry %0d: row %0d tin %0d", k, out_row, out_tin);
          end else
            for (int p = 0; p < N_PE; p++)
              if (out_fired[p] != m_fired[p] || int'($signed(out_dt[p])) != (m_fired[p] ? m_t[k] - m_tout[p] : 0)) begin
                failures++;
                if (failures < 5) $display("entry %0d PE %0d: fired %0d dt %0d", k, p, out_fired[p], out_dt[p]);
                break;
              end
          k++;
        end
        @(negedge clk);
      end
      out_ready = 0;
      checks++; if (k != n) begin failures++; $display("round %0d: %0d of %0d entries", rnd, k, n); end
      if (n > 0) begin
        checks++; if (first != 2) begin failures++; $display("first entry after %0d cycles", first); end
      end
      if (rnd % 4 == 0 && n > 0) begin
        checks++;
        if (($time - t0) / 10 != n + 2) begin failures++; $display("readout %0d cycles for %0d", ($time - t0) / 10, n); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
