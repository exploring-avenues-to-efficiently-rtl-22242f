// tb_sf_controller: drives the step sequencer with behavioural stand-ins for
// the merge unit and output queue and checks, per step: the input-buffer
// slots read (one per cycle, in order), the filter row address of every
// spike (row_base[spine] + id), PE enable and tick one cycle after the read,
// no spike taken while the queue is almost full, the closing `last` push,
// and the cycle count (n_spines + n_spikes + 5 from accepting the command
// to closing the spine).
module tb_sf_controller;
  import sf_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cmd_valid, cmd_ready;
  step_cmd_t cmd;
  logic ib_rd_en, mg_flush, mg_load, mg_ready, mg_valid, fb_rd_en;
  logic [5:0] ib_rd_slot;
  logic [3:0] mg_load_idx, mg_idx;
  spike_t mg_spike;
  logic [12:0] fb_rd_addr;
  logic pe_clear, pe_en, oq_push, oq_last, oq_almost_full, oq_spine_done;
  logic [7:0] pe_tick;
  logic busy, cur_wb_en;
  logic [5:0] cur_out_slot;
  logic [31:0] stat_steps, stat_spikes, stat_stalls;
  int checks = 0, failures = 0;

  sf_controller dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // merge-unit stand-in: a sorted list, valid once all spines are loaded
  typedef struct { spike_t s; int b; } ent_t;
  ent_t lst[$];
  int   loaded, nsp;
  assign mg_valid = (loaded == nsp) && lst.size() != 0;
  assign mg_spike = (lst.size() != 0) ? lst[0].s : '0;
  assign mg_idx   = (lst.size() != 0) ? 4'(lst[0].b) : '0;

  int exp_addr[$], exp_tick[$], slot_seq[$];
  int cyc, t_last, pending_done, stall_mode;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (mg_load) loaded++;
    if (ib_rd_en) begin
      checks++;
      if (slot_seq.size() == 0 || int'(ib_rd_slot) != slot_seq[0]) begin failures++; $display("slot"); end
      if (slot_seq.size() != 0) void'(slot_seq.pop_front());
    end
    if (mg_ready && oq_almost_full) begin failures++; $display("took while full"); end
    if (fb_rd_en) begin
      checks++;
      if (int'(fb_rd_addr) != int'(cmd.row_base[lst[0].b]) + int'(lst[0].s.id)) begin failures++; $display("addr %0d", fb_rd_addr); end
      exp_tick.push_back(int'(lst[0].s.t));
      void'(lst.pop_front());
    end
    if (pe_en) begin
      checks++;
      if (exp_tick.size() == 0 || int'(pe_tick) != exp_tick[0]) begin failures++; $display("tick"); end
      if (exp_tick.size() != 0) void'(exp_tick.pop_front());
    end
    if (oq_last) t_last = cyc;
    oq_spine_done <= oq_last;
    oq_almost_full <= stall_mode ? ($urandom_range(0, 2) == 0) : 1'b0;
  end

  initial begin
    cmd_valid = 0; cmd = '0; oq_almost_full = 0; oq_spine_done = 0;
    loaded = 0; nsp = 0; cyc = 0; stall_mode = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int it = 0; it < 30; it++) begin
      int n, nspk, t0;
      stall_mode = (it % 3 == 2);
      n = (it == 0) ? 16 : $urandom_range(1, 16);
      cmd = '0;
      cmd.n_spines = 5'(n);
      for (int b = 0; b < 16; b++) begin
        cmd.slot[b] = 6'($urandom_range(0, 35));
        cmd.row_base[b] = 13'($urandom_range(0, 4000));
        if (b < n) slot_seq.push_back(int'(cmd.slot[b]));
      end
      nspk = $urandom_range(0, 60);
      lst.delete();
      for (int k = 0; k < nspk; k++) begin
        ent_t e;
        e.s.t = 8'(k); e.s.id = 8'($urandom_range(0, 127)); e.b = $urandom_range(0, n - 1);
        lst.push_back(e);
      end
      nsp = n; loaded = 0;
      @(negedge clk);
      cmd_valid = 1; #1;
      t0 = cyc;
      checks++; if (!cmd_ready || !pe_clear || !mg_flush) begin failures++; $display("start"); end
      @(negedge clk); cmd_valid = 0;
      while (busy) @(negedge clk);
      checks++;
      if (lst.size() != 0 || slot_seq.size() != 0 || exp_tick.size() != 0) begin failures++; $display("left %0d %0d %0d", lst.size(), slot_seq.size(), exp_tick.size()); end
      if (!stall_mode) begin
        checks++;
        // accept(1) + n reads + 1 landing + nspk + 1 empty check + 2 pipeline drain
        if (t_last - t0 != n + nspk + 5) begin
          failures++;
          $display("step %0d: %0d cycles to close, expected %0d (n %0d nspk %0d)", it, t_last - t0, n + nspk + 5, n, nspk);
        end
      end
    end
    checks++; if (stat_steps != 30 || stat_stalls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
