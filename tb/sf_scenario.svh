// sf_scenario.svh: the SpinalFlow test sequence shared by the core and the
// top-level testbench (uses the tasks of sf_drv.svh).
  task automatic sf_scenario();
    step_cmd_t c;
    int cyc, nin;
    sf_load_filters(-6, 20);
    for (int s = 0; s < int'(IB_SLOTS); s++)
      sf_write_spine(s, (s % 9 == 4) ? 0 : $urandom_range(1, 128), 15);
    // quiet steps with timing checks, then noisy ones
    for (int k = 0; k < 24; k++) begin
      int n;
      n = (k < 4) ? 16 : $urandom_range(1, 16);
      threshold = (k % 4 == 3) ? 8'sd20 : (k % 4 == 2) ? 8'sd127 : 8'sd90;
      c = sf_rand_cmd(n);
      if (k == 5) begin c.n_spines = 5'd2; c.slot[0] = 6'd4; c.slot[1] = 6'd13; end  // empty spines
      c.wb_en = (k % 3 == 1);
      c.out_slot = 6'(30 + k % 6);
      spk_out_ready = 1;
      nin = 0;
      for (int b = 0; b < int'(c.n_spines); b++) nin += m_ib[c.slot[b]].size();
      sf_step(c, cyc);
      checks++;
      if (cyc > int'(c.n_spines) + nin + 5 + 8 + int'(got_q.size()) || cyc < int'(c.n_spines) + nin + 5) begin
        failures++;
        $display("step %0d took %0d cycles for %0d spines, %0d input spikes", k, cyc, c.n_spines, nin);
      end
      // a later step reads the spines written back
      if (c.wb_en) begin
        step_cmd_t c2;
        c2 = sf_rand_cmd(2);
        c2.slot[0] = c.out_slot; c2.slot[1] = c.slot[0];
        sf_step(c2, cyc);
        ev_chain++;
      end
    end
    // back-pressure on the output: bursts with a low threshold
    fork
      begin : bp
        forever begin @(negedge clk); spk_out_ready = ($urandom_range(0, 3) == 0); end
      end
    join_none
    for (int k = 0; k < 8; k++) begin
      threshold = 8'sd15;
      c = sf_rand_cmd($urandom_range(4, 16));
      c.wb_en = (k % 2 == 0); c.out_slot = 6'(30 + k % 6);
      fork
        sf_step(c, cyc);
        begin  // try host writes while the spine is written back
          repeat (20) @(negedge clk);
          host_ib_wr_en = 1; host_ib_slot = 6'd35; host_ib_idx = '0;
          host_ib_data = (m_ib[35].size() != 0) ? m_ib[35][0] : '0;
          #1 while (!host_ib_ready) @(negedge clk);
          @(negedge clk); host_ib_wr_en = 0;
        end
      join
    end
    disable bp;
    spk_out_ready = 1;
    checks++;
    if (stat_steps != 32'(24 + ev_chain + 8)) failures++;
    $display("SpinalFlow events: writeback=%0d chained=%0d out_backpressure=%0d pipeline_stalls=%0d host_refused=%0d empty_steps=%0d saturations=%0d bursts=%0d stdp_readouts=%0d",
             ev_wb, ev_chain, ev_stall_out, stat_stalls, ev_refused, ev_empty_step, ev_sat, ev_burst, ev_stdp);
    checks++; if (ev_stdp == 0) failures++;
    checks++; if (ev_wb == 0 || ev_chain == 0) failures++;
    checks++; if (ev_stall_out == 0 || stat_stalls == 0) failures++;
    checks++; if (ev_refused == 0) failures++;
    checks++; if (ev_empty_step == 0) failures++;
    checks++; if (ev_sat == 0 || ev_burst == 0) failures++;
  endtask
