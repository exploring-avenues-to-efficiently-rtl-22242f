// inxs_scenario.svh: the INXS tile test sequence shared by the tile and the
// top-level testbench (uses the tasks of inxs_drv.svh). Four ticks with
// different aggregation settings and input densities; potentials carry over
// between ticks. Counted mechanisms: odd and even phases, ADC clipping,
// neuron-unit bypass, spikes, aggregation.
  task automatic ix_scenario();
    int cyc, evc0, ev_agg;
    ev_agg = 0;
    ix_program();
    for (int i = 0; i < NSU; i++) begin
      ix_home_base[i] = NID_W'(4096 * i + 64 * i);
      ix_clear_rows(i, 4096 * i + 64 * i, NXB * 16);
    end
    for (int tk = 0; tk < 4; tk++) begin
      for (int i = 0; i < NSU; i++) ix_agg_log2[i] = (tk == 2) ? 3'((i % 3) + 1) : 3'd0;
      if (tk == 2) ev_agg++;
      ix_threshold = (tk == 3) ? 16'sd200 : 16'sd3000;
      ix_load_inputs((tk == 1) ? 70 : 4);
      evc0 = int'(ix_stat_even_cycles);
      ix_tick(cyc);
      checks++;
      // odd phase, then C = XB_C bitlines plus the pipeline (S stages)
      if (int'(ix_stat_even_cycles) - evc0 > XB_C + 3 + NXB / 8 + 4 || int'(ix_stat_even_cycles) - evc0 < XB_C) begin
        failures++;
        $display("INXS tick %0d: even phase %0d cycles", tk, int'(ix_stat_even_cycles) - evc0);
      end
      checks++;
      if (cyc != ODD + int'(ix_stat_even_cycles) - evc0 + 1) begin
        failures++;
        $display("INXS tick %0d: %0d cycles, odd %0d", tk, cyc, ODD);
      end
    end
    for (int i = 0; i < NSU; i++) ix_check_pots(i);
    $display("INXS events: odd_cycles=%0d even_cycles=%0d adc_clips=%0d bypasses=%0d spikes=%0d aggregated_ticks=%0d",
             ix_odd_cycles, ix_stat_even_cycles, ix_stat_clips, ix_stat_bypass, ix_nspk, ev_agg);
    checks++; if (ix_odd_cycles != 4 * ODD) failures++;
    checks++; if (ix_stat_clips == 0) failures++;
    checks++; if (ix_stat_bypass == 0 && NXB >= 16) failures++;
    checks++; if (ix_nspk == 0) failures++;
  endtask
