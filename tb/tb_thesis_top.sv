// tb_thesis_top: end-to-end test of the top at its default size: a full
// SpinalFlow core (128 PEs, 576 KB filter buffer) and a full INXS tile
// (8 synaptic units of 64 crossbars, 8 neuron units, 8 x 128 KB central
// buffers, 129-cycle odd phase). Both designs run their test sequences at
// the same time, each checked against its reference model, and each
// mechanism they have is counted and must occur: SpinalFlow write-back and
// layer chaining, output back-pressure, pipeline stalls, refused host
// writes, empty receptive fields, saturation, spike bursts, STDP readout
// after every step; INXS odd/even
// phases, ADC clipping, neuron-unit bypass, spikes and crossbar aggregation.
module tb_thesis_top;
  localparam int NSU = 8, NXB = 64, ODD = 129;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

`include "sf_drv.svh"
`include "inxs_drv.svh"

  thesis_top dut (
    .clk, .rst_n,
    .sf_fb_wr_en(fb_wr_en), .sf_fb_wr_addr(fb_wr_addr), .sf_fb_wr_data(fb_wr_data),
    .sf_host_ib_wr_en(host_ib_wr_en), .sf_host_ib_ready(host_ib_ready), .sf_host_ib_slot(host_ib_slot),
    .sf_host_ib_idx(host_ib_idx), .sf_host_ib_data(host_ib_data),
    .sf_host_len_wr_en(host_len_wr_en), .sf_host_len_slot(host_len_slot), .sf_host_len_val(host_len_val),
    .sf_threshold(threshold), .sf_cmd_valid(cmd_valid), .sf_cmd_ready(cmd_ready), .sf_cmd(cmd),
    .sf_spk_out_valid(spk_out_valid), .sf_spk_out_ready(spk_out_ready), .sf_spk_out(spk_out),
    .sf_spine_done(spine_done), .sf_spine_len(spine_len), .sf_busy(sf_busy_o),
    .sf_stat_steps(stat_steps), .sf_stat_spikes(stat_spikes), .sf_stat_stalls(stat_stalls),
    .sf_stdp_start(stdp_start), .sf_stdp_busy(stdp_busy), .sf_stdp_valid(stdp_valid), .sf_stdp_ready(stdp_ready),
    .sf_stdp_row(stdp_row), .sf_stdp_tin(stdp_tin), .sf_stdp_fired(stdp_fired), .sf_stdp_dt(stdp_dt),
    .ix_prog_en, .ix_prog_su, .ix_prog_xbar, .ix_prog_row, .ix_prog_cells,
    .ix_in_wr_en, .ix_in_wr_su, .ix_in_wr_xbar, .ix_in_wr_spikes,
    .ix_cb_host_wr_en, .ix_cb_host_rd_en, .ix_cb_host_su, .ix_cb_host_row,
    .ix_cb_host_wdata, .ix_cb_host_rdata,
    .ix_agg_log2, .ix_home_base, .ix_leak, .ix_threshold,
    .ix_tick_start, .ix_tick_done, .ix_busy, .ix_odd_phase, .ix_even_phase,
    .ix_spk_valid, .ix_spk_mask, .ix_spk_nid,
    .ix_stat_clips, .ix_stat_bypass, .ix_stat_even_cycles
  );

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

`include "sf_scenario.svh"
`include "inxs_scenario.svh"

  initial begin
    sf_init();
    ix_init();
    repeat (3) @(posedge clk); rst_n = 1;
    fork
      sf_scenario();
      ix_scenario();
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
