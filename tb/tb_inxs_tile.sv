// tb_inxs_tile: a reduced INXS tile (2 synaptic units of 16 crossbars, odd
// phase of 5 cycles) runs four ticks; spikes, tick length and all final
// potentials are compared with the reference model of inxs_drv.svh.
module tb_inxs_tile;
  localparam int NSU = 2, NXB = 16, ODD = 5;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

`include "inxs_drv.svh"

  inxs_tile #(.N_SU(NSU), .N_XBAR(NXB), .ODD_CYCLES(ODD)) dut (
    .clk, .rst_n,
    .prog_en(ix_prog_en), .prog_su(ix_prog_su), .prog_xbar(ix_prog_xbar), .prog_row(ix_prog_row),
    .prog_cells(ix_prog_cells),
    .in_wr_en(ix_in_wr_en), .in_wr_su(ix_in_wr_su), .in_wr_xbar(ix_in_wr_xbar), .in_wr_spikes(ix_in_wr_spikes),
    .cb_host_wr_en(ix_cb_host_wr_en), .cb_host_rd_en(ix_cb_host_rd_en), .cb_host_su(ix_cb_host_su),
    .cb_host_row(ix_cb_host_row), .cb_host_wdata(ix_cb_host_wdata), .cb_host_rdata(ix_cb_host_rdata),
    .agg_log2(ix_agg_log2), .home_base(ix_home_base), .leak(ix_leak), .threshold(ix_threshold),
    .tick_start(ix_tick_start), .tick_done(ix_tick_done), .busy(ix_busy),
    .odd_phase(ix_odd_phase), .even_phase(ix_even_phase),
    .spk_valid(ix_spk_valid), .spk_mask(ix_spk_mask), .spk_nid(ix_spk_nid),
    .stat_clips(ix_stat_clips), .stat_bypass(ix_stat_bypass), .stat_even_cycles(ix_stat_even_cycles)
  );

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

`include "inxs_scenario.svh"

  initial begin
    ix_init();
    repeat (3) @(posedge clk); rst_n = 1;
    ix_scenario();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
