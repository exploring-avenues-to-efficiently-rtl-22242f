// tb_spinalflow: end-to-end test of the SpinalFlow core at full size
// (128 PEs, 4608-row filter buffer, 36-slot input buffer).
// It loads random weights and random sorted spines, runs convolution-like
// steps of 1..16 input spines, and compares every output spine with a
// reference model. It also chains layers: some steps write their output
// spine back into the input buffer and later steps consume it. Counted
// mechanisms: output back-pressure, queue stall of the PE pipeline, host
// writes refused during write-back, empty receptive fields, potential
// saturation, bursts of simultaneous spikes, and the STDP readout (checked
// after every step). With no back-pressure a step
// must close n_spines + n_spikes + 5 cycles after its command, plus one
// cycle per output spike left in the queue.
module tb_spinalflow;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

`include "sf_drv.svh"

  spinalflow dut (
    .clk, .rst_n,
    .fb_wr_en, .fb_wr_addr, .fb_wr_data,
    .host_ib_wr_en, .host_ib_ready, .host_ib_slot, .host_ib_idx, .host_ib_data,
    .host_len_wr_en, .host_len_slot, .host_len_val,
    .threshold, .cmd_valid, .cmd_ready, .cmd,
    .spk_out_valid, .spk_out_ready, .spk_out, .spine_done, .spine_len,
    .busy(sf_busy_o), .stat_steps, .stat_spikes, .stat_stalls,
    .stdp_start, .stdp_busy, .stdp_valid, .stdp_ready, .stdp_row, .stdp_tin, .stdp_fired, .stdp_dt
  );

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

`include "sf_scenario.svh"

  initial begin
    sf_init();
    repeat (3) @(posedge clk); rst_n = 1;
    sf_scenario();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
