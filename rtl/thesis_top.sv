// thesis_top: the two spiking-network accelerators side by side.
//
// SpinalFlow (sf_* ports) is a digital accelerator for temporally coded SNNs:
// sorted spike lists, a 128-PE output-stationary array and a wide filter
// buffer. INXS (ix_* ports) is a tile of an in-situ memristor-crossbar SNN
// accelerator with an odd (analog) / even (digital) tick. The two designs
// are independent; they share only clock and reset, and each keeps its own
// ports exactly as in spinalflow (including its STDP readout) and inxs_tile. See those modules for the
// protocols and timing.
module thesis_top
  import sf_pkg::*;
  import inxs_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic sf_fb_wr_en,
  input  logic [FB_AW-1:0] sf_fb_wr_addr,
  input  logic [N_PE-1:0][W_W-1:0] sf_fb_wr_data,
  input  logic sf_host_ib_wr_en,
  output logic sf_host_ib_ready,
  input  logic [SLOT_W-1:0] sf_host_ib_slot,
  input  logic [$clog2(SPINE_LEN)-1:0] sf_host_ib_idx,
  input  spike_t sf_host_ib_data,
  input  logic sf_host_len_wr_en,
  input  logic [SLOT_W-1:0] sf_host_len_slot,
  input  logic [LEN_W-1:0] sf_host_len_val,
  input  logic signed [V_W-1:0] sf_threshold,
  input  logic sf_cmd_valid,
  output logic sf_cmd_ready,
  input  step_cmd_t sf_cmd,
  output logic sf_spk_out_valid,
  input  logic sf_spk_out_ready,
  output spike_t sf_spk_out,
  output logic sf_spine_done,
  output logic [LEN_W-1:0] sf_spine_len,
  output logic sf_busy,
  output logic [31:0] sf_stat_steps,
  output logic [31:0] sf_stat_spikes,
  output logic [31:0] sf_stat_stalls,
  input  logic sf_stdp_start,
  output logic sf_stdp_busy,
  output logic sf_stdp_valid,
  input  logic sf_stdp_ready,
  output logic [FB_AW-1:0] sf_stdp_row,
  output logic [T_W-1:0] sf_stdp_tin,
  output logic [N_PE-1:0] sf_stdp_fired,
  output logic signed [N_PE-1:0][T_W:0] sf_stdp_dt,
  input  logic ix_prog_en,
  input  logic [$clog2(8)-1:0] ix_prog_su,
  input  logic [$clog2(64)-1:0] ix_prog_xbar,
  input  logic [$clog2(XB_R)-1:0] ix_prog_row,
  input  logic [XB_C-1:0][CELL_W-1:0] ix_prog_cells,
  input  logic ix_in_wr_en,
  input  logic [$clog2(8)-1:0] ix_in_wr_su,
  input  logic [$clog2(64)-1:0] ix_in_wr_xbar,
  input  logic [XB_R-1:0] ix_in_wr_spikes,
  input  logic ix_cb_host_wr_en,
  input  logic ix_cb_host_rd_en,
  input  logic [$clog2(8)-1:0] ix_cb_host_su,
  input  logic [$clog2(CB_ROWS)-1:0] ix_cb_host_row,
  input  logic [CB_WORDS-1:0][P_W-1:0] ix_cb_host_wdata,
  output logic [CB_WORDS-1:0][P_W-1:0] ix_cb_host_rdata,
  input  logic [7:0][2:0] ix_agg_log2,
  input  logic [7:0][NID_W-1:0] ix_home_base,
  input  logic signed [P_W-1:0] ix_leak,
  input  logic signed [P_W-1:0] ix_threshold,
  input  logic ix_tick_start,
  output logic ix_tick_done,
  output logic ix_busy,
  output logic ix_odd_phase,
  output logic ix_even_phase,
  output logic [7:0] ix_spk_valid,
  output logic [7:0][LANES-1:0] ix_spk_mask,
  output logic [7:0][NID_W-1:0] ix_spk_nid,
  output logic [31:0] ix_stat_clips,
  output logic [31:0] ix_stat_bypass,
  output logic [31:0] ix_stat_even_cycles
);

  spinalflow u_spinalflow (
    .clk, .rst_n,
    .fb_wr_en        (sf_fb_wr_en),
    .fb_wr_addr      (sf_fb_wr_addr),
    .fb_wr_data      (sf_fb_wr_data),
    .host_ib_wr_en   (sf_host_ib_wr_en),
    .host_ib_ready   (sf_host_ib_ready),
    .host_ib_slot    (sf_host_ib_slot),
    .host_ib_idx     (sf_host_ib_idx),
    .host_ib_data    (sf_host_ib_data),
    .host_len_wr_en  (sf_host_len_wr_en),
    .host_len_slot   (sf_host_len_slot),
    .host_len_val    (sf_host_len_val),
    .threshold       (sf_threshold),
    .cmd_valid       (sf_cmd_valid),
    .cmd_ready       (sf_cmd_ready),
    .cmd             (sf_cmd),
    .spk_out_valid   (sf_spk_out_valid),
    .spk_out_ready   (sf_spk_out_ready),
    .spk_out         (sf_spk_out),
    .spine_done      (sf_spine_done),
    .spine_len       (sf_spine_len),
    .busy            (sf_busy),
    .stat_steps      (sf_stat_steps),
    .stat_spikes     (sf_stat_spikes),
    .stat_stalls     (sf_stat_stalls),
    .stdp_start      (sf_stdp_start),
    .stdp_busy       (sf_stdp_busy),
    .stdp_valid      (sf_stdp_valid),
    .stdp_ready      (sf_stdp_ready),
    .stdp_row        (sf_stdp_row),
    .stdp_tin        (sf_stdp_tin),
    .stdp_fired      (sf_stdp_fired),
    .stdp_dt         (sf_stdp_dt)
  );

  inxs_tile u_inxs_tile (
    .clk, .rst_n,
    .prog_en         (ix_prog_en),
    .prog_su         (ix_prog_su),
    .prog_xbar       (ix_prog_xbar),
    .prog_row        (ix_prog_row),
    .prog_cells      (ix_prog_cells),
    .in_wr_en        (ix_in_wr_en),
    .in_wr_su        (ix_in_wr_su),
    .in_wr_xbar      (ix_in_wr_xbar),
    .in_wr_spikes    (ix_in_wr_spikes),
    .cb_host_wr_en   (ix_cb_host_wr_en),
    .cb_host_rd_en   (ix_cb_host_rd_en),
    .cb_host_su      (ix_cb_host_su),
    .cb_host_row     (ix_cb_host_row),
    .cb_host_wdata   (ix_cb_host_wdata),
    .cb_host_rdata   (ix_cb_host_rdata),
    .agg_log2        (ix_agg_log2),
    .home_base       (ix_home_base),
    .leak            (ix_leak),
    .threshold       (ix_threshold),
    .tick_start      (ix_tick_start),
    .tick_done       (ix_tick_done),
    .busy            (ix_busy),
    .odd_phase       (ix_odd_phase),
    .even_phase      (ix_even_phase),
    .spk_valid       (ix_spk_valid),
    .spk_mask        (ix_spk_mask),
    .spk_nid         (ix_spk_nid),
    .stat_clips      (ix_stat_clips),
    .stat_bypass     (ix_stat_bypass),
    .stat_even_cycles(ix_stat_even_cycles)
  );
endmodule
