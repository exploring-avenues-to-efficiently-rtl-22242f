// spinalflow: the SpinalFlow spiking-neural-network core.
//
// A temporally coded SNN layer is computed one output spine at a time with an
// output-stationary dataflow. The input buffer holds spines (sorted lists of
// <tick, neuron id>) produced by the previous layer. For each step the
// controller copies up to 16 of them into the ifmap spine buffers; the min
// finder merges them into one chronologically sorted stream of input spikes.
// Each input spike selects one row of the filter buffer: the weights that
// input has in all 128 kernels. The row is added to the 128 PE potentials in
// one cycle; a PE whose potential reaches the threshold fires once, with the
// current tick. Fire events go through the output queue, which emits them as
// the next sorted spine. That spine streams out (spk_out_*) and, if the step
// asks for it, is also written back into the input buffer as input for the
// next layer. Potentials are never stored: they are cleared at every step.
//
// Interface: the host loads the filter buffer one 1024-bit row per cycle and
// the input buffer one spike per cycle (host_ib_*; a host write is refused
// with host_ib_ready low while a spine is being written back), then issues
// step commands with a valid/ready handshake. `threshold` is the layer's
// firing threshold (signed, V_W bits).
// Timing: one input spike per cycle, n_spines + 1 cycles to set up a step,
// and output spikes drained at one per cycle.
// STDP support (sf_stdp_unit): every applied input spike is also recorded
// with its filter row, and each PE's firing tick is kept; after a step,
// stdp_start streams out, per recorded input, dt = t_in - t_out for all PEs
// (stdp_* ports). Start it only while the core is idle and finish reading
// before the next step command.
module spinalflow
  import sf_pkg::*;
#(
  parameter int unsigned OQ_DEPTH = 8
) (
  input  logic                              clk,
  input  logic                              rst_n,
  // filter buffer load
  input  logic                              fb_wr_en,
  input  logic [FB_AW-1:0]                  fb_wr_addr,
  input  logic [N_PE-1:0][W_W-1:0]          fb_wr_data,
  // input buffer load
  input  logic                              host_ib_wr_en,
  output logic                              host_ib_ready,
  input  logic [SLOT_W-1:0]                 host_ib_slot,
  input  logic [$clog2(SPINE_LEN)-1:0]      host_ib_idx,
  input  spike_t                            host_ib_data,
  input  logic                              host_len_wr_en,
  input  logic [SLOT_W-1:0]                 host_len_slot,
  input  logic [LEN_W-1:0]                  host_len_val,
  // layer configuration and step commands
  input  logic signed [V_W-1:0]             threshold,
  input  logic                              cmd_valid,
  output logic                              cmd_ready,
  input  step_cmd_t                         cmd,
  // output spine
  output logic                              spk_out_valid,
  input  logic                              spk_out_ready,
  output spike_t                            spk_out,
  output logic                              spine_done,
  output logic [LEN_W-1:0]                  spine_len,
  // status
  output logic                              busy,
  output logic [31:0]                       stat_steps,
  output logic [31:0]                       stat_spikes,
  output logic [31:0]                       stat_stalls,
  // STDP readout of the last step
  input  logic                              stdp_start,
  output logic                              stdp_busy,
  output logic                              stdp_valid,
  input  logic                              stdp_ready,
  output logic [FB_AW-1:0]                  stdp_row,
  output logic [T_W-1:0]                    stdp_tin,
  output logic [N_PE-1:0]                   stdp_fired,
  output logic signed [N_PE-1:0][T_W:0]     stdp_dt
);
  // input buffer
  logic                          ib_rd_en;
  logic [SLOT_W-1:0]             ib_rd_slot;
  spike_t [SPINE_LEN-1:0]        ib_rd_data;
  logic [LEN_W-1:0]              ib_rd_len;
  logic                          ib_wr_en, ib_len_wr_en;
  logic [SLOT_W-1:0]             ib_wr_slot, ib_len_slot;
  logic [$clog2(SPINE_LEN)-1:0]  ib_wr_idx;
  spike_t                        ib_wr_data;
  logic [LEN_W-1:0]              ib_len_val;
  // merge unit
  logic                          mg_flush, mg_load, mg_ready, mg_valid;
  logic [$clog2(N_SPINE_BUF)-1:0] mg_load_idx, mg_idx;
  spike_t                        mg_spike;
  // filter buffer / PEs
  logic                          fb_rd_en;
  logic [FB_AW-1:0]              fb_rd_addr;
  logic [N_PE*W_W-1:0]           fb_rd_data;
  logic                          pe_clear, pe_en;
  logic [T_W-1:0]                pe_tick, fire_tick;
  logic [N_PE-1:0]               fire_mask, done_mask;
  // output queue
  logic                          oq_push, oq_last, oq_af, oq_empty;
  logic [$clog2(N_PE)-1:0]       oq_idx;
  logic                          wb_en;
  logic [SLOT_W-1:0]             out_slot;
  logic                          take;

  sf_controller u_ctrl (
    .clk, .rst_n,
    .cmd_valid, .cmd_ready, .cmd,
    .ib_rd_en, .ib_rd_slot,
    .mg_flush, .mg_load, .mg_load_idx, .mg_ready,
    .mg_valid, .mg_spike, .mg_idx,
    .fb_rd_en, .fb_rd_addr,
    .pe_clear, .pe_en, .pe_tick,
    .oq_push, .oq_last, .oq_almost_full(oq_af), .oq_spine_done(spine_done),
    .busy, .cur_wb_en(wb_en), .cur_out_slot(out_slot),
    .stat_steps, .stat_spikes, .stat_stalls
  );

  sf_input_buffer #(.IB_SLOTS(IB_SLOTS), .SPINE_LEN(SPINE_LEN)) u_ib (
    .clk, .rst_n,
    .wr_en(ib_wr_en), .wr_slot(ib_wr_slot), .wr_idx(ib_wr_idx), .wr_data(ib_wr_data),
    .len_wr_en(ib_len_wr_en), .len_wr_slot(ib_len_slot), .len_wr_val(ib_len_val),
    .rd_en(ib_rd_en), .rd_slot(ib_rd_slot), .rd_data(ib_rd_data), .rd_len(ib_rd_len)
  );

  sf_merge_unit #(.N_BUF(N_SPINE_BUF), .SPINE_LEN(SPINE_LEN)) u_merge (
    .clk, .rst_n,
    .flush(mg_flush), .load(mg_load), .load_idx(mg_load_idx),
    .load_data(ib_rd_data), .load_len(ib_rd_len),
    .ready(mg_ready), .out_valid(mg_valid), .out_spike(mg_spike), .out_idx(mg_idx)
  );

  sf_filter_buffer #(.FB_ROWS(FB_ROWS), .FB_BANKS(FB_BANKS), .ROW_W(N_PE*W_W)) u_fb (
    .clk,
    .wr_en(fb_wr_en), .wr_addr(fb_wr_addr), .wr_data(fb_wr_data),
    .rd_en(fb_rd_en), .rd_addr(fb_rd_addr), .rd_data(fb_rd_data)
  );

  sf_pe_array #(.N_PE(N_PE), .W_W(W_W), .V_W(V_W), .T_W(T_W)) u_pes (
    .clk, .rst_n,
    .clear(pe_clear), .en(pe_en), .weights(fb_rd_data), .tick(pe_tick),
    .threshold, .fire_mask, .fire_tick, .done_mask
  );

  sf_stdp_unit u_stdp (
    .clk, .rst_n,
    .clear(pe_clear), .rec_en(fb_rd_en), .rec_tick(mg_spike.t), .rec_row(fb_rd_addr),
    .pe_fire(fire_mask), .pe_fire_tick(fire_tick),
    .start(stdp_start), .busy(stdp_busy),
    .out_valid(stdp_valid), .out_ready(stdp_ready), .out_row(stdp_row), .out_tin(stdp_tin),
    .out_fired(stdp_fired), .out_dt(stdp_dt), .count()
  );

  sf_output_queue #(.N_PE(N_PE), .DEPTH(OQ_DEPTH)) u_oq (
    .clk, .rst_n,
    .in_valid(oq_push), .in_mask(fire_mask), .in_tick(fire_tick), .in_last(oq_last),
    .almost_full(oq_af),
    .out_valid(spk_out_valid), .out_ready(spk_out_ready), .out_spike(spk_out), .out_idx(oq_idx),
    .spine_done, .spine_len, .empty(oq_empty)
  );

  // write-back of the output spine into the input buffer has priority
  assign take          = spk_out_valid && spk_out_ready;
  assign ib_wr_en      = (wb_en && take) || (host_ib_wr_en && host_ib_ready);
  assign host_ib_ready = !(wb_en && busy);
  assign ib_wr_slot    = (wb_en && busy) ? out_slot : host_ib_slot;
  assign ib_wr_idx     = (wb_en && busy) ? oq_idx : host_ib_idx;
  assign ib_wr_data    = (wb_en && busy) ? spk_out : host_ib_data;
  assign ib_len_wr_en  = (wb_en && spine_done) || host_len_wr_en;
  assign ib_len_slot   = (wb_en && spine_done) ? out_slot : host_len_slot;
  assign ib_len_val    = (wb_en && spine_done) ? spine_len : host_len_val;
endmodule
