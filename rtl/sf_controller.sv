// sf_controller: step sequencer of the SpinalFlow dataflow.
//
// One step produces one output spine (the 128 neurons at one output
// position across 128 feature maps) from up to 16 input spines that make up
// its receptive field:
//   1. accept a step command; clear the PE potentials and the spine buffers;
//   2. LOAD: read one input spine per cycle from the input buffer into ifmap
//      spine buffer k (n_spines cycles, plus one for the last read to land);
//   3. RUN: each cycle take the earliest spike from the min finder, read
//      filter row row_base[spine] + neuron id, and one cycle later apply that
//      1024-bit row to the PE array together with the spike's tick;
//   4. TAIL: when the receptive field is used up and the pipeline is empty,
//      close the spine in the output queue;
//   5. WAITQ: wait until the output queue has emitted the whole spine.
// RUN stalls (no spike is taken) while the output queue is almost full.
// Each input spike costs one cycle; a step costs n_spines + 1 setup cycles,
// one cycle per input spike, and a few cycles of pipeline drain: the spine
// is closed n_spines + n_spikes + 5 cycles after the command is accepted.
// The exact command format and the handshakes are this design's choices; the
// document gives the step sequence but not the controller.
module sf_controller
  import sf_pkg::*;
(
  input  logic                              clk,
  input  logic                              rst_n,
  // step commands
  input  logic                              cmd_valid,
  output logic                              cmd_ready,
  input  step_cmd_t                         cmd,
  // input buffer read
  output logic                              ib_rd_en,
  output logic [SLOT_W-1:0]                 ib_rd_slot,
  // merge unit
  output logic                              mg_flush,
  output logic                              mg_load,
  output logic [$clog2(N_SPINE_BUF)-1:0]    mg_load_idx,
  output logic                              mg_ready,
  input  logic                              mg_valid,
  input  spike_t                            mg_spike,
  input  logic [$clog2(N_SPINE_BUF)-1:0]    mg_idx,
  // filter buffer read
  output logic                              fb_rd_en,
  output logic [FB_AW-1:0]                  fb_rd_addr,
  // PE array
  output logic                              pe_clear,
  output logic                              pe_en,
  output logic [T_W-1:0]                    pe_tick,
  // output queue
  output logic                              oq_push,
  output logic                              oq_last,
  input  logic                              oq_almost_full,
  input  logic                              oq_spine_done,
  // status of the current step
  output logic                              busy,
  output logic                              cur_wb_en,
  output logic [SLOT_W-1:0]                 cur_out_slot,
  output logic [31:0]                       stat_steps,
  output logic [31:0]                       stat_spikes,
  output logic [31:0]                       stat_stalls
);
  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_LAND, S_RUN, S_TAIL, S_WAITQ} state_t;
  localparam int unsigned BW = $clog2(N_SPINE_BUF);
  localparam int unsigned NW = $clog2(N_SPINE_BUF + 1);

  state_t    st;
  step_cmd_t c;
  logic [NW-1:0] k;
  logic      s1_valid, s2_valid;   // spike in filter-read / PE stage
  logic [T_W-1:0] s1_tick;

  assign cmd_ready   = (st == S_IDLE);
  assign busy        = (st != S_IDLE);
  assign ib_rd_en    = (st == S_LOAD);
  assign ib_rd_slot  = c.slot[k[BW-1:0]];
  assign mg_flush    = (st == S_IDLE) && cmd_valid;
  assign pe_clear    = (st == S_IDLE) && cmd_valid;
  assign mg_ready    = (st == S_RUN) && mg_valid && !oq_almost_full;
  assign fb_rd_en    = mg_ready;
  assign fb_rd_addr  = c.row_base[mg_idx] + FB_AW'(mg_spike.id);
  assign pe_en       = s1_valid;
  assign pe_tick     = s1_tick;
  assign oq_last     = (st == S_TAIL) && !s1_valid && !s2_valid;
  assign oq_push     = s2_valid || oq_last;
  assign cur_wb_en   = c.wb_en;
  assign cur_out_slot = c.out_slot;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st          <= S_IDLE;
      c           <= '0;
      k           <= '0;
      mg_load     <= 1'b0;
      mg_load_idx <= '0;
      s1_valid    <= 1'b0;
      s2_valid    <= 1'b0;
      s1_tick     <= '0;
      stat_steps  <= '0;
      stat_spikes <= '0;
      stat_stalls <= '0;
    end else begin
      mg_load     <= ib_rd_en;
      mg_load_idx <= k[BW-1:0];
      s1_valid    <= fb_rd_en;
      s1_tick     <= mg_spike.t;
      s2_valid    <= s1_valid;
      if (fb_rd_en) stat_spikes <= stat_spikes + 1;
      if (st == S_RUN && mg_valid && oq_almost_full) stat_stalls <= stat_stalls + 1;
      unique case (st)
        S_IDLE: if (cmd_valid) begin
          c  <= cmd;
          k  <= '0;
          st <= (cmd.n_spines == 0) ? S_TAIL : S_LOAD;
        end
        S_LOAD: begin
          k <= k + 1'b1;
          if (k + 1'b1 == c.n_spines) st <= S_LAND;
        end
        S_LAND: st <= S_RUN;
        S_RUN:  if (!mg_valid) st <= S_TAIL;
        S_TAIL: if (oq_last) st <= S_WAITQ;
        S_WAITQ: if (oq_spine_done) begin
          st         <= S_IDLE;
          stat_steps <= stat_steps + 1;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  a_cmd_size: assert property (@(posedge clk) disable iff (!rst_n)
                               (cmd_valid && cmd_ready) |-> cmd.n_spines <= N_SPINE_BUF);
endmodule
