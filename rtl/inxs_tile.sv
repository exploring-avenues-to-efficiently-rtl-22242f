// inxs_tile: one INXS tile: synaptic units, neuron units, central buffers and
// the odd/even tick controller.
//
// A tick is split in two phases. In the odd phase every crossbar applies the
// input spikes buffered for it and holds its bitline currents; the phase
// lasts ODD_CYCLES cycles (the document budgets at least 100 ns for the
// analog read, 129 cycles of 0.78 ns) and the sample is taken on its last
// cycle. In the even phase every synaptic unit converts and aggregates its
// bitlines and streams potential increments to its neuron unit, which reads
// the potentials from its central buffer, adds increment and leak,
// thresholds, writes back and emits spikes. The even phase ends when all
// synaptic units are done and the neuron pipelines are empty, C + S cycles
// after it starts (C bitlines, S pipeline stages). `tick_done` then pulses.
//
// Synaptic unit i feeds neuron unit i, whose neuron home is central buffer i.
// The tile's ring and mesh network, which can carry increments and spikes to
// other units and tiles, and the routing table are not part of this block;
// output spikes leave on the per-unit spk_* ports. While idle, the host may
// program crossbars, fill input buffers and read or write potential rows.
module inxs_tile
  import inxs_pkg::*;
#(
  parameter int unsigned N_SU       = 8,
  parameter int unsigned N_XBAR     = 64,
  parameter int unsigned ODD_CYCLES = 129
) (
  input  logic                               clk,
  input  logic                               rst_n,
  // host: crossbar programming and input buffers
  input  logic                               prog_en,
  input  logic [$clog2(N_SU)-1:0]            prog_su,
  input  logic [$clog2(N_XBAR)-1:0]          prog_xbar,
  input  logic [$clog2(XB_R)-1:0]            prog_row,
  input  logic [XB_C-1:0][CELL_W-1:0]        prog_cells,
  input  logic                               in_wr_en,
  input  logic [$clog2(N_SU)-1:0]            in_wr_su,
  input  logic [$clog2(N_XBAR)-1:0]          in_wr_xbar,
  input  logic [XB_R-1:0]                    in_wr_spikes,
  // host: central buffer access (only while idle)
  input  logic                               cb_host_wr_en,
  input  logic                               cb_host_rd_en,
  input  logic [$clog2(N_SU)-1:0]            cb_host_su,
  input  logic [$clog2(CB_ROWS)-1:0]         cb_host_row,
  input  logic [CB_WORDS-1:0][P_W-1:0]       cb_host_wdata,
  output logic [CB_WORDS-1:0][P_W-1:0]       cb_host_rdata,
  // layer configuration
  input  logic [N_SU-1:0][2:0]               agg_log2,
  input  logic [N_SU-1:0][NID_W-1:0]         home_base,
  input  logic signed [P_W-1:0]              leak,
  input  logic signed [P_W-1:0]              threshold,
  // tick control
  input  logic                               tick_start,
  output logic                               tick_done,
  output logic                               busy,
  output logic                               odd_phase,
  output logic                               even_phase,
  // output spikes, one port per neuron unit
  output logic [N_SU-1:0]                    spk_valid,
  output logic [N_SU-1:0][LANES-1:0]         spk_mask,
  output logic [N_SU-1:0][NID_W-1:0]         spk_nid,
  output logic [31:0]                        stat_clips,
  output logic [31:0]                        stat_bypass,
  output logic [31:0]                        stat_even_cycles
);
  typedef enum logic [1:0] {T_IDLE, T_ODD, T_EVEN, T_DRAIN} tstate_t;
  localparam int unsigned OW = $clog2(ODD_CYCLES + 1);
  localparam int unsigned RW = $clog2(CB_ROWS);
  localparam int unsigned SUW = (N_SU > 1) ? $clog2(N_SU) : 1;

  tstate_t          st;
  logic [OW-1:0]    ocnt;
  logic [2:0]       dcnt;
  logic             sample, even_start;
  logic [N_SU-1:0]  su_done, done_seen, su_v;
  flit_t [N_SU-1:0] su_f;
  logic [N_SU-1:0][31:0] clips, byp;
  logic [N_SU-1:0][CB_WORDS-1:0][P_W-1:0] cb_q;
  logic [SUW-1:0]   host_rd_su;

  assign busy       = (st != T_IDLE);
  assign odd_phase  = (st == T_ODD);
  assign even_phase = (st == T_EVEN) || (st == T_DRAIN);
  assign sample     = (st == T_ODD) && ocnt == OW'(ODD_CYCLES - 1);
  assign even_start = sample;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st               <= T_IDLE;
      ocnt             <= '0;
      dcnt             <= '0;
      done_seen        <= '0;
      tick_done        <= 1'b0;
      stat_even_cycles <= '0;
    end else begin
      tick_done <= 1'b0;
      if (even_phase) stat_even_cycles <= stat_even_cycles + 1;
      unique case (st)
        T_IDLE: if (tick_start) begin
          st   <= T_ODD;
          ocnt <= '0;
        end
        T_ODD: begin
          ocnt <= ocnt + 1'b1;
          if (sample) begin
            st        <= T_EVEN;
            done_seen <= '0;
          end
        end
        T_EVEN: begin
          done_seen <= done_seen | su_done;
          if ((done_seen | su_done) == '1) begin
            st   <= T_DRAIN;
            dcnt <= '0;
          end
        end
        T_DRAIN: begin   // let the last flit pass the neuron unit pipeline
          dcnt <= dcnt + 1'b1;
          if (dcnt == 3'd2) begin
            st        <= T_IDLE;
            tick_done <= 1'b1;
          end
        end
        default: st <= T_IDLE;
      endcase
    end
  end

  for (genvar i = 0; i < N_SU; i++) begin : g_su
    logic                         nu_rd_en, nu_wr_en;
    logic [RW-1:0]                nu_rd_row, nu_wr_row;
    logic [CB_WORDS-1:0]          nu_wr_mask;
    logic [CB_WORDS-1:0][P_W-1:0] nu_wr_data;
    logic                         host_sel;

    inxs_synaptic_unit #(.N_XBAR(N_XBAR)) u_su (
      .clk, .rst_n,
      .prog_en      (prog_en && prog_su == i),
      .prog_xbar, .prog_row, .prog_cells,
      .in_wr_en     (in_wr_en && in_wr_su == i),
      .in_wr_xbar, .in_wr_spikes,
      .agg_log2     (agg_log2[i]),
      .home_base    (home_base[i]),
      .sample, .even_start,
      .even_done    (su_done[i]),
      .out_valid    (su_v[i]),
      .out_flit     (su_f[i]),
      .stat_clips   (clips[i])
    );

    inxs_neuron_unit #(.CB_ROWS(CB_ROWS)) u_nu (
      .clk, .rst_n,
      .in_valid    (su_v[i]),
      .in_flit     (su_f[i]),
      .leak, .threshold,
      .cb_rd_en    (nu_rd_en),
      .cb_rd_row   (nu_rd_row),
      .cb_rd_data  (cb_q[i]),
      .cb_wr_en    (nu_wr_en),
      .cb_wr_row   (nu_wr_row),
      .cb_wr_mask  (nu_wr_mask),
      .cb_wr_data  (nu_wr_data),
      .spk_valid   (spk_valid[i]),
      .spk_mask    (spk_mask[i]),
      .spk_nid     (spk_nid[i]),
      .stat_bypass (byp[i])
    );

    assign host_sel = !busy && cb_host_su == i;

    inxs_central_buffer #(.CB_ROWS(CB_ROWS), .CB_WORDS(CB_WORDS), .P_W(P_W)) u_cb (
      .clk,
      .rd_en   (nu_rd_en || (host_sel && cb_host_rd_en)),
      .rd_row  (nu_rd_en ? nu_rd_row : cb_host_row),
      .rd_data (cb_q[i]),
      .wr_en   (nu_wr_en || (host_sel && cb_host_wr_en)),
      .wr_row  (nu_wr_en ? nu_wr_row : cb_host_row),
      .wr_mask (nu_wr_en ? nu_wr_mask : '1),
      .wr_data (nu_wr_en ? nu_wr_data : cb_host_wdata)
    );
  end

  always_ff @(posedge clk) if (cb_host_rd_en) host_rd_su <= SUW'(cb_host_su);
  assign cb_host_rdata = cb_q[host_rd_su];

  always_comb begin
    stat_clips  = '0;
    stat_bypass = '0;
    for (int i = 0; i < int'(N_SU); i++) begin
      stat_clips  = stat_clips + clips[i];
      stat_bypass = stat_bypass + byp[i];
    end
  end
endmodule
