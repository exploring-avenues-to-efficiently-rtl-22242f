// inxs_synaptic_unit: one INXS Synaptic Unit.
//
// N_XBAR crossbars, each with its own input buffer register, ADC and
// shift-and-add unit. A neuron's P_W-bit weights occupy SLICES adjacent
// columns of a crossbar, so a 128-column crossbar serves NPX=16 neurons.
//  * Odd phase (`sample`): every crossbar applies its buffered input spikes
//    and holds its bitline sums.
//  * Even phase (`even_start`): all ADCs walk the XB_C bitlines in lockstep,
//    one per cycle. Every SLICES cycles each shift-and-add unit completes one
//    neuron increment. When a neuron has more inputs than one crossbar has
//    rows, its partial increments from 2^agg_log2 consecutive crossbars are
//    added together. The N_XBAR >> agg_log2 increments of a neuron slot are
//    then put on the 128-bit output bus, LANES per cycle, so the bus keeps
//    up with the ADCs when nothing is aggregated.
// Destination neuron ids: the increment of crossbar group g for neuron slot n
// goes to neuron home_base + n * (N_XBAR >> agg_log2) + g. The document gives
// each crossbar a routing register naming its neuron home; a single base per
// unit with this fixed numbering is this design's simplification; home_base
// must be a multiple of 8 so that a flit never straddles two buffer rows.
// `even_done` pulses after the last flit of the phase; the phase takes
// XB_C + 3 cycles plus the emission of the last neuron slot.
module inxs_synaptic_unit
  import inxs_pkg::*;
#(
  parameter int unsigned N_XBAR = 64
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // crossbar programming, one row of one crossbar per cycle
  input  logic                         prog_en,
  input  logic [$clog2(N_XBAR)-1:0]    prog_xbar,
  input  logic [$clog2(XB_R)-1:0]      prog_row,
  input  logic [XB_C-1:0][CELL_W-1:0]  prog_cells,
  // input buffers: the spikes each crossbar sees in the next odd phase
  input  logic                         in_wr_en,
  input  logic [$clog2(N_XBAR)-1:0]    in_wr_xbar,
  input  logic [XB_R-1:0]              in_wr_spikes,
  // configuration
  input  logic [2:0]                   agg_log2,
  input  logic [NID_W-1:0]             home_base,
  // phases
  input  logic                         sample,
  input  logic                         even_start,
  output logic                         even_done,
  // output bus
  output logic                         out_valid,
  output flit_t                        out_flit,
  output logic [31:0]                  stat_clips
);
  localparam int unsigned XW = $clog2(N_XBAR);
  localparam int unsigned CW = $clog2(XB_C);
  localparam int unsigned SW = $clog2(SLICES);
  localparam int unsigned NW = $clog2(NPX);
  localparam int unsigned GW = P_W + XW;
  localparam int unsigned FW = $clog2(N_XBAR / LANES + 1);
  localparam logic [GW-1:0] PMAX = GW'(2**(P_W-1) - 1);

  logic [XB_R-1:0]        inbuf   [N_XBAR];
  logic [N_XBAR-1:0][ADC_W-1:0] adc;
  logic [N_XBAR-1:0]      clip;
  logic [N_XBAR-1:0]      sa_v;
  logic [N_XBAR-1:0][P_W-1:0] sa_inc;

  logic            walking, adc_v;
  logic [CW-1:0]   col;
  logic [SW-1:0]   adc_slice;
  logic [NW:0]     nslot;         // neuron slots completed
  logic [N_XBAR-1:0][P_W-1:0] res;
  logic [NW-1:0]   res_n;
  logic [FW-1:0]   emit_left, emit_j;
  logic [GW-1:0]   gsum [N_XBAR];
  logic [XW:0]     ngroups;

  always_ff @(posedge clk) if (in_wr_en) inbuf[in_wr_xbar] <= in_wr_spikes;

  for (genvar x = 0; x < N_XBAR; x++) begin : g_xb
    inxs_xbar_adc #(.XB_R(XB_R), .XB_C(XB_C), .CELL_W(CELL_W), .ADC_W(ADC_W)) u_xb (
      .clk,
      .prog_en   (prog_en && prog_xbar == x),
      .prog_row, .prog_cells,
      .sample,
      .in_spikes (inbuf[x]),
      .adc_en    (walking),
      .adc_col   (col),
      .adc_out   (adc[x]),
      .adc_clip  (clip[x])
    );
    inxs_shift_add #(.ADC_W(ADC_W), .CELL_W(CELL_W), .SLICES(SLICES), .P_W(P_W)) u_sa (
      .clk, .rst_n,
      .in_valid  (adc_v),
      .in_sample (adc[x]),
      .in_slice  (adc_slice),
      .out_valid (sa_v[x]),
      .out_inc   (sa_inc[x])
    );
  end

  // aggregation of crossbar groups
  assign ngroups = (XW+1)'(N_XBAR) >> agg_log2;
  always_comb begin
    for (int g = 0; g < int'(N_XBAR); g++) gsum[g] = '0;
    for (int x = 0; x < int'(N_XBAR); x++)
      gsum[x >> agg_log2] = gsum[x >> agg_log2] + GW'(sa_inc[x]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      walking    <= 1'b0;
      col        <= '0;
      adc_v      <= 1'b0;
      adc_slice  <= '0;
      nslot      <= '0;
      res_n      <= '0;
      emit_left  <= '0;
      emit_j     <= '0;
      stat_clips <= '0;
    end else begin
      adc_v     <= walking;
      adc_slice <= col[SW-1:0];
      if (even_start) begin
        walking <= 1'b1;
        col     <= '0;
        nslot   <= '0;
      end else if (walking) begin
        col <= col + 1'b1;
        if (col == CW'(XB_C - 1)) walking <= 1'b0;
      end
      if (adc_v) stat_clips <= stat_clips + 32'($countones(clip));
      if (sa_v[0]) begin
        nslot     <= nslot + 1'b1;
        res_n     <= nslot[NW-1:0];
        emit_j    <= '0;
        emit_left <= FW'((ngroups + (XW+1)'(LANES - 1)) / (XW+1)'(LANES));
      end else if (emit_left != 0) begin
        emit_left <= emit_left - 1'b1;
        emit_j    <= emit_j + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (sa_v[0])
      for (int g = 0; g < int'(N_XBAR); g++)
        res[g] <= (gsum[g] > PMAX) ? PMAX[P_W-1:0] : gsum[g][P_W-1:0];
  end

  always_comb begin
    out_valid = (emit_left != 0);
    out_flit.nid = home_base + NID_W'(res_n) * NID_W'(ngroups) + NID_W'(emit_j) * NID_W'(LANES);
    for (int l = 0; l < int'(LANES); l++) begin
      int g;
      g = int'(emit_j) * int'(LANES) + l;
      out_flit.lane_en[l] = (g < int'(ngroups));
      out_flit.val[l]     = (g < int'(ngroups)) ? res[g[XW-1:0]] : '0;
    end
  end

  assign even_done = (emit_left == FW'(1)) && (nslot == (NW+1)'(NPX)) && !sa_v[0];

  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n)
                                 sa_v[0] |-> emit_left <= 1);
endmodule
