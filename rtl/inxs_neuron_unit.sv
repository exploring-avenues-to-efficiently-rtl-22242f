// inxs_neuron_unit: one INXS Neuron Unit (LLIF neuron update).
//
// Takes one bus flit per cycle: increments for up to LANES consecutive
// neurons, which must lie in one central-buffer row. Stage 0 reads the neurons' row of potentials from the central
// buffer. Stage 1 evaluates, per lane, potential + increment - leak with one
// 3-input adder, compares the result with the layer threshold, and writes
// the new potential back (0 after a spike). Spikes leave as a lane mask with
// the neuron id of lane 0, one cycle after the flit's stage 1.
// The write-back happens at the end of stage 1, in the same cycle as the
// next flit's read, which therefore returns the row's old contents; stage 1
// bypasses the words written in the previous cycle over the read data
// (`stat_bypass` counts how often this happens).
// Leak and threshold are the same for all neurons of a layer, as the document
// assumes. Saturating signed arithmetic, >= for the threshold test and reset
// to zero are this design's choices.
module inxs_neuron_unit
  import inxs_pkg::*;
#(
  parameter int unsigned CB_ROWS = 1024
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               in_valid,
  input  flit_t                              in_flit,
  input  logic signed [P_W-1:0]              leak,
  input  logic signed [P_W-1:0]              threshold,
  // central buffer
  output logic                               cb_rd_en,
  output logic [$clog2(CB_ROWS)-1:0]         cb_rd_row,
  input  logic [CB_WORDS-1:0][P_W-1:0]       cb_rd_data,
  output logic                               cb_wr_en,
  output logic [$clog2(CB_ROWS)-1:0]         cb_wr_row,
  output logic [CB_WORDS-1:0]                cb_wr_mask,
  output logic [CB_WORDS-1:0][P_W-1:0]       cb_wr_data,
  // output spikes
  output logic                               spk_valid,
  output logic [LANES-1:0]                   spk_mask,
  output logic [NID_W-1:0]                   spk_nid,
  output logic [31:0]                        stat_bypass
);
  localparam int unsigned RW  = $clog2(CB_ROWS);
  localparam int unsigned WW  = $clog2(CB_WORDS);
  localparam logic signed [P_W+1:0] PMAX = (P_W+2)'(2**(P_W-1) - 1);
  localparam logic signed [P_W+1:0] PMIN = -(P_W+2)'(2**(P_W-1));

  logic   s1_valid;
  flit_t  s1;
  logic [CB_WORDS-1:0][P_W-1:0] row;
  logic [WW-1:0] off;
  logic [LANES-1:0] fire;
  logic [LANES-1:0][P_W-1:0] newv;
  logic bypass;
  // copy of the previous cycle's write, for the bypass
  logic                         lw_en;
  logic [RW-1:0]                lw_row;
  logic [CB_WORDS-1:0]          lw_mask;
  logic [CB_WORDS-1:0][P_W-1:0] lw_data;

  assign cb_rd_en  = in_valid;
  assign cb_rd_row = RW'(in_flit.nid >> WW);
  assign off       = WW'(s1.nid);

  // previous write merged over the stale read data
  always_comb begin
    row    = cb_rd_data;
    bypass = lw_en && s1_valid && lw_row == RW'(s1.nid >> WW);
    if (bypass)
      for (int w = 0; w < int'(CB_WORDS); w++)
        if (lw_mask[w]) row[w] = lw_data[w];
  end

  always_comb begin
    for (int l = 0; l < int'(LANES); l++) begin
      logic signed [P_W+1:0] s;
      s = (P_W+2)'(signed'(row[off + WW'(l)])) + (P_W+2)'(signed'(s1.val[l])) - (P_W+2)'(leak);
      if (s > PMAX) s = PMAX;
      if (s < PMIN) s = PMIN;
      fire[l] = s1.lane_en[l] && (s >= (P_W+2)'(threshold));
      newv[l] = fire[l] ? '0 : s[P_W-1:0];
    end
  end

  // stage-1 write-back
  always_comb begin
    cb_wr_en   = s1_valid;
    cb_wr_row  = RW'(s1.nid >> WW);
    cb_wr_mask = CB_WORDS'(s1.lane_en) << off;
    cb_wr_data = row;
    for (int l = 0; l < int'(LANES); l++) cb_wr_data[off + WW'(l)] = newv[l];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid    <= 1'b0;
      s1          <= '0;
      lw_en       <= 1'b0;
      lw_row      <= '0;
      lw_mask     <= '0;
      spk_valid   <= 1'b0;
      spk_mask    <= '0;
      spk_nid     <= '0;
      stat_bypass <= '0;
    end else begin
      s1_valid  <= in_valid;
      if (in_valid) s1 <= in_flit;
      lw_en     <= cb_wr_en;
      spk_valid <= s1_valid && (fire != '0);
      if (s1_valid) begin
        lw_row     <= cb_wr_row;
        lw_mask    <= cb_wr_mask;
        spk_mask   <= fire;
        spk_nid    <= s1.nid;
        if (bypass) stat_bypass <= stat_bypass + 1;
      end
    end
  end

  always_ff @(posedge clk) if (s1_valid) lw_data <= cb_wr_data;

  // the enabled lanes of a flit must lie in one central-buffer row
  function automatic int unsigned top_lane(logic [LANES-1:0] en);
    top_lane = 0;
    for (int unsigned l = 0; l < LANES; l++) if (en[l]) top_lane = l;
  endfunction
  a_one_row: assert property (@(posedge clk) disable iff (!rst_n)
                              in_valid |-> int'(in_flit.nid[WW-1:0]) + int'(top_lane(in_flit.lane_en)) < int'(CB_WORDS));
endmodule
