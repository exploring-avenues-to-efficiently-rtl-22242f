// sf_merge_unit: 16 ifmap spine buffers merge-sorted by the min finder.
//
// This pair replaces a conceptual "sorted input buffer" of a whole receptive
// field: each spine buffer holds one pre-sorted spine, and every cycle the
// min finder picks the earliest head. When `ready` is high the chosen spike
// is consumed (one spike per cycle). Output: the spike and the index of the
// spine buffer it came from (the controller maps that index to the filter
// rows of that spine). `out_valid` low means the receptive field is used up.
module sf_merge_unit
  import sf_pkg::*;
#(
  parameter int unsigned N_BUF     = 16,
  parameter int unsigned SPINE_LEN = 128
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              flush,
  input  logic                              load,
  input  logic [$clog2(N_BUF)-1:0]          load_idx,
  input  spike_t [SPINE_LEN-1:0]            load_data,
  input  logic [$clog2(SPINE_LEN+1)-1:0]    load_len,
  input  logic                              ready,
  output logic                              out_valid,
  output spike_t                            out_spike,
  output logic [$clog2(N_BUF)-1:0]          out_idx
);
  logic   [N_BUF-1:0] hv, pop;
  spike_t [N_BUF-1:0] hd;

  for (genvar b = 0; b < N_BUF; b++) begin : g_buf
    sf_spine_buffer #(.SPINE_LEN(SPINE_LEN)) u_buf (
      .clk, .rst_n,
      .load      (load && load_idx == b),
      .load_data,
      .load_len,
      .flush,
      .pop       (pop[b]),
      .head_valid(hv[b]),
      .head      (hd[b])
    );
  end

  sf_min_finder #(.N_IN(N_BUF)) u_min (
    .in_valid (hv),
    .in_spike (hd),
    .out_valid,
    .out_spike,
    .out_idx
  );

  always_comb begin
    pop = '0;
    if (ready && out_valid) pop[out_idx] = 1'b1;
  end
endmodule
