// sf_min_finder: SpinalFlow Min Finder, a tree of comparators.
//
// It looks at the heads of the N_IN ifmap spine buffers and, in the same
// cycle, names the one holding the chronologically earliest spike. Each tree
// node compares the ticks of its two children and forwards the earlier valid
// one; on equal ticks the lower-numbered input wins (this tie rule is this
// design's choice; any order is correct for spikes of the same tick).
// The logic is purely combinational, log2(N_IN) comparator levels deep.
// N_IN must be a power of two.
module sf_min_finder
  import sf_pkg::*;
#(
  parameter int unsigned N_IN = 16
) (
  input  logic [N_IN-1:0]          in_valid,
  input  spike_t [N_IN-1:0]        in_spike,
  output logic                     out_valid,
  output spike_t                   out_spike,
  output logic [$clog2(N_IN)-1:0]  out_idx
);
  localparam int unsigned IW = (N_IN > 1) ? $clog2(N_IN) : 1;

  // Heap-ordered tree: node n has children 2n+1 and 2n+2; leaves at N_IN-1..
  logic   [2*N_IN-2:0]         nv;
  spike_t [2*N_IN-2:0]         ns;
  logic   [2*N_IN-2:0][IW-1:0] ni;

  always_comb begin
    for (int unsigned l = 0; l < N_IN; l++) begin
      nv[N_IN-1+l] = in_valid[l];
      ns[N_IN-1+l] = in_spike[l];
      ni[N_IN-1+l] = IW'(l);
    end
    for (int n = int'(N_IN) - 2; n >= 0; n--) begin
      // take the right child only if it is valid and strictly earlier
      if (nv[2*n+2] && (!nv[2*n+1] || ns[2*n+2].t < ns[2*n+1].t)) begin
        nv[n] = 1'b1;
        ns[n] = ns[2*n+2];
        ni[n] = ni[2*n+2];
      end else begin
        nv[n] = nv[2*n+1];
        ns[n] = ns[2*n+1];
        ni[n] = ni[2*n+1];
      end
    end
  end

  assign out_valid = nv[0];
  assign out_spike = ns[0];
  assign out_idx   = ni[0][$clog2(N_IN)-1:0];
endmodule
