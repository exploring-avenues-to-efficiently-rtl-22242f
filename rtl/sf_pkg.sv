// sf_pkg: constants and types shared by the SpinalFlow spiking-network core.
//
// SpinalFlow processes temporally coded spiking layers. Every neuron spikes
// at most once per input interval, so a layer's activity is a list of
// <tick, neuron id> pairs. A "spine" is the set of K=128 output neurons at one
// output position across 128 feature maps; it is stored as a chronologically
// sorted list of at most 128 such pairs.
//
// Sizes follow the 8-bit configuration of the design: 128 PEs, 8-bit weights,
// potentials and spike times, 16 ifmap spine buffers, a 9 KB input buffer and
// a 576 KB filter buffer. The 16-bit spike entry (8-bit tick, 8-bit neuron id)
// is this design's choice; it makes 36 spines of 128 entries exactly 9 KB.
package sf_pkg;

  localparam int unsigned N_PE        = 128;  // PEs = neurons in a spine
  localparam int unsigned W_W         = 8;    // weight width
  localparam int unsigned V_W         = 8;    // neuron potential width
  localparam int unsigned T_W         = 8;    // spike time (tick) width
  localparam int unsigned ID_W        = 8;    // neuron id within a spine
  localparam int unsigned SPINE_LEN   = 128;  // entries per spine
  localparam int unsigned N_SPINE_BUF = 16;   // ifmap spine buffers feeding the min finder
  localparam int unsigned IB_SLOTS    = 36;   // spines held in the 9 KB input buffer
  localparam int unsigned FB_ROWS     = 4608; // 576 KB / 128 B rows
  localparam int unsigned FB_BANKS    = 32;
  localparam int unsigned FB_AW       = $clog2(FB_ROWS);
  localparam int unsigned SLOT_W      = $clog2(IB_SLOTS);
  localparam int unsigned LEN_W       = $clog2(SPINE_LEN + 1);

  typedef struct packed {
    logic [T_W-1:0]  t;   // tick in which the neuron spiked
    logic [ID_W-1:0] id;  // neuron (feature map) index within its spine
  } spike_t;

  localparam int unsigned SPIKE_W = $bits(spike_t);

  // One step: up to 16 input spines merged into one receptive field.
  typedef struct packed {
    logic [$clog2(N_SPINE_BUF+1)-1:0]             n_spines; // 1..16
    logic [N_SPINE_BUF-1:0][SLOT_W-1:0]           slot;     // input buffer slot of each spine
    logic [N_SPINE_BUF-1:0][FB_AW-1:0]            row_base; // filter row of neuron id 0 of each spine
    logic                                         wb_en;    // write the output spine back
    logic [SLOT_W-1:0]                            out_slot; // input buffer slot for the output spine
  } step_cmd_t;

endpackage
