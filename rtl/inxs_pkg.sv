// inxs_pkg: constants and types shared by the INXS in-situ crossbar SNN tile.
//
// INXS computes spiking-layer potential increments inside memristor
// crossbars (analog, odd tick phase) and updates neuron potentials digitally
// (even tick phase). Values follow the tile design point of the document:
// 256x128 crossbars of 2-bit cells, 8-bit ADCs, 16-bit fixed-point weights
// and potentials, 64 crossbars per synaptic unit, 8 synaptic units and
// 8 neuron units per tile, 128 KB central buffers with 128-byte rows, and
// 128-bit on-tile buses (8 x 16-bit values per flit).
package inxs_pkg;

  localparam int unsigned XB_R     = 256;  // crossbar rows (inputs)
  localparam int unsigned XB_C     = 128;  // crossbar columns (bitlines)
  localparam int unsigned CELL_W   = 2;    // bits per memristor cell
  localparam int unsigned ADC_W    = 8;    // ADC resolution
  localparam int unsigned P_W      = 16;   // weight and potential precision
  localparam int unsigned SLICES   = P_W / CELL_W;   // cells per weight = 8
  localparam int unsigned NPX      = XB_C / SLICES;  // neurons per crossbar = 16
  localparam int unsigned LANES    = 8;    // 128-bit bus / 16-bit values
  localparam int unsigned CB_ROWS  = 1024; // 128 KB / 128 B
  localparam int unsigned CB_WORDS = 64;   // 16-bit potentials per 128 B row
  localparam int unsigned NID_W    = 17;   // neuron id: 128K neurons per tile

  // One flit of the 128-bit bus: increments for 8 consecutive neurons.
  typedef struct packed {
    logic [LANES-1:0]          lane_en;
    logic [NID_W-1:0]          nid;      // neuron id of lane 0
    logic [LANES-1:0][P_W-1:0] val;      // potential increments
  } flit_t;

endpackage
