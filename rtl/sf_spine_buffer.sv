// sf_spine_buffer: one SpinalFlow ifmap spine buffer.
//
// Holds one pre-sorted spine (up to SPINE_LEN time-stamped spikes) read from
// the input buffer. The whole spine and its length are loaded in one cycle
// (`load`), matching the one cycle per spine it takes to set up a step. The
// buffer then presents its current head to the min finder; `pop` advances to
// the next entry. `head_valid` drops once all `len` entries have been used.
// Empty entries beyond `len` are never read.
module sf_spine_buffer
  import sf_pkg::*;
#(
  parameter int unsigned SPINE_LEN = 128
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              load,
  input  spike_t [SPINE_LEN-1:0]            load_data,
  input  logic [$clog2(SPINE_LEN+1)-1:0]    load_len,
  input  logic                              flush,   // drop contents
  input  logic                              pop,
  output logic                              head_valid,
  output spike_t                            head
);
  localparam int unsigned LW = $clog2(SPINE_LEN + 1);

  spike_t [SPINE_LEN-1:0] mem;
  logic [LW-1:0]          len, ptr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      len <= '0;
      ptr <= '0;
    end else if (flush) begin
      len <= '0;
      ptr <= '0;
    end else if (load) begin
      len <= load_len;
      ptr <= '0;
    end else if (pop && head_valid) begin
      ptr <= ptr + 1'b1;
    end
  end

  always_ff @(posedge clk) if (load) mem <= load_data;

  assign head_valid = (ptr < len);
  assign head       = mem[ptr[$clog2(SPINE_LEN)-1:0]];

  // popping an empty buffer is a controller error
  a_pop_valid: assert property (@(posedge clk) disable iff (!rst_n) pop |-> head_valid);
endmodule
