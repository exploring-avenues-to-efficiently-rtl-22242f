// sf_input_buffer: SpinalFlow input buffer (9 KB of spines).
//
// Stores IB_SLOTS spines; each slot holds SPINE_LEN time-stamped spikes
// (16 bits each) and the number of valid entries. 36 slots x 128 entries x
// 16 bits = 9 KB. Spikes are written one entry per cycle (from the host or
// from the output queue writing back a finished spine); the length of a slot
// is written separately once the spine is complete. A read returns a whole
// slot (the full spine and its length) one cycle after `rd_en`, so an ifmap
// spine buffer is filled in one cycle. The slot layout is this design's
// choice; the document gives only the capacity and the contents.
module sf_input_buffer
  import sf_pkg::*;
#(
  parameter int unsigned IB_SLOTS  = 36,
  parameter int unsigned SPINE_LEN = 128
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  // entry write
  input  logic                                 wr_en,
  input  logic [$clog2(IB_SLOTS)-1:0]          wr_slot,
  input  logic [$clog2(SPINE_LEN)-1:0]         wr_idx,
  input  spike_t                               wr_data,
  // length write
  input  logic                                 len_wr_en,
  input  logic [$clog2(IB_SLOTS)-1:0]          len_wr_slot,
  input  logic [$clog2(SPINE_LEN+1)-1:0]       len_wr_val,
  // spine read (1-cycle latency)
  input  logic                                 rd_en,
  input  logic [$clog2(IB_SLOTS)-1:0]          rd_slot,
  output spike_t [SPINE_LEN-1:0]               rd_data,
  output logic [$clog2(SPINE_LEN+1)-1:0]       rd_len
);
  localparam int unsigned LW = $clog2(SPINE_LEN + 1);

  spike_t [SPINE_LEN-1:0] mem  [IB_SLOTS];
  logic   [LW-1:0]        lens [IB_SLOTS];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_slot][wr_idx] <= wr_data;
    if (rd_en) rd_data <= mem[rd_slot];
  end

  // lengths are reset so that an unwritten slot reads as an empty spine
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < int'(IB_SLOTS); s++) lens[s] <= '0;
      rd_len <= '0;
    end else begin
      if (len_wr_en) lens[len_wr_slot] <= len_wr_val;
      if (rd_en)     rd_len <= lens[rd_slot];
    end
  end

  a_wr_slot: assert property (@(posedge clk) disable iff (!rst_n)
                              (wr_en |-> wr_slot < IB_SLOTS) and (rd_en |-> rd_slot < IB_SLOTS));
endmodule
