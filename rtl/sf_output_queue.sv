// sf_output_queue: marshals PE-array output into a sorted output spine.
//
// In a cycle any number of PEs may fire, all with the same tick. The queue
// stores each non-empty fire mask with its tick in a small FIFO of DEPTH
// entries and then emits one <tick, neuron id> spike per cycle, lowest PE
// first within a mask. Because masks arrive in tick order the emitted list is
// chronologically sorted, which is the spine format the next layer consumes.
// A `last` push (with or without fire bits) closes the spine: after its
// spikes have gone out, `spine_done` pulses for one cycle with `spine_len`.
//
// Handshake: out_valid/out_ready (standard valid/ready; out_spike holds while
// stalled). `almost_full` tells the producer that fewer than 3 entries are
// free: two fire masks may still be in flight in the PE pipeline.
// The FIFO depth and the one-spike-per-cycle drain rate are this design's
// choices; the document only says the PE output is marshalled into a queue.
module sf_output_queue
  import sf_pkg::*;
#(
  parameter int unsigned N_PE  = 128,
  parameter int unsigned DEPTH = 8
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          in_valid,
  input  logic [N_PE-1:0]               in_mask,
  input  logic [T_W-1:0]                in_tick,
  input  logic                          in_last,
  output logic                          almost_full,
  output logic                          out_valid,
  input  logic                          out_ready,
  output spike_t                        out_spike,
  output logic [$clog2(N_PE)-1:0]       out_idx,     // position within the spine
  output logic                          spine_done,
  output logic [$clog2(N_PE+1)-1:0]     spine_len,
  output logic                          empty
);
  localparam int unsigned PW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(DEPTH + 1);
  localparam int unsigned IW = $clog2(N_PE);

  typedef struct packed {
    logic [N_PE-1:0] mask;
    logic [T_W-1:0]  t;
    logic            last;
  } entry_t;

  entry_t         q [DEPTH];
  logic [PW-1:0]  rd, wr;
  logic [CW-1:0]  cnt;
  logic [IW:0]    nout;      // spikes emitted in the current spine
  entry_t         head;
  logic [IW-1:0]  low;
  logic           push, pop, take;

  assign head = q[rd];

  always_comb begin
    low = '0;
    for (int i = int'(N_PE) - 1; i >= 0; i--) if (head.mask[i]) low = IW'(i);
  end

  assign push        = in_valid && (in_mask != '0 || in_last);
  assign out_valid   = (cnt != 0) && (head.mask != '0);
  assign out_spike   = '{t: head.t, id: ID_W'(low)};
  assign out_idx     = nout[IW-1:0];
  assign take        = out_valid && out_ready;
  // pop when the head's last spike leaves, or when an empty last entry is reached
  assign pop         = (cnt != 0) &&
                       ((take && (head.mask & (head.mask - 1'b1)) == '0 && !head.last) ||
                        (head.mask == '0));
  assign spine_done  = (cnt != 0) && head.mask == '0 && head.last;
  assign spine_len   = nout;
  assign almost_full = cnt > CW'(DEPTH - 3);
  assign empty       = (cnt == 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd   <= '0;
      wr   <= '0;
      cnt  <= '0;
      nout <= '0;
    end else begin
      if (push) wr <= (wr == PW'(DEPTH - 1)) ? '0 : wr + 1'b1;
      if (pop)  rd <= (rd == PW'(DEPTH - 1)) ? '0 : rd + 1'b1;
      cnt <= cnt + CW'(push) - CW'(pop);
      if (spine_done) nout <= '0;
      else if (take)  nout <= nout + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (take) q[rd].mask[low] <= 1'b0;
    if (push) q[wr] <= '{mask: in_mask, t: in_tick, last: in_last};
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                  push |-> (cnt < CW'(DEPTH) || pop));
endmodule
