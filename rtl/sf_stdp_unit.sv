// sf_stdp_unit: STDP support for SpinalFlow, an input spike buffer plus one
// subtractor per PE that yield the spike-timing difference of every synapse
// used in a step.
//
// STDP (spike-timing-dependent plasticity) changes weight w(i,j) by a
// function of dt = t_j - t_i, the tick of input spike j minus the tick of
// output spike i. SpinalFlow's merge unit already delivers the input spikes
// of a step in time order and the output spine records each PE's firing
// tick, so only two things are added:
//   * the input spike buffer, which records every spike the step applies
//     (its tick and the filter row it read, i.e. the row of weights that
//     this input feeds), in the order applied;
//   * per PE, the tick it fired at and a subtractor.
// After the step, a `start` pulse streams the buffer out, one recorded
// input per cycle: the filter row, the input tick, which PEs fired and, for
// each PE that fired, dt = t_in - t_out as a signed T_W+1-bit number (0 for
// PEs that did not fire). A weight-update engine would consume this stream
// and apply the learning rule to the named filter row.
//
// Interface and timing: `clear` (the step start) empties the buffer and the
// fire ticks; `rec_en` records one spike per cycle; `pe_fire`/`pe_fire_tick`
// come from the PE array. `start` (while idle) begins the readout; entries
// leave on out_valid/out_ready, the first two cycles after `start`, then one
// per cycle while out_ready is high; `busy` falls with the edge after the
// last is taken (N entries: N+1 cycles after the start edge).
// A new step (`clear`) must not begin during a readout (asserted).
// The buffer holds a whole 16-spine receptive field (2048 entries).
//
// From the design description: the input spike buffer filled from the min
// finder's output, the comparison done after the output spine exists, and
// one subtractor per PE. Own choices: the stored fields, the readout stream
// and its handshake, and leaving the exponential weight update itself to a
// consumer outside this unit.
module sf_stdp_unit
  import sf_pkg::*;
#(
  parameter int unsigned DEPTH = N_SPINE_BUF * SPINE_LEN
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          clear,
  // recording side
  input  logic                          rec_en,
  input  logic [T_W-1:0]                rec_tick,
  input  logic [FB_AW-1:0]              rec_row,
  input  logic [N_PE-1:0]               pe_fire,
  input  logic [T_W-1:0]                pe_fire_tick,
  // readout
  input  logic                          start,
  output logic                          busy,
  output logic                          out_valid,
  input  logic                          out_ready,
  output logic [FB_AW-1:0]              out_row,
  output logic [T_W-1:0]                out_tin,
  output logic [N_PE-1:0]               out_fired,
  output logic signed [N_PE-1:0][T_W:0] out_dt,
  output logic [$clog2(DEPTH+1)-1:0]    count
);
  localparam int unsigned CW = $clog2(DEPTH + 1);
  localparam int unsigned AW = $clog2(DEPTH);

  typedef struct packed {
    logic [T_W-1:0]   t;
    logic [FB_AW-1:0] row;
  } rec_t;

  rec_t              mem [DEPTH];
  rec_t              head;
  logic [CW-1:0]     rd;
  logic [N_PE-1:0]   fired;
  logic [T_W-1:0]    tout [N_PE];
  logic              adv;

  // recording
  always_ff @(posedge clk) if (rec_en && count < CW'(DEPTH)) mem[count[AW-1:0]] <= '{t: rec_tick, row: rec_row};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
      fired <= '0;
    end else if (clear) begin
      count <= '0;
      fired <= '0;
    end else begin
      if (rec_en && count < CW'(DEPTH)) count <= count + 1'b1;
      fired <= fired | pe_fire;
    end
  end

  for (genvar i = 0; i < N_PE; i++) begin : g_tout
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)          tout[i] <= '0;
      else if (pe_fire[i]) tout[i] <= pe_fire_tick;
    end
  end

  // readout: rd counts entries fetched into the head register
  assign adv = busy && (!out_valid || out_ready);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      rd        <= '0;
      out_valid <= 1'b0;
    end else if (start && !busy) begin
      busy      <= (count != 0);
      rd        <= '0;
      out_valid <= 1'b0;
    end else if (adv) begin
      if (rd < count) begin
        out_valid <= 1'b1;
        rd        <= rd + 1'b1;
      end else begin
        out_valid <= 1'b0;
        busy      <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk) if (adv && rd < count) head <= mem[rd[AW-1:0]];

  // one subtractor per PE
  always_comb begin
    out_row   = head.row;
    out_tin   = head.t;
    out_fired = fired;
    for (int i = 0; i < int'(N_PE); i++)
      out_dt[i] = fired[i] ? (T_W+1)'($signed({1'b0, head.t}) - $signed({1'b0, tout[i]})) : '0;
  end

  a_no_clear_in_readout: assert property (@(posedge clk) disable iff (!rst_n) busy |-> !clear);
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) rec_en |-> count < CW'(DEPTH));
endmodule
