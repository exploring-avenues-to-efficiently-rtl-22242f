// sf_pe_array: the row of N_PE SpinalFlow PEs working on one output spine.
//
// Every cycle with `en` set, one input spike is applied to all PEs at once:
// the filter buffer supplies a row of N_PE weights (weight i for PE i, i.e.
// for output feature map i) and all PEs share the spike's tick and the layer
// threshold. The registered per-PE fire pulses form `fire_mask`, valid the
// cycle after the spike together with `fire_tick`. `fired_cnt` counts the PEs
// that have fired in the current step.
module sf_pe_array #(
  parameter int unsigned N_PE = 128,
  parameter int unsigned W_W  = 8,
  parameter int unsigned V_W  = 8,
  parameter int unsigned T_W  = 8
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      clear,
  input  logic                      en,
  input  logic [N_PE-1:0][W_W-1:0]  weights,
  input  logic [T_W-1:0]            tick,
  input  logic signed [V_W-1:0]     threshold,
  output logic [N_PE-1:0]           fire_mask,
  output logic [T_W-1:0]            fire_tick,
  output logic [N_PE-1:0]           done_mask
);
  logic [N_PE-1:0][T_W-1:0] pe_t;

  for (genvar i = 0; i < N_PE; i++) begin : g_pe
    logic signed [V_W-1:0] pot;
    sf_pe #(.W_W(W_W), .V_W(V_W), .T_W(T_W)) u_pe (
      .clk, .rst_n, .clear, .en,
      .weight   (weights[i]),
      .tick,
      .threshold,
      .fire     (fire_mask[i]),
      .fire_t   (pe_t[i]),
      .done     (done_mask[i]),
      .potential(pot)
    );
  end

  // All PEs see the same tick, so any PE's captured tick is the array's.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  fire_tick <= '0;
    else if (en) fire_tick <= tick;
  end
endmodule
