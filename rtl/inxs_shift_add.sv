// inxs_shift_add: INXS shift-and-add unit behind one crossbar ADC.
//
// A P_W-bit weight is spread over SLICES adjacent cells of CELL_W bits, least
// significant slice first, so the ADC results of adjacent bitlines carry
// different bit positions. This unit accumulates SLICES consecutive ADC
// samples, shifting sample j left by CELL_W*j, and presents the neuron's
// potential increment when the last slice arrives (`out_valid`, one cycle
// after the last sample). Slice 0 restarts the accumulation. The result
// saturates at the signed P_W-bit maximum, since increments are added to
// P_W-bit potentials. Slice order and saturation are this design's choices.
module inxs_shift_add #(
  parameter int unsigned ADC_W  = 8,
  parameter int unsigned CELL_W = 2,
  parameter int unsigned SLICES = 8,
  parameter int unsigned P_W    = 16
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          in_valid,
  input  logic [ADC_W-1:0]              in_sample,
  input  logic [$clog2(SLICES)-1:0]     in_slice,
  output logic                          out_valid,
  output logic [P_W-1:0]                out_inc
);
  localparam int unsigned AW = ADC_W + CELL_W * (SLICES - 1) + 1;
  localparam logic [AW-1:0] PMAX = AW'(2**(P_W-1) - 1);

  logic [AW-1:0] acc, nxt;

  always_comb begin
    nxt = (in_slice == '0) ? '0 : acc;
    nxt = nxt + (AW'(in_sample) << (CELL_W * in_slice));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      out_valid <= 1'b0;
      out_inc   <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        acc <= nxt;
        if (in_slice == $clog2(SLICES)'(SLICES - 1)) begin
          out_valid <= 1'b1;
          out_inc   <= (nxt > PMAX) ? PMAX[P_W-1:0] : nxt[P_W-1:0];
        end
      end
    end
  end
endmodule
