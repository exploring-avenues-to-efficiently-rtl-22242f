// inxs_xbar_adc: behavioural model of one INXS memristor crossbar with its
// sample-and-hold circuits and 8-bit ADC. This is an analog part; the model
// reproduces its function with ideal integer arithmetic, not its physics.
//
// The crossbar has XB_R wordlines (one per input) and XB_C bitlines, each
// cell storing a CELL_W-bit conductance level. In the odd phase (`sample`),
// every wordline whose input spiked is driven and each bitline current, the
// sum of the conductances on active rows, is captured in a sample-and-hold.
// In the even phase the ADC converts one held bitline per cycle: `adc_col`
// selects it and `adc_out` follows one cycle later. Values above the ADC
// range clip to 2^ADC_W - 1; the document relies on spike sparsity to keep
// the worst case (256 rows x 3) from being reached, so clipping is the
// model's rendering of an overflow. Cells are programmed one row at a time.
module inxs_xbar_adc #(
  parameter int unsigned XB_R   = 256,
  parameter int unsigned XB_C   = 128,
  parameter int unsigned CELL_W = 2,
  parameter int unsigned ADC_W  = 8
) (
  input  logic                         clk,
  // programming: one row of cells per cycle
  input  logic                         prog_en,
  input  logic [$clog2(XB_R)-1:0]      prog_row,
  input  logic [XB_C-1:0][CELL_W-1:0]  prog_cells,
  // odd phase: drive wordlines, capture bitlines
  input  logic                         sample,
  input  logic [XB_R-1:0]              in_spikes,
  // even phase: convert one bitline per cycle
  input  logic                         adc_en,
  input  logic [$clog2(XB_C)-1:0]      adc_col,
  output logic [ADC_W-1:0]             adc_out,
  output logic                         adc_clip   // the conversion saturated
);
  localparam int unsigned SW = $clog2(XB_R * (2**CELL_W - 1) + 1);
  localparam logic [SW-1:0] ADC_MAX = SW'(2**ADC_W - 1);

  logic [XB_C-1:0][CELL_W-1:0] cells [XB_R];
  logic [SW-1:0]               held  [XB_C];

  always_ff @(posedge clk) begin
    if (prog_en) cells[prog_row] <= prog_cells;
    if (sample) begin
      for (int c = 0; c < int'(XB_C); c++) begin
        logic [SW-1:0] acc;
        acc = '0;
        for (int r = 0; r < int'(XB_R); r++)
          if (in_spikes[r]) acc = acc + SW'(cells[r][c]);
        held[c] <= acc;
      end
    end
    if (adc_en) begin
      adc_clip <= held[adc_col] > ADC_MAX;
      adc_out  <= (held[adc_col] > ADC_MAX) ? ADC_MAX[ADC_W-1:0] : held[adc_col][ADC_W-1:0];
    end
  end
endmodule
