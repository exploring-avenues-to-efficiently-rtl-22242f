// inxs_central_buffer: one INXS central SRAM buffer holding neuron potentials.
//
// CB_ROWS rows of CB_WORDS 16-bit potentials (128 KB with 128-byte rows at the
// default size). A wide read returns a whole row one cycle after `rd_en`; a
// write updates only the words whose bit is set in `wr_mask`, so a neuron
// unit can write back the few potentials it changed. A read and a write of
// the same row in one cycle return the old contents. The word-masked write
// is this design's choice; the document gives capacity and row width.
module inxs_central_buffer #(
  parameter int unsigned CB_ROWS  = 1024,
  parameter int unsigned CB_WORDS = 64,
  parameter int unsigned P_W      = 16
) (
  input  logic                               clk,
  input  logic                               rd_en,
  input  logic [$clog2(CB_ROWS)-1:0]         rd_row,
  output logic [CB_WORDS-1:0][P_W-1:0]       rd_data,
  input  logic                               wr_en,
  input  logic [$clog2(CB_ROWS)-1:0]         wr_row,
  input  logic [CB_WORDS-1:0]                wr_mask,
  input  logic [CB_WORDS-1:0][P_W-1:0]       wr_data
);
  logic [CB_WORDS-1:0][P_W-1:0] mem [CB_ROWS];

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_row];
    if (wr_en)
      for (int w = 0; w < int'(CB_WORDS); w++)
        if (wr_mask[w]) mem[wr_row][w] <= wr_data[w];
  end
endmodule
