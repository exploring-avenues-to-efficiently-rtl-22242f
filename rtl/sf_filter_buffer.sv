// sf_filter_buffer: SpinalFlow filter buffer (576 KB, 32 banks).
//
// Row r holds weight r of the receptive field for all N_PE kernels being
// computed (one byte per PE), so a single row read feeds every PE for one
// input spike: a 1024-bit output bus. The FB_ROWS rows are spread over FB_BANKS
// banks with the low address bits selecting the bank (the interleaving is
// this design's choice). One row is written or read per cycle; read data
// appear one cycle after `rd_en`. A read and a write in the same cycle to the
// same row return the old contents.
module sf_filter_buffer #(
  parameter int unsigned FB_ROWS  = 4608,
  parameter int unsigned FB_BANKS = 32,
  parameter int unsigned ROW_W    = 1024
) (
  input  logic                        clk,
  input  logic                        wr_en,
  input  logic [$clog2(FB_ROWS)-1:0]  wr_addr,
  input  logic [ROW_W-1:0]            wr_data,
  input  logic                        rd_en,
  input  logic [$clog2(FB_ROWS)-1:0]  rd_addr,
  output logic [ROW_W-1:0]            rd_data
);
  localparam int unsigned BW   = $clog2(FB_BANKS);
  localparam int unsigned BROW = (FB_ROWS + FB_BANKS - 1) / FB_BANKS;
  localparam int unsigned AW   = $clog2(FB_ROWS);
  localparam int unsigned RW   = (BROW > 1) ? $clog2(BROW) : 1;

  logic [FB_BANKS-1:0][ROW_W-1:0] bank_q;
  logic [BW-1:0]                  rd_bank_q;

  for (genvar b = 0; b < FB_BANKS; b++) begin : g_bank
    logic [ROW_W-1:0] mem [BROW];
    always_ff @(posedge clk) begin
      if (wr_en && wr_addr[BW-1:0] == b) mem[RW'(wr_addr[AW-1:BW])] <= wr_data;
      if (rd_en && rd_addr[BW-1:0] == b) bank_q[b] <= mem[RW'(rd_addr[AW-1:BW])];
    end
  end

  always_ff @(posedge clk) if (rd_en) rd_bank_q <= rd_addr[BW-1:0];

  assign rd_data = bank_q[rd_bank_q];
endmodule
