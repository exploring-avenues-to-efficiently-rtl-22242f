// tb_sf_input_buffer: writes spines entry by entry into all 36 slots, sets
// lengths, and checks whole-slot reads (data and length, 1-cycle latency).
module tb_sf_input_buffer;
  import sf_pkg::*;
  logic clk = 0, rst_n = 0;
  logic wr_en, len_wr_en, rd_en;
  logic [5:0] wr_slot, len_wr_slot, rd_slot;
  logic [6:0] wr_idx;
  spike_t wr_data;
  logic [7:0] len_wr_val, rd_len;
  spike_t [127:0] rd_data;
  int checks = 0, failures = 0;

  sf_input_buffer #(.IB_SLOTS(36), .SPINE_LEN(128)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  spike_t ref_mem[36][128];
  int     ref_len[36];

  initial begin
    wr_en = 0; len_wr_en = 0; rd_en = 0; wr_slot = 0; wr_idx = 0; wr_data = 0;
    len_wr_slot = 0; len_wr_val = 0; rd_slot = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    // unwritten lengths read as empty
    @(negedge clk); rd_en = 1; rd_slot = 6'd7; @(negedge clk); rd_en = 0;
    checks++; if (rd_len != 0) failures++;
    for (int s = 0; s < 36; s++) begin
      ref_len[s] = $urandom_range(0, 128);
      for (int i = 0; i < 128; i++) begin
        ref_mem[s][i] = spike_t'($urandom());
        wr_en = 1; wr_slot = 6'(s); wr_idx = 7'(i); wr_data = ref_mem[s][i];
        @(negedge clk);
      end
      wr_en = 0;
      len_wr_en = 1; len_wr_slot = 6'(s); len_wr_val = 8'(ref_len[s]);
      @(negedge clk); len_wr_en = 0;
    end
    for (int k = 0; k < 72; k++) begin
      int s;
      s = (k < 36) ? k : $urandom_range(0, 35);
      rd_en = 1; rd_slot = 6'(s); @(negedge clk); rd_en = 0;
      checks++;
      if (int'(rd_len) != ref_len[s]) failures++;
      for (int i = 0; i < 128; i++) if (rd_data[i] !== ref_mem[s][i]) begin failures++; break; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
