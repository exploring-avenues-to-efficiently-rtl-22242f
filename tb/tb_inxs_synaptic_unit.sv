// tb_inxs_synaptic_unit: programs all 64 crossbars of a synaptic unit with
// random 2-bit cells, loads random sparse input spikes, runs odd and even
// phases and checks every output flit against a reference: per-bitline sums
// clipped to 8 bits, shift-and-add over the 8 slices of each 16-bit weight,
// aggregation over 2^agg crossbars, saturation to 32767, and the neuron ids
// home_base + slot * groups + group. Three aggregation settings are run;
// the even phase must end XB_C + 3 + (flits per slot) cycles after it starts.
module tb_inxs_synaptic_unit;
  import inxs_pkg::*;
  logic clk = 0, rst_n = 0;
  logic prog_en, in_wr_en, sample, even_start, even_done, out_valid;
  logic [5:0] prog_xbar, in_wr_xbar;
  logic [7:0] prog_row;
  logic [127:0][1:0] prog_cells;
  logic [255:0] in_wr_spikes;
  logic [2:0] agg_log2;
  logic [16:0] home_base;
  flit_t out_flit;
  logic [31:0] stat_clips;
  int checks = 0, failures = 0;

  inxs_synaptic_unit #(.N_XBAR(64)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [1:0]   xcell [64][256][128];
  logic [255:0] spk  [64];
  flit_t        exp_f[$];
  int           nflit = 0;

  always @(posedge clk) if (rst_n && out_valid) begin
    checks++; nflit++;
    if (exp_f.size() == 0 || out_flit !== exp_f[0]) begin
      failures++;
      if (failures < 4) $display("flit nid %0d lanes %b val0 %0d", out_flit.nid, out_flit.lane_en, out_flit.val[0]);
    end
    if (exp_f.size() != 0) void'(exp_f.pop_front());
  end

  task automatic expect_phase(int agg, int base);
    int inc[64][16];
    int ng;
    ng = 64 >> agg;
    for (int x = 0; x < 64; x++)
      for (int n = 0; n < 16; n++) begin
        longint acc;
        acc = 0;
        for (int j = 0; j < 8; j++) begin
          int bl;
          bl = 0;
          for (int r = 0; r < 256; r++) if (spk[x][r]) bl += int'(xcell[x][r][8*n+j]);
          if (bl > 255) bl = 255;
          acc += longint'(bl) << (2 * j);
        end
        inc[x][n] = (acc > 32767) ? 32767 : int'(acc);
      end
    for (int n = 0; n < 16; n++)
      for (int j = 0; j * 8 < ng; j++) begin
        flit_t f;
        f = '0;
        f.nid = 17'(base + n * ng + j * 8);
        for (int l = 0; l < 8; l++) begin
          int g;
          longint s;
          g = j * 8 + l;
          if (g < ng) begin
            s = 0;
            for (int x = g << agg; x < (g + 1) << agg; x++) s += inc[x][n];
            f.lane_en[l] = 1'b1;
            f.val[l] = (s > 32767) ? 16'd32767 : 16'(s);
          end
        end
        exp_f.push_back(f);
      end
  endtask

  initial begin
    prog_en = 0; in_wr_en = 0; sample = 0; even_start = 0; agg_log2 = 0; home_base = 0;
    prog_xbar = 0; prog_row = 0; prog_cells = 0; in_wr_xbar = 0; in_wr_spikes = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int x = 0; x < 64; x++)
      for (int r = 0; r < 256; r++) begin
        @(negedge clk);
        prog_en = 1; prog_xbar = 6'(x); prog_row = 8'(r);
        for (int c = 0; c < 128; c++) begin xcell[x][r][c] = (c % 8 < 3 || x >= 56) ? 2'($urandom) : 2'd0; prog_cells[c] = xcell[x][r][c]; end
      end
    @(negedge clk); prog_en = 0;
    for (int ph = 0; ph < 3; ph++) begin
      int agg, t0, t1, dens;
      agg = (ph == 0) ? 0 : (ph == 1) ? 2 : 6;
      dens = (ph == 1) ? 60 : 4;       // dense inputs in one phase make the ADCs clip
      for (int x = 0; x < 64; x++) begin
        for (int r = 0; r < 256; r++) spk[x][r] = ($urandom_range(0, 99) < dens);
        @(negedge clk); in_wr_en = 1; in_wr_xbar = 6'(x); in_wr_spikes = spk[x];
      end
      @(negedge clk); in_wr_en = 0;
      agg_log2 = 3'(agg); home_base = 17'(1024 * ph);
      expect_phase(agg, 1024 * ph);
      sample = 1; @(negedge clk); sample = 0;
      even_start = 1; t0 = $time; @(negedge clk); even_start = 0;
      while (!even_done) @(negedge clk);
      t1 = $time;
      @(negedge clk);
      checks++;
      if ((t1 - t0) / 10 != 128 + 3 + ((64 >> agg) + 7) / 8 - 1) begin
        failures++;
        $display("even phase %0d cycles", (t1 - t0) / 10);
      end
      checks++; if (exp_f.size() != 0) failures++;
    end
    checks++; if (stat_clips == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
