// inxs_drv.svh: stimulus, reference model and checks for an INXS tile,
// included inside a testbench module that defines localparams NSU, NXB and
// ODD, provides `clk`, `rst_n`, `checks`, `failures`, and connects the
// signals declared here to the tile.
//
// Reference model: bitline sums of the 2-bit cells on spiking rows, clipped
// to 8 bits; shift-and-add of the 8 slices of each 16-bit weight; sum over
// 2^agg crossbars, saturated to 32767; then, per neuron, v + inc - leak
// (16-bit saturation), a spike and reset to 0 when v reaches the threshold.

  import inxs_pkg::*;

  logic                          ix_prog_en, ix_in_wr_en;
  logic [$clog2(NSU)-1:0]        ix_prog_su, ix_in_wr_su, ix_cb_host_su;
  logic [$clog2(NXB)-1:0]        ix_prog_xbar, ix_in_wr_xbar;
  logic [7:0]                    ix_prog_row;
  logic [XB_C-1:0][CELL_W-1:0]   ix_prog_cells;
  logic [XB_R-1:0]               ix_in_wr_spikes;
  logic                          ix_cb_host_wr_en, ix_cb_host_rd_en;
  logic [9:0]                    ix_cb_host_row;
  logic [CB_WORDS-1:0][P_W-1:0]  ix_cb_host_wdata, ix_cb_host_rdata;
  logic [NSU-1:0][2:0]           ix_agg_log2;
  logic [NSU-1:0][NID_W-1:0]     ix_home_base;
  logic signed [P_W-1:0]         ix_leak, ix_threshold;
  logic                          ix_tick_start, ix_tick_done, ix_busy, ix_odd_phase, ix_even_phase;
  logic [NSU-1:0]                ix_spk_valid;
  logic [NSU-1:0][LANES-1:0]     ix_spk_mask;
  logic [NSU-1:0][NID_W-1:0]     ix_spk_nid;
  logic [31:0]                   ix_stat_clips, ix_stat_bypass, ix_stat_even_cycles;

  logic [1:0]   ix_cell [NSU][NXB][256][128];
  logic [255:0] ix_spk  [NSU][NXB];
  int           ix_pot  [NSU][int];
  typedef struct { int nid; logic [7:0] mask; } ix_spk_t;
  ix_spk_t      ix_exp  [NSU][$];
  int           ix_nspk = 0, ix_odd_cycles = 0;

  always @(posedge clk) if (rst_n) begin
    if (ix_odd_phase) ix_odd_cycles++;
    for (int i = 0; i < NSU; i++) if (ix_spk_valid[i]) begin
      checks++;
      ix_nspk++;
      if (ix_exp[i].size() == 0 || int'(ix_spk_nid[i]) != ix_exp[i][0].nid || ix_spk_mask[i] !== ix_exp[i][0].mask) begin
        failures++;
        if (failures < 5) $display("INXS unit %0d: spike %0d/%b unexpected", i, ix_spk_nid[i], ix_spk_mask[i]);
      end
      if (ix_exp[i].size() != 0) void'(ix_exp[i].pop_front());
    end
  end

  task automatic ix_init();
    ix_prog_en = 0; ix_in_wr_en = 0; ix_prog_su = '0; ix_in_wr_su = '0; ix_cb_host_su = '0;
    ix_prog_xbar = '0; ix_in_wr_xbar = '0; ix_prog_row = '0; ix_prog_cells = '0; ix_in_wr_spikes = '0;
    ix_cb_host_wr_en = 0; ix_cb_host_rd_en = 0; ix_cb_host_row = '0; ix_cb_host_wdata = '0;
    ix_agg_log2 = '0; ix_home_base = '0; ix_leak = 16'sd5; ix_threshold = 16'sd3000;
    ix_tick_start = 0;
  endtask

  task automatic ix_program();
    for (int i = 0; i < NSU; i++)
      for (int x = 0; x < NXB; x++)
        for (int r = 0; r < 256; r++) begin
          @(negedge clk);
          ix_prog_en = 1; ix_prog_su = $clog2(NSU)'(i); ix_prog_xbar = $clog2(NXB)'(x); ix_prog_row = 8'(r);
          for (int c = 0; c < 128; c++) begin
            ix_cell[i][x][r][c] = (c % 8 < 3 || x >= NXB - 2) ? 2'($urandom) : 2'd0;
            ix_prog_cells[c] = ix_cell[i][x][r][c];
          end
        end
    @(negedge clk); ix_prog_en = 0;
  endtask

  // zero the potential rows a unit will use
  task automatic ix_clear_rows(int i, int base, int n);
    for (int r = base / 64; r <= (base + n - 1) / 64; r++) begin
      @(negedge clk);
      ix_cb_host_wr_en = 1; ix_cb_host_su = $clog2(NSU)'(i); ix_cb_host_row = 10'(r); ix_cb_host_wdata = '0;
    end
    @(negedge clk); ix_cb_host_wr_en = 0;
    for (int k = base; k < base + n; k++) ix_pot[i][k] = 0;
  endtask

  task automatic ix_load_inputs(int dens);
    for (int i = 0; i < NSU; i++)
      for (int x = 0; x < NXB; x++) begin
        for (int r = 0; r < 256; r++) ix_spk[i][x][r] = ($urandom_range(0, 99) < dens);
        @(negedge clk);
        ix_in_wr_en = 1; ix_in_wr_su = $clog2(NSU)'(i); ix_in_wr_xbar = $clog2(NXB)'(x);
        ix_in_wr_spikes = ix_spk[i][x];
      end
    @(negedge clk); ix_in_wr_en = 0;
  endtask

  task automatic ix_model_tick();
    for (int i = 0; i < NSU; i++) begin
      int agg, ng, base;
      int inc[NXB][16];
      agg = int'(ix_agg_log2[i]);
      ng = NXB >> agg;
      base = int'(ix_home_base[i]);
      for (int x = 0; x < NXB; x++)
        for (int n = 0; n < 16; n++) begin
          longint acc;
          acc = 0;
          for (int j = 0; j < 8; j++) begin
            int bl;
            bl = 0;
            for (int r = 0; r < 256; r++) if (ix_spk[i][x][r]) bl += int'(ix_cell[i][x][r][8*n+j]);
            if (bl > 255) bl = 255;
            acc += longint'(bl) << (2 * j);
          end
          inc[x][n] = (acc > 32767) ? 32767 : int'(acc);
        end
      for (int n = 0; n < 16; n++)
        for (int j = 0; j * 8 < ng; j++) begin
          logic [7:0] m;
          m = '0;
          for (int l = 0; l < 8 && j * 8 + l < ng; l++) begin
            int g, v, nid;
            longint s;
            g = j * 8 + l;
            s = 0;
            for (int x = g << agg; x < (g + 1) << agg; x++) s += inc[x][n];
            if (s > 32767) s = 32767;
            nid = base + n * ng + g;
            v = ix_pot[i][nid] + int'(s) - int'(ix_leak);
            if (v > 32767) v = 32767;
            if (v < -32768) v = -32768;
            if (v >= int'(ix_threshold)) begin m[l] = 1'b1; v = 0; end
            ix_pot[i][nid] = v;
          end
          if (m != 0) ix_exp[i].push_back('{base + n * ng + j * 8, m});
        end
    end
  endtask

  // one tick; returns its length in cycles
  task automatic ix_tick(output int cycles);
    int t0;
    ix_model_tick();
    @(negedge clk);
    ix_tick_start = 1; t0 = $time;
    @(negedge clk); ix_tick_start = 0;
    while (!ix_tick_done) @(negedge clk);
    cycles = ($time - t0) / 10;
    @(negedge clk);
    for (int i = 0; i < NSU; i++) begin
      checks++;
      if (ix_exp[i].size() != 0) begin
        failures++;
        $display("INXS unit %0d: %0d spikes missing", i, ix_exp[i].size());
        ix_exp[i].delete();
      end
    end
  endtask

  // read back all potentials a unit owns and compare with the model
  task automatic ix_check_pots(int i);
    for (int r = 0; r < 1024; r++) begin
      bit used;
      used = 0;
      for (int w = 0; w < 64; w++) if (ix_pot[i].exists(r * 64 + w)) used = 1;
      if (!used) continue;
      @(negedge clk);
      ix_cb_host_rd_en = 1; ix_cb_host_su = $clog2(NSU)'(i); ix_cb_host_row = 10'(r);
      @(negedge clk); ix_cb_host_rd_en = 0;
      checks++;
      for (int w = 0; w < 64; w++)
        if (ix_pot[i].exists(r * 64 + w) && int'($signed(ix_cb_host_rdata[w])) != ix_pot[i][r * 64 + w]) begin
          failures++;
          $display("INXS unit %0d neuron %0d: potential %0d, expected %0d", i, r * 64 + w,
                   $signed(ix_cb_host_rdata[w]), ix_pot[i][r * 64 + w]);
          break;
        end
    end
  endtask
