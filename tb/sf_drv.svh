// sf_drv.svh: stimulus, reference model and checks for the SpinalFlow core,
// included inside a testbench module that provides `clk`, `rst_n`, `checks`
// and `failures` and connects the signals declared here to the core.
//
// Reference model: for one step, the input spines are merged by tick (on
// equal ticks the spine listed first wins, then the spine's own order); for
// every merged spike, every neuron that has not fired adds its weight with
// signed 8-bit saturation and fires when its potential reaches the
// threshold. The expected output spine lists the fired neurons in firing
// order (the input spike that made them fire), then by neuron index; this is
// sorted by tick.
//
// After every step the STDP readout is checked: one entry per merged input
// spike, in merge order, with its filter row, its tick and dt = t_in - t_out
// for each PE that fired in the step.

  import sf_pkg::*;

  logic                          fb_wr_en;
  logic [FB_AW-1:0]              fb_wr_addr;
  logic [N_PE-1:0][W_W-1:0]      fb_wr_data;
  logic                          host_ib_wr_en, host_ib_ready;
  logic [SLOT_W-1:0]             host_ib_slot;
  logic [$clog2(SPINE_LEN)-1:0]  host_ib_idx;
  spike_t                        host_ib_data;
  logic                          host_len_wr_en;
  logic [SLOT_W-1:0]             host_len_slot;
  logic [LEN_W-1:0]              host_len_val;
  logic signed [V_W-1:0]         threshold;
  logic                          cmd_valid, cmd_ready;
  step_cmd_t                     cmd;
  logic                          spk_out_valid, spk_out_ready;
  spike_t                        spk_out;
  logic                          spine_done;
  logic [LEN_W-1:0]              spine_len;
  logic                          sf_busy_o;
  logic [31:0]                   stat_steps, stat_spikes, stat_stalls;
  logic                          stdp_start, stdp_busy, stdp_valid, stdp_ready;
  logic [FB_AW-1:0]              stdp_row;
  logic [T_W-1:0]                stdp_tin;
  logic [N_PE-1:0]               stdp_fired;
  logic signed [N_PE-1:0][T_W:0] stdp_dt;
  int                            m_rec_t [$], m_rec_row [$];
  int                            ev_stdp = 0;

  // model state
  logic signed [W_W-1:0] m_fb  [FB_ROWS][N_PE];
  spike_t                m_ib  [IB_SLOTS][$];
  spike_t                got_q [$];
  int                    got_len [$];
  int                    ev_wb = 0, ev_stall_out = 0, ev_refused = 0, ev_burst = 0,
                         ev_empty_step = 0, ev_sat = 0, ev_chain = 0;

  always @(posedge clk) if (rst_n) begin
    if (spk_out_valid && spk_out_ready) got_q.push_back(spk_out);
    if (spk_out_valid && !spk_out_ready) ev_stall_out++;
    if (spine_done) got_len.push_back(int'(spine_len));
    if (host_ib_wr_en && !host_ib_ready) ev_refused++;
  end

  task automatic sf_init();
    fb_wr_en = 0; fb_wr_addr = '0; fb_wr_data = '0;
    host_ib_wr_en = 0; host_ib_slot = '0; host_ib_idx = '0; host_ib_data = '0;
    host_len_wr_en = 0; host_len_slot = '0; host_len_val = '0;
    threshold = 8'sd60; cmd_valid = 0; cmd = '0; spk_out_ready = 1;
    stdp_start = 0; stdp_ready = 0;
  endtask

  // fill the whole filter buffer with random weights in [lo, hi]
  task automatic sf_load_filters(int lo, int hi);
    for (int r = 0; r < int'(FB_ROWS); r++) begin
      @(negedge clk);
      fb_wr_en = 1; fb_wr_addr = FB_AW'(r);
      for (int p = 0; p < int'(N_PE); p++) begin
        m_fb[r][p] = W_W'($urandom_range(0, hi - lo) + lo);
        fb_wr_data[p] = m_fb[r][p];
      end
    end
    @(negedge clk); fb_wr_en = 0;
  endtask

  // write one sorted random spine of n spikes into slot s through the host port
  task automatic sf_write_spine(int s, int n, int tmax);
    int t;
    logic [N_PE-1:0] used;
    m_ib[s].delete();
    used = '0;
    for (int i = 0; i < n; i++) begin
      int id;
      t = $urandom_range(0, tmax);
      do id = $urandom_range(0, N_PE - 1); while (used[id]);
      used[id] = 1'b1;
      m_ib[s].push_back('{t: T_W'(t), id: ID_W'(id)});
    end
    m_ib[s].sort() with (item.t);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      host_ib_wr_en = 1; host_ib_slot = SLOT_W'(s); host_ib_idx = 7'(i); host_ib_data = m_ib[s][i];
      #1 while (!host_ib_ready) @(negedge clk);
    end
    @(negedge clk); host_ib_wr_en = 0;
    host_len_wr_en = 1; host_len_slot = SLOT_W'(s); host_len_val = LEN_W'(n);
    @(negedge clk); host_len_wr_en = 0;
  endtask

  // reference model of one step
  task automatic sf_model(step_cmd_t c, output spike_t outq[$]);
    int ptr[N_SPINE_BUF];
    int v[N_PE];
    bit d[N_PE];
    int ftick[N_PE], fidx[N_PE];
    int k;
    outq.delete();
    m_rec_t.delete(); m_rec_row.delete();
    k = 0;
    foreach (ptr[b]) ptr[b] = 0;
    foreach (v[p]) begin v[p] = 0; d[p] = 0; end
    forever begin
      int best;
      spike_t sp;
      best = -1;
      for (int b = 0; b < int'(c.n_spines); b++)
        if (ptr[b] < m_ib[c.slot[b]].size())
          if (best < 0 || m_ib[c.slot[b]][ptr[b]].t < m_ib[c.slot[best]][ptr[best]].t) best = b;
      if (best < 0) break;
      sp = m_ib[c.slot[best]][ptr[best]];
      ptr[best]++;
      k++;
      m_rec_t.push_back(int'(sp.t)); m_rec_row.push_back(int'(c.row_base[best]) + int'(sp.id));
      for (int p = 0; p < int'(N_PE); p++) if (!d[p]) begin
        v[p] += int'(m_fb[int'(c.row_base[best]) + int'(sp.id)][p]);
        if (v[p] > 127) begin v[p] = 127; ev_sat++; end
        if (v[p] < -128) begin v[p] = -128; ev_sat++; end
        if (v[p] >= int'(threshold)) begin d[p] = 1; ftick[p] = int'(sp.t); fidx[p] = k; end
      end
    end
    for (int i = 1; i <= k; i++)
      for (int p = 0; p < int'(N_PE); p++)
        if (d[p] && fidx[p] == i) outq.push_back('{t: T_W'(ftick[p]), id: ID_W'(p)});
  endtask

  // run one step and compare the output spine; returns cycles to completion
  // STDP readout after a step: one entry per applied input spike, in the
  // order applied, with dt = t_in - t_out for every PE that fired
  task automatic sf_stdp_check(spike_t outq[$]);
    int tout[N_PE];
    bit fired[N_PE];
    int k;
    foreach (fired[p]) fired[p] = 0;
    foreach (outq[i]) begin fired[outq[i].id] = 1; tout[outq[i].id] = int'(outq[i].t); end
    while (!cmd_ready) @(negedge clk);
    stdp_start = 1; @(negedge clk); stdp_start = 0;
    k = 0;
    while (stdp_busy || stdp_valid) begin
      stdp_ready = 1'($urandom_range(0, 3) != 0);
      #1;
      if (stdp_valid && stdp_ready) begin
        checks++;
        if (k >= m_rec_t.size() || int'(stdp_row) != m_rec_row[k] || int'(stdp_tin) != m_rec_t[k]) begin
          failures++;
          $display("stdp entry %0d: row %0d tick %0d", k, stdp_row, stdp_tin);
        end else
          for (int p = 0; p < int'(N_PE); p++)
            if (stdp_fired[p] != fired[p] || int'($signed(stdp_dt[p])) != (fired[p] ? m_rec_t[k] - tout[p] : 0)) begin
              failures++;
              $display("stdp entry %0d PE %0d: dt %0d", k, p, $signed(stdp_dt[p]));
              break;
            end
        k++;
      end
      @(negedge clk);
    end
    stdp_ready = 0;
    checks++;
    if (k != m_rec_t.size()) begin failures++; $display("stdp: %0d of %0d entries", k, m_rec_t.size()); end
    if (k > 0) ev_stdp++;
  endtask

  task automatic sf_step(step_cmd_t c, output int cycles);
    spike_t exp_q[$];
    int nin, t0, t1;
    sf_model(c, exp_q);
    nin = 0;
    for (int b = 0; b < int'(c.n_spines); b++) nin += m_ib[c.slot[b]].size();
    if (nin == 0) ev_empty_step++;
    got_q.delete(); got_len.delete();
    @(negedge clk);
    while (!cmd_ready) @(negedge clk);
    cmd = c; cmd_valid = 1;
    t0 = $time;
    @(negedge clk); cmd_valid = 0;
    while (got_len.size() == 0) @(negedge clk);
    t1 = $time;
    cycles = (t1 - t0) / 10;
    checks++;
    if (got_q.size() != exp_q.size() || got_len[0] != exp_q.size()) begin
      failures++;
      $display("step: %0d spikes out, %0d expected", got_q.size(), exp_q.size());
    end else begin
      foreach (exp_q[i]) if (got_q[i] !== exp_q[i]) begin
        failures++;
        $display("step: spike %0d is %0d@%0d, expected %0d@%0d", i, got_q[i].id, got_q[i].t, exp_q[i].id, exp_q[i].t);
        break;
      end
    end
    if (exp_q.size() > 8) ev_burst++;
    sf_stdp_check(exp_q);
    if (c.wb_en) begin
      m_ib[c.out_slot] = exp_q;
      ev_wb++;
    end
  endtask

  function automatic step_cmd_t sf_rand_cmd(int n);
    step_cmd_t c;
    c = '0;
    c.n_spines = 5'(n);
    for (int b = 0; b < int'(N_SPINE_BUF); b++) begin
      c.slot[b]     = SLOT_W'($urandom_range(0, IB_SLOTS - 1));
      c.row_base[b] = FB_AW'($urandom_range(0, FB_ROWS - N_PE));
    end
    return c;
  endfunction
