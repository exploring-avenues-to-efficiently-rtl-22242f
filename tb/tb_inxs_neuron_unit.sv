// tb_inxs_neuron_unit: streams flits of increments into the neuron unit,
// which works on a behavioural central buffer in this testbench, and checks
// every spike and the final potentials against a reference LLIF model
// (v + inc - leak, saturated to 16 bits, spike and reset to 0 at the
// threshold). Back-to-back flits to the same row exercise the bypass.
module tb_inxs_neuron_unit;
  import inxs_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid;
  flit_t in_flit;
  logic signed [15:0] leak, threshold;
  logic cb_rd_en, cb_wr_en, spk_valid;
  logic [9:0] cb_rd_row, cb_wr_row;
  logic [63:0][15:0] cb_rd_data, cb_wr_data;
  logic [63:0] cb_wr_mask;
  logic [7:0] spk_mask;
  logic [16:0] spk_nid;
  logic [31:0] stat_bypass;
  int checks = 0, failures = 0;

  inxs_neuron_unit dut (.*);
  always #5 clk = ~clk;

  // behavioural central buffer: 1-cycle read, masked write
  logic [63:0][15:0] cb [1024];
  always @(posedge clk) begin
    if (cb_rd_en) cb_rd_data <= cb[cb_rd_row];
    if (cb_wr_en) for (int w = 0; w < 64; w++) if (cb_wr_mask[w]) cb[cb_wr_row][w] <= cb_wr_data[w];
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ref_v [65536];
  typedef struct { int nid; logic [7:0] mask; } spk_t;
  spk_t exp_spk[$];
  int nspk = 0;

  always @(posedge clk) if (rst_n && spk_valid) begin
    checks++;
    nspk++;
    if (exp_spk.size() == 0 || int'(spk_nid) != exp_spk[0].nid || spk_mask !== exp_spk[0].mask) begin
      failures++;
      if (failures < 5) $display("spike %0d/%b", spk_nid, spk_mask);
    end
    if (exp_spk.size() != 0) void'(exp_spk.pop_front());
  end

  initial begin
    in_valid = 0; in_flit = '0; leak = 16'sd3; threshold = 16'sd2000;
    foreach (ref_v[i]) ref_v[i] = 0;
    repeat (2) @(posedge clk);
    for (int r = 0; r < 1024; r++) cb[r] = '0;  // after reset has settled the flops
    rst_n = 1;
    for (int it = 0; it < 6000; it++) begin
      int base;
      logic [7:0] m;
      @(negedge clk);
      if ($urandom_range(0, 5) == 0) begin in_valid = 0; continue; end
      base = (it % 3 == 0) ? 8 * $urandom_range(0, 15) : 8 * $urandom_range(0, 8191);
      in_valid = 1;
      in_flit.nid = 17'(base);
      in_flit.lane_en = (it % 7 == 0) ? 8'($urandom) : 8'hFF;
      m = '0;
      for (int l = 0; l < 8; l++) begin
        int s;
        in_flit.val[l] = 16'($urandom_range(0, (it % 50 == 0) ? 32767 : 400));
        if (in_flit.lane_en[l]) begin
          s = ref_v[base + l] + int'(in_flit.val[l]) - int'(leak);
          if (s > 32767) s = 32767;
          if (s < -32768) s = -32768;
          if (s >= int'(threshold)) begin m[l] = 1; s = 0; end
          ref_v[base + l] = s;
        end
      end
      if (m != 0) exp_spk.push_back('{base, m});
    end
    @(negedge clk); in_valid = 0;
    repeat (5) @(negedge clk);
    checks++; if (exp_spk.size() != 0 || nspk == 0) begin failures++; $display("spikes left %0d seen %0d", exp_spk.size(), nspk); end
    for (int n = 0; n < 65536; n++) begin
      if (int'($signed(cb[n / 64][n % 64])) != ref_v[n]) begin failures++; $display("pot %0d: %0d vs %0d", n, $signed(cb[n / 64][n % 64]), ref_v[n]); break; end
    end
    checks++; if (stat_bypass == 0) begin failures++; $display("no bypass"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
