// tb_inxs_xbar_adc: programs a full 256x128 crossbar with random 2-bit cells,
// samples random spike vectors, and checks every converted bitline against
// the sum of the cells on active rows, clipped to the 8-bit ADC range. Dense
// inputs make the clip happen; sparse ones must convert exactly.
module tb_inxs_xbar_adc;
  logic clk = 0;
  logic prog_en, sample, adc_en, adc_clip;
  logic [7:0] prog_row;
  logic [127:0][1:0] prog_cells;
  logic [255:0] in_spikes;
  logic [6:0] adc_col;
  logic [7:0] adc_out;
  int checks = 0, failures = 0, clips = 0;

  inxs_xbar_adc dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [1:0] m [256][128];

  initial begin
    prog_en = 0; sample = 0; adc_en = 0; adc_col = 0; in_spikes = 0; prog_row = 0; prog_cells = 0;
    @(negedge clk);
    for (int r = 0; r < 256; r++) begin
      for (int c = 0; c < 128; c++) begin m[r][c] = 2'($urandom); prog_cells[c] = m[r][c]; end
      prog_en = 1; prog_row = 8'(r);
      @(negedge clk);
    end
    prog_en = 0;
    for (int it = 0; it < 12; it++) begin
      int dens;
      dens = (it < 4) ? 90 : (it < 8) ? 40 : 2;   // percent of rows spiking
      for (int r = 0; r < 256; r++) in_spikes[r] = ($urandom_range(0, 99) < dens);
      sample = 1; @(negedge clk); sample = 0;
      in_spikes = '1;             // later changes must not disturb the held values
      for (int c = 0; c < 128; c++) begin
        int s, e;
        adc_en = 1; adc_col = 7'(c);
        @(negedge clk);
        s = 0;
        for (int r = 0; r < 256; r++) if (dut_spk(it, r)) s += int'(m[r][c]);
        e = (s > 255) ? 255 : s;
        checks++;
        if (int'(adc_out) != e || adc_clip != (s > 255)) failures++;
        if (adc_clip) clips++;
      end
      adc_en = 0;
    end
    checks++; if (clips == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the spike vector of each sample, kept for the reference sums
  logic [255:0] hist [12];
  int hist_it = 0;
  always @(posedge clk) if (sample) begin hist[hist_it] <= in_spikes; hist_it <= hist_it + 1; end
  function automatic bit dut_spk(int it, int r);
    return hist[it][r];
  endfunction
endmodule
