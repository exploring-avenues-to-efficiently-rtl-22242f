// sf_pe: one SpinalFlow processing element (integrate-and-fire neuron).
//
// The PE owns one output neuron for a whole step (output-stationary). It holds
// an accumulator (potential register and adder) and a comparator. For every
// input spike the broadcast weight is added to the potential; when the
// potential reaches the threshold the PE emits one spike and then ignores the
// rest of the input interval, because a temporally coded neuron fires at most
// once. `clear` zeroes the potential and re-arms the PE for the next spine.
// There is no leak, as in the document's PE.
//
// Timing: `en`/`weight`/`tick` are sampled on a rising edge; `fire` and
// `fire_t` are registered and valid the cycle after the triggering spike.
// Choices of this design: the addition saturates at the signed V_W-bit range,
// and the neuron fires when potential >= threshold.
module sf_pe #(
  parameter int unsigned W_W = 8,
  parameter int unsigned V_W = 8,
  parameter int unsigned T_W = 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clear,     // start of a new spine
  input  logic                  en,        // an input spike is being applied
  input  logic signed [W_W-1:0] weight,
  input  logic        [T_W-1:0] tick,
  input  logic signed [V_W-1:0] threshold,
  output logic                  fire,      // one-cycle output spike
  output logic        [T_W-1:0] fire_t,    // tick of that spike
  output logic                  done,      // has fired in this interval
  output logic signed [V_W-1:0] potential
);
  localparam logic signed [V_W:0] VMAX = (V_W+1)'(2**(V_W-1) - 1);
  localparam logic signed [V_W:0] VMIN = -(V_W+1)'(2**(V_W-1));

  logic signed [V_W:0]   sum;
  logic signed [V_W-1:0] sat;

  always_comb begin
    sum = (V_W+1)'(potential) + (V_W+1)'(weight);
    if (sum > VMAX)      sat = VMAX[V_W-1:0];
    else if (sum < VMIN) sat = VMIN[V_W-1:0];
    else                 sat = sum[V_W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      potential <= '0;
      done      <= 1'b0;
      fire      <= 1'b0;
      fire_t    <= '0;
    end else begin
      fire <= 1'b0;
      if (clear) begin
        potential <= '0;
        done      <= 1'b0;
      end else if (en && !done) begin
        potential <= sat;
        if (sat >= threshold) begin
          done   <= 1'b1;
          fire   <= 1'b1;
          fire_t <= tick;
        end
      end
    end
  end
endmodule
