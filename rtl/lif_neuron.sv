// lif_neuron: one leaky integrate-and-fire neuron of the core's LIF array.
//
// The neuron keeps its membrane potential in an accumulator register. Each
// cycle with integ_valid high it adds one synaptic weight (8-bit
// sign-magnitude, converted to two's complement) with saturation. At the end
// of a time step the fire strobe applies the leak, compares the result with
// the threshold and, when the threshold is reached, emits a spike, resets
// the potential to zero and starts a refractory period of REFRACT time steps
// during which incoming weights are ignored. Integrate, leak, threshold and
// refractory blocks come from the source design's neuron diagram; the leak
// rule (a constant step towards zero), reset-to-zero, the widths and the
// default threshold/leak/refractory values are this design's choices.
//
// Interface and timing:
//   clear        synchronous reset of potential and refractory counter
//                (start of a new input sample)
//   integ_valid  add weight this cycle (ignored while refractory)
//   fire         end of time step; spike is valid in the next cycle as a
//                one-cycle pulse, potential is updated in the same edge
//   potential    current membrane potential, signed, same scale as the
//                weight (7 fraction bits)
module lif_neuron
  import snn_pkg::*;
#(
  parameter int unsigned        POT_W   = 16,
  parameter logic signed [15:0] THRESH  = 16'sd128,  // 1.0
  parameter logic signed [15:0] LEAK    = 16'sd1,    // 1/128 per step
  parameter int unsigned        REFRACT = 1          // time steps
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clear,
  input  logic                    integ_valid,
  input  weight_t                 weight,
  input  logic                    fire,
  output logic                    spike,
  output logic signed [POT_W-1:0] potential,
  output logic                    refractory
);

  localparam int unsigned RC_W = (REFRACT < 2) ? 1 : $clog2(REFRACT + 1);
  localparam logic signed [POT_W:0] POT_MAX = (POT_W+1)'((1 << (POT_W-1)) - 1);
  localparam logic signed [POT_W:0] POT_MIN = -POT_MAX - 1;

  logic signed [POT_W-1:0] pot_q;
  logic [RC_W-1:0]         rcnt_q;
  logic                    spike_q;

  logic signed [POT_W:0]   sum;
  logic signed [POT_W-1:0] sum_sat;
  logic signed [POT_W-1:0] leaked;

  always_comb begin
    sum = (POT_W+1)'(pot_q) + (POT_W+1)'(sm_to_signed(weight));
    if (sum > POT_MAX)      sum_sat = POT_MAX[POT_W-1:0];
    else if (sum < POT_MIN) sum_sat = POT_MIN[POT_W-1:0];
    else                    sum_sat = sum[POT_W-1:0];

    if (pot_q > POT_W'(LEAK))        leaked = pot_q - POT_W'(LEAK);
    else if (pot_q < -POT_W'(LEAK))  leaked = pot_q + POT_W'(LEAK);
    else                             leaked = '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pot_q   <= '0;
      rcnt_q  <= '0;
      spike_q <= 1'b0;
    end else if (clear) begin
      pot_q   <= '0;
      rcnt_q  <= '0;
      spike_q <= 1'b0;
    end else if (fire) begin
      if (rcnt_q == '0 && leaked >= POT_W'(THRESH)) begin
        spike_q <= 1'b1;
        pot_q   <= '0;
        rcnt_q  <= RC_W'(REFRACT);
      end else begin
        spike_q <= 1'b0;
        pot_q   <= leaked;
        if (rcnt_q != '0) rcnt_q <= rcnt_q - 1'b1;
      end
    end else begin
      spike_q <= 1'b0;
      if (integ_valid && rcnt_q == '0) pot_q <= sum_sat;
    end
  end

  assign spike      = spike_q;
  assign potential  = pot_q;
  assign refractory = (rcnt_q != '0);

endmodule
