// synapse_crossbar: the crossbar front end of the core. It holds the input
// spikes of one time step ("In. Spike"), turns each active axon into a row
// address for the stacked memory dies ("Address Out"), and rebuilds the
// synaptic weights of that axon from the subsets the dies return ("Synapse
// Val."), so the LIF neurons receive one full weight each per active axon.
//
// How it works: load captures the spike vector of the time step. Every
// following cycle the lowest-numbered pending axon is selected by a priority
// encoder, its row is read from all dies at once and its pending bit is
// cleared; inactive axons cost no cycle. One cycle later the dies' outputs
// are concatenated, die m0 giving the most significant bits, into one
// sign-magnitude weight per neuron. The event-driven scan order and the
// one-axon-per-cycle rate are this design's choices; the split of a weight
// over the dies and its reassembly follow the source design.
//
// Timing: with k active axons, rd_en is high in cycles 1..k after load,
// syn_valid in cycles 2..k+1, and done pulses in cycle k+2 (cycle 1 when
// k = 0). load is ignored while busy.
module synapse_crossbar
  import snn_pkg::*;
#(
  parameter int unsigned AXONS   = 784,
  parameter int unsigned NEURONS = 48,
  localparam int unsigned AXON_W = (AXONS < 2) ? 1 : $clog2(AXONS),
  localparam int unsigned WIDTH  = NEURONS * LAYER_BITS
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             load,
  input  logic [AXONS-1:0]                 spikes_in,
  // address out to the memory dies
  output logic                             rd_en,
  output logic [AXON_W-1:0]                rd_addr,
  // subsets returned by the dies, index 0 = die m0 (MSBs)
  input  logic [NUM_LAYERS-1:0][WIDTH-1:0] layer_data,
  // synapse values to the LIF array
  output logic                             syn_valid,
  output logic [AXON_W-1:0]                syn_axon,
  output weight_t [NEURONS-1:0]            syn_weight,
  output logic                             busy,
  output logic                             done
);

  logic [AXONS-1:0]  pending_q;
  logic              active_q;
  logic              vld_q;
  logic [AXON_W-1:0] axon_q;
  logic [AXON_W-1:0] sel;
  logic              any;

  // Priority encoder: lowest pending axon.
  always_comb begin
    sel = '0;
    any = 1'b0;
    for (int i = int'(AXONS) - 1; i >= 0; i--) begin
      if (pending_q[i]) begin
        sel = AXON_W'(i);
        any = 1'b1;
      end
    end
  end

  assign rd_en   = active_q && any;
  assign rd_addr = sel;
  assign done    = active_q && !any && !vld_q;
  assign busy    = active_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending_q <= '0;
      active_q  <= 1'b0;
      vld_q     <= 1'b0;
      axon_q    <= '0;
    end else begin
      vld_q <= rd_en;
      if (rd_en) begin
        pending_q[sel] <= 1'b0;
        axon_q         <= sel;
      end
      if (done) active_q <= 1'b0;
      if (load && !active_q) begin
        pending_q <= spikes_in;
        active_q  <= 1'b1;
      end
    end
  end

  // Weight recomposition: W = {m0, m1, ..., m(M-1)}.
  always_comb begin
    for (int n = 0; n < int'(NEURONS); n++) begin
      for (int l = 0; l < int'(NUM_LAYERS); l++) begin
        syn_weight[n][WEIGHT_BITS-1-l*LAYER_BITS -: LAYER_BITS] =
          layer_data[l][n*LAYER_BITS +: LAYER_BITS];
      end
    end
  end

  assign syn_valid = vld_q;
  assign syn_axon  = axon_q;

endmodule
