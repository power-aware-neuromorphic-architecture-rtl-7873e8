// spike_encoder: turns the output spikes of one time step into a stream of
// spike events for other clusters (or for this core's own decoder).
//
// load captures the vector of neurons that fired. The encoder then sends
// one event per fired neuron, lowest index first, each carrying the
// neuron's index, over a valid/ready handshake. While the receiver holds
// out_ready low the current event waits (back-pressure); busy stays high
// until every event has been taken. The source design names this block
// only; the event format, ordering and handshake are this design's choices.
//
// Timing: with k fired neurons and out_ready held high, out_valid is high
// in cycles 1..k after load and busy falls after the k-th transfer. load is
// ignored while busy (load_ready low).
module spike_encoder #(
  parameter int unsigned NEURONS = 48,
  localparam int unsigned NEURON_W = (NEURONS < 2) ? 1 : $clog2(NEURONS)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                load,
  output logic                load_ready,
  input  logic [NEURONS-1:0]  spikes_in,
  output logic                out_valid,
  input  logic                out_ready,
  output logic [NEURON_W-1:0] out_addr,
  output logic                busy
);

  logic [NEURONS-1:0]  pend_q;
  logic [NEURON_W-1:0] sel;

  always_comb begin
    sel = '0;
    for (int i = int'(NEURONS) - 1; i >= 0; i--)
      if (pend_q[i]) sel = NEURON_W'(i);
  end

  assign busy       = |pend_q;
  assign load_ready = !busy;
  assign out_valid  = busy;
  assign out_addr   = sel;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 pend_q      <= '0;
    else if (load && !busy)     pend_q      <= spikes_in;
    else if (out_valid && out_ready) pend_q[sel] <= 1'b0;
  end

  // An event on offer stays on offer, unchanged, until it is taken.
  property p_hold;
    @(posedge clk) disable iff (!rst_n)
      out_valid && !out_ready |=> out_valid && $stable(out_addr);
  endproperty
  a_hold: assert property (p_hold);

endmodule
