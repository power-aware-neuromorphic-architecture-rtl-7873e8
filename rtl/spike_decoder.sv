// spike_decoder: receives spike events from other clusters (or from this
// core's own encoder) and turns them into the input spike vector of the next
// time step.
//
// An event is the index of the target input axon, delivered with a
// valid/ready handshake. The decoder sets that axon's bit in a collection
// register; repeated events for one axon in the same step merge into one
// spike. The swap strobe, given at the start of a time step, moves the
// collected vector to spikes_out and empties the collection register, so
// events arriving during a time step count towards the next one (double
// buffering). Events whose index is not an axon of this core are dropped
// and flagged on bad_addr. The source design names this block only; the
// event format, handshake and double buffering are this design's choices.
//
// Timing: in_ready is always high; an event accepted in the same cycle as
// swap belongs to the following step. spikes_out changes in the cycle after
// swap and then holds until the next swap.
module spike_decoder #(
  parameter int unsigned AXONS = 784,
  localparam int unsigned AXON_W = (AXONS < 2) ? 1 : $clog2(AXONS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [AXON_W-1:0] in_addr,
  input  logic              swap,
  output logic [AXONS-1:0]  spikes_out,
  output logic              bad_addr
);

  logic [AXONS-1:0] collect_q;
  logic [AXONS-1:0] out_q;
  logic [AXONS-1:0] hit;
  logic             in_range;

  assign in_ready = 1'b1;
  assign in_range = (in_addr < AXON_W'(AXONS));

  always_comb begin
    hit = '0;
    if (in_valid && in_range) hit[in_addr] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      collect_q <= '0;
      out_q     <= '0;
      bad_addr  <= 1'b0;
    end else begin
      bad_addr <= in_valid && !in_range;
      if (swap) begin
        out_q     <= collect_q;
        collect_q <= hit;
      end else begin
        collect_q <= collect_q | hit;
      end
    end
  end

  assign spikes_out = out_q;

endmodule
