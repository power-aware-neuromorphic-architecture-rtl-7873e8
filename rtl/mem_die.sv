// mem_die: one stacked synaptic memory die (one "memory layer").
//
// A die stores one LAYER_BITS-wide subset of every synaptic weight of the
// core. Row r holds the subsets of all NEURONS weights of axon r, so one
// read returns, for one input axon, the slice of the weight of every neuron
// (NEURONS * LAYER_BITS bits). The row address decoder and the array follow
// the source design's die diagram; the separate write port (one cell per
// write, used by the broadcast weight update) and the clamp are this
// design's choices.
//
// Power gating: pwr_on low means the die's supply is switched off. Reads then
// return all zeros (the isolation at the die boundary clamps the TSV lines),
// so the logic die sees the die's bits as zeros, and writes are dropped.
// The stored contents are only meaningful again after the die is reloaded;
// the array keeps its old values in this model, the power controller flags
// the die for reload when its supply comes back.
//
// Timing: synchronous read, rd_data is valid one cycle after rd_en. Write
// takes effect at the clock edge; a read of the same row in the same cycle
// returns the old contents.
module mem_die #(
  parameter int unsigned ROWS       = 784,  // input axons of the core
  parameter int unsigned NEURONS    = 48,   // LIF neurons of the core
  parameter int unsigned LAYER_BITS = 2,
  localparam int unsigned ROW_W   = (ROWS < 2) ? 1 : $clog2(ROWS),
  localparam int unsigned COL_W   = (NEURONS < 2) ? 1 : $clog2(NEURONS),
  localparam int unsigned WIDTH   = NEURONS * LAYER_BITS
) (
  input  logic                  clk,
  input  logic                  pwr_on,
  // read port (address out of the crossbar)
  input  logic                  rd_en,
  input  logic [ROW_W-1:0]      rd_addr,
  output logic [WIDTH-1:0]      rd_data,
  // write port (broadcast weight update)
  input  logic                  wr_en,
  input  logic [ROW_W-1:0]      wr_row,
  input  logic [COL_W-1:0]      wr_col,
  input  logic [LAYER_BITS-1:0] wr_bits
);

  logic [WIDTH-1:0] mem [ROWS];
  logic [WIDTH-1:0] rd_q;
  logic             on_q;

  always_ff @(posedge clk) begin
    if (wr_en && pwr_on && wr_row < ROW_W'(ROWS) && wr_col < COL_W'(NEURONS))
      mem[wr_row][wr_col*LAYER_BITS +: LAYER_BITS] <= wr_bits;
  end

  always_ff @(posedge clk) begin
    on_q <= pwr_on;
    if (rd_en && rd_addr < ROW_W'(ROWS)) rd_q <= mem[rd_addr];
    else if (rd_en)                      rd_q <= '0;
  end

  assign rd_data = on_q ? rd_q : '0;

endmodule
