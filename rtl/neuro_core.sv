// neuro_core: a spiking neuromorphic core whose synaptic memory is split
// over NUM_LAYERS stacked memory dies with separately controlled supplies.
//
// Main idea: every 8-bit synaptic weight is cut into four 2-bit subsets and
// each subset lives on its own die; die m0, next to the logic die, holds the
// most significant bits and die m3, on top, the least significant ones.
// Because each die has its own supply rail, the dies holding low-order bits
// can be run below nominal voltage (their bits then flip now and then) or
// switched off entirely (their bits then read as zeros, i.e. the weights
// are truncated in place), while the high-order bits stay exact. The same
// split lets a stack accept fabrication defects in the upper dies.
//
// Blocks: spike_decoder (events in) -> synapse_crossbar (scans the active
// axons, reads one row of every die per active axon and reassembles the
// weights) -> NEURONS lif_neuron instances -> spike_encoder (events out).
// NUM_LAYERS mem_die instances hold the weights; each one's read data passes
// through a die_supply_model, a behavioural model of the die's analog
// behaviour at reduced supply and with stuck-at defects. power_ctrl commands
// each die's supply and reports the power-aware mode. The dies' supply
// commands (vr_supply) and power-good state (die_on) are brought out for the
// off-chip regulators and power switches.
//
// Time step protocol (this design's choice): when step_ready is high, a
// step_start pulse takes the input events collected since the previous step
// and runs one time step: scan and integrate, then leak/threshold/fire, then
// send the output events. step_done pulses at the end. With k active input
// axons (k >= 1) and f firing neurons, and out_ready held high, step_done
// comes k + f + 5 cycles after step_start (f + 4 when k = 0). sample_clear
// (only while step_ready) resets all neuron potentials for a new sample.
//
// Weight update: a broadcast write (axon, neuron, 8-bit weight) is split
// into its subsets and written to all dies in one cycle; a die that is
// switched off ignores the write. The weight format and split follow the
// source design; widths of the ports, event formats and the handshakes are
// this design's choices.
module neuro_core
  import snn_pkg::*;
#(
  parameter int unsigned        AXONS         = 784,
  parameter int unsigned        NEURONS       = 48,
  parameter int unsigned        POT_W         = 16,
  parameter logic signed [15:0] THRESH        = 16'sd128,
  parameter logic signed [15:0] LEAK          = 16'sd1,
  parameter int unsigned        REFRACT       = 1,
  parameter int unsigned        SETTLE_CYCLES = 16,
  parameter int unsigned        DEFECT_PPM    = 0,
  parameter logic [NUM_LAYERS-1:0] DEFECT_DIES = 4'b1100,  // m2, m3
  parameter int unsigned        SEED          = 1,
  localparam int unsigned AXON_W   = (AXONS < 2) ? 1 : $clog2(AXONS),
  localparam int unsigned NEURON_W = (NEURONS < 2) ? 1 : $clog2(NEURONS),
  localparam int unsigned WIDTH    = NEURONS * LAYER_BITS
) (
  input  logic                           clk,
  input  logic                           rst_n,
  // spike events from other clusters
  input  logic                           in_valid,
  output logic                           in_ready,
  input  logic [AXON_W-1:0]              in_addr,
  output logic                           in_bad_addr,
  // spike events to other clusters
  output logic                           out_valid,
  input  logic                           out_ready,
  output logic [NEURON_W-1:0]            out_addr,
  // time step control
  input  logic                           step_start,
  output logic                           step_ready,
  output logic                           step_done,
  input  logic                           sample_clear,
  output logic [NEURONS-1:0]             step_spikes,
  // broadcast weight update
  input  logic                           wl_valid,
  output logic                           wl_ready,
  input  logic [AXON_W-1:0]              wl_axon,
  input  logic [NEURON_W-1:0]            wl_neuron,
  input  weight_t                        wl_weight,
  // power-aware control
  input  logic                           pwr_cfg_valid,
  output logic                           pwr_cfg_ready,
  input  layer_supply_t [NUM_LAYERS-1:0] pwr_cfg,
  output layer_supply_t [NUM_LAYERS-1:0] vr_supply,
  output logic          [NUM_LAYERS-1:0] die_on,
  output power_mode_e                    power_mode,
  output logic                           pwr_busy,
  output logic          [NUM_LAYERS-1:0] reload_req,
  input  logic          [NUM_LAYERS-1:0] reload_ack
);

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_SCAN, S_EMIT, S_WAIT} state_e;
  state_e state_q;

  // ---------------- input events ----------------
  logic [AXONS-1:0] in_spikes;
  logic             swap;

  spike_decoder #(.AXONS(AXONS)) u_dec (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_addr,
    .swap, .spikes_out(in_spikes), .bad_addr(in_bad_addr)
  );

  // ---------------- crossbar ----------------
  logic                             xb_load, xb_busy, xb_done;
  logic                             rd_en;
  logic [AXON_W-1:0]                rd_addr;
  logic [NUM_LAYERS-1:0][WIDTH-1:0] die_raw, die_data;
  logic                             syn_valid;
  logic [AXON_W-1:0]                syn_axon;
  weight_t [NEURONS-1:0]            syn_weight;

  synapse_crossbar #(.AXONS(AXONS), .NEURONS(NEURONS)) u_xbar (
    .clk, .rst_n,
    .load(xb_load), .spikes_in(in_spikes),
    .rd_en, .rd_addr,
    .layer_data(die_data),
    .syn_valid, .syn_axon, .syn_weight,
    .busy(xb_busy), .done(xb_done)
  );

  // ---------------- power control ----------------
  power_ctrl #(.SETTLE_CYCLES(SETTLE_CYCLES)) u_pwr (
    .clk, .rst_n,
    .cfg_valid(pwr_cfg_valid), .cfg_ready(pwr_cfg_ready), .cfg_target(pwr_cfg),
    .vr_supply, .die_on, .mode(power_mode), .busy(pwr_busy),
    .reload_req, .reload_ack
  );

  // ---------------- weight update path ----------------
  logic              wr_en_q;
  logic [AXON_W-1:0] wr_row_q;
  logic [NEURON_W-1:0] wr_col_q;
  weight_t           wr_w_q;

  assign wl_ready = 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_en_q  <= 1'b0;
      wr_row_q <= '0;
      wr_col_q <= '0;
      wr_w_q   <= '0;
    end else begin
      wr_en_q  <= wl_valid;
      wr_row_q <= wl_axon;
      wr_col_q <= wl_neuron;
      wr_w_q   <= wl_weight;
    end
  end

  // ---------------- stacked memory dies ----------------
  for (genvar l = 0; l < int'(NUM_LAYERS); l++) begin : g_die
    mem_die #(.ROWS(AXONS), .NEURONS(NEURONS), .LAYER_BITS(LAYER_BITS)) u_die (
      .clk,
      .pwr_on(die_on[l]),
      .rd_en, .rd_addr, .rd_data(die_raw[l]),
      .wr_en(wr_en_q), .wr_row(wr_row_q), .wr_col(wr_col_q),
      .wr_bits(wr_w_q[WEIGHT_BITS-1-l*LAYER_BITS -: LAYER_BITS])
    );

    die_supply_model #(
      .ROWS(AXONS), .NEURONS(NEURONS),
      .DEFECT_PPM(DEFECT_DIES[l] ? DEFECT_PPM : 0),
      .SEED(SEED + l)
    ) u_supply (
      .clk, .supply(vr_supply[l]),
      .rd_en, .rd_addr,
      .din(die_raw[l]), .dout(die_data[l]),
      .ber_ppm(), .flip_cells()
    );
  end

  // ---------------- LIF neurons ----------------
  logic               fire;
  logic [NEURONS-1:0] lif_spike;

  for (genvar n = 0; n < int'(NEURONS); n++) begin : g_lif
    lif_neuron #(.POT_W(POT_W), .THRESH(THRESH), .LEAK(LEAK), .REFRACT(REFRACT)) u_lif (
      .clk, .rst_n,
      .clear(sample_clear && step_ready),
      .integ_valid(syn_valid), .weight(syn_weight[n]),
      .fire, .spike(lif_spike[n]),
      .potential(), .refractory()
    );
  end

  // ---------------- output events ----------------
  logic enc_load, enc_ready, enc_busy;

  spike_encoder #(.NEURONS(NEURONS)) u_enc (
    .clk, .rst_n,
    .load(enc_load), .load_ready(enc_ready), .spikes_in(lif_spike),
    .out_valid, .out_ready, .out_addr,
    .busy(enc_busy)
  );

  // ---------------- time step sequencer ----------------
  assign step_ready = (state_q == S_IDLE);
  assign swap       = step_ready && step_start;
  assign xb_load    = (state_q == S_LOAD);
  assign fire       = (state_q == S_SCAN) && xb_done;
  assign enc_load   = (state_q == S_EMIT);
  assign step_done  = (state_q == S_WAIT) && !enc_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= S_IDLE;
      step_spikes <= '0;
    end else begin
      unique case (state_q)
        S_IDLE: if (step_start) state_q <= S_LOAD;
        S_LOAD: state_q <= S_SCAN;
        S_SCAN: if (xb_done) state_q <= S_EMIT;
        S_EMIT: begin
          step_spikes <= lif_spike;
          state_q     <= S_WAIT;
        end
        S_WAIT: if (!enc_busy) state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // The encoder has always drained the previous step when a new one emits.
  a_enc_free: assert property (@(posedge clk) disable iff (!rst_n)
                               enc_load |-> enc_ready);

endmodule
