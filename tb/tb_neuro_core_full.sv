// tb_neuro_core_full: end-to-end testbench of neuro_core with every
// parameter at its default: 784 input axons, 48 LIF neurons, four 2-bit
// memory dies of 784 x 96 bits, 16-cycle rail settling, perfect dies. It runs
// the shared stimulus (core_stimulus.svh): all 37,632 weights loaded through
// the broadcast write, time steps in normal mode and in low-power modes I,
// II and III, bottom-up restoration with full weight reload, output
// back-pressure, looped-back output events and out-of-range input events,
// all checked by core_scoreboard.
module tb_neuro_core_full;
  import snn_pkg::*;

  localparam int AX = 784, NEU = 48, STEPS = 16, WATCHDOG = 2000000;
  localparam int AXW = $clog2(AX), NW = $clog2(NEU);

  logic clk = 1'b0, rst_n;
  logic in_valid, step_start, sample_clear, wl_valid, pwr_cfg_valid, out_ready;
  logic [AXW-1:0] in_addr, wl_axon;
  logic [NW-1:0] wl_neuron;
  weight_t wl_weight;
  layer_supply_t [NUM_LAYERS-1:0] pwr_cfg;
  logic [NUM_LAYERS-1:0] reload_ack;

  logic a_in_ready, a_bad, a_out_valid, a_step_ready, a_step_done, a_wl_ready;
  logic a_cfg_ready, a_pwr_busy;
  logic [NW-1:0] a_out_addr;
  logic [NEU-1:0] a_spikes;
  layer_supply_t [NUM_LAYERS-1:0] a_vr;
  logic [NUM_LAYERS-1:0] a_die_on, a_reload_req;
  power_mode_e a_mode;

  logic all_ready;
  logic [0:0] done_vec;

  always #5 clk = ~clk;

  neuro_core dut (
    .clk, .rst_n,
    .in_valid, .in_ready(a_in_ready), .in_addr, .in_bad_addr(a_bad),
    .out_valid(a_out_valid), .out_ready, .out_addr(a_out_addr),
    .step_start, .step_ready(a_step_ready), .step_done(a_step_done),
    .sample_clear, .step_spikes(a_spikes),
    .wl_valid, .wl_ready(a_wl_ready), .wl_axon, .wl_neuron, .wl_weight,
    .pwr_cfg_valid, .pwr_cfg_ready(a_cfg_ready), .pwr_cfg,
    .vr_supply(a_vr), .die_on(a_die_on), .power_mode(a_mode), .pwr_busy(a_pwr_busy),
    .reload_req(a_reload_req), .reload_ack
  );

  core_scoreboard #(.AXONS(AX), .NEURONS(NEU)) sb_a (
    .clk, .rst_n, .in_valid, .in_addr, .in_bad_addr(a_bad),
    .out_valid(a_out_valid), .out_ready, .out_addr(a_out_addr),
    .step_start, .step_ready(a_step_ready), .step_done(a_step_done),
    .sample_clear, .step_spikes(a_spikes),
    .wl_valid, .wl_axon, .wl_neuron, .wl_weight,
    .vr_supply(a_vr), .die_on(a_die_on), .power_mode(a_mode)
  );

  assign all_ready = a_step_ready;
  assign done_vec  = a_step_done;

  function automatic int sb_checks();
    return sb_a.checks;
  endfunction
  function automatic int sb_failures();
    return sb_a.failures;
  endfunction

  task automatic extra_final_checks();
    st_check("weights in use", sb_a.n_steps > 0);
  endtask

  `include "core_stimulus.svh"

endmodule
