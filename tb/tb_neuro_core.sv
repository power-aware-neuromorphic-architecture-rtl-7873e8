// tb_neuro_core: end-to-end testbench of neuro_core at a reduced size
// (60 input axons, 12 neurons, 4 dies, 4-cycle rail settling). Two cores run
// the same stimulus (core_stimulus.svh): core A has perfect dies, core B has
// 3 % stuck-at cells in its two upper dies (m2, m3), the defects the design
// is meant to tolerate. A core_scoreboard checks each core: exact spikes
// where every weight bit is known (normal mode, gated dies, and for core B
// also whenever m2 and m3 are gated, which hides their defects), interval
// bounds where dies are undervolted or defective, output events, step
// latency, and it counts every mechanism. The run covers normal mode, the
// three low-power modes, bottom-up restoration with weight reload,
// output back-pressure, looped-back output events and bad input addresses.
module tb_neuro_core;
  import snn_pkg::*;

  localparam int AX = 60, NEU = 12, STEPS = 24, WATCHDOG = 400000;
  localparam int AXW = $clog2(AX), NW = $clog2(NEU);

  logic clk = 1'b0, rst_n;
  logic in_valid, step_start, sample_clear, wl_valid, pwr_cfg_valid, out_ready;
  logic [AXW-1:0] in_addr, wl_axon;
  logic [NW-1:0] wl_neuron;
  weight_t wl_weight;
  layer_supply_t [NUM_LAYERS-1:0] pwr_cfg;
  logic [NUM_LAYERS-1:0] reload_ack;

  // core A
  logic a_in_ready, a_bad, a_out_valid, a_step_ready, a_step_done, a_wl_ready;
  logic a_cfg_ready, a_pwr_busy;
  logic [NW-1:0] a_out_addr;
  logic [NEU-1:0] a_spikes;
  layer_supply_t [NUM_LAYERS-1:0] a_vr;
  logic [NUM_LAYERS-1:0] a_die_on, a_reload_req;
  power_mode_e a_mode;
  // core B
  logic b_in_ready, b_bad, b_out_valid, b_step_ready, b_step_done, b_wl_ready;
  logic b_cfg_ready, b_pwr_busy;
  logic [NW-1:0] b_out_addr;
  logic [NEU-1:0] b_spikes;
  layer_supply_t [NUM_LAYERS-1:0] b_vr;
  logic [NUM_LAYERS-1:0] b_die_on, b_reload_req;
  power_mode_e b_mode;

  logic all_ready;
  logic [1:0] done_vec;

  always #5 clk = ~clk;

  neuro_core #(.AXONS(AX), .NEURONS(NEU), .SETTLE_CYCLES(4)) dut_a (
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

  neuro_core #(.AXONS(AX), .NEURONS(NEU), .SETTLE_CYCLES(4),
               .DEFECT_PPM(30000), .DEFECT_DIES(4'b1100), .SEED(5)) dut_b (
    .clk, .rst_n,
    .in_valid, .in_ready(b_in_ready), .in_addr, .in_bad_addr(b_bad),
    .out_valid(b_out_valid), .out_ready, .out_addr(b_out_addr),
    .step_start, .step_ready(b_step_ready), .step_done(b_step_done),
    .sample_clear, .step_spikes(b_spikes),
    .wl_valid, .wl_ready(b_wl_ready), .wl_axon, .wl_neuron, .wl_weight,
    .pwr_cfg_valid, .pwr_cfg_ready(b_cfg_ready), .pwr_cfg,
    .vr_supply(b_vr), .die_on(b_die_on), .power_mode(b_mode), .pwr_busy(b_pwr_busy),
    .reload_req(b_reload_req), .reload_ack
  );

  core_scoreboard #(.AXONS(AX), .NEURONS(NEU)) sb_a (
    .clk, .rst_n, .in_valid, .in_addr, .in_bad_addr(a_bad),
    .out_valid(a_out_valid), .out_ready, .out_addr(a_out_addr),
    .step_start, .step_ready(a_step_ready), .step_done(a_step_done),
    .sample_clear, .step_spikes(a_spikes),
    .wl_valid, .wl_axon, .wl_neuron, .wl_weight,
    .vr_supply(a_vr), .die_on(a_die_on), .power_mode(a_mode)
  );

  core_scoreboard #(.AXONS(AX), .NEURONS(NEU), .DEFECT_PPM(30000), .DEFECT_DIES(4'b1100)) sb_b (
    .clk, .rst_n, .in_valid, .in_addr, .in_bad_addr(b_bad),
    .out_valid(b_out_valid), .out_ready, .out_addr(b_out_addr),
    .step_start, .step_ready(b_step_ready), .step_done(b_step_done),
    .sample_clear, .step_spikes(b_spikes),
    .wl_valid, .wl_axon, .wl_neuron, .wl_weight,
    .vr_supply(b_vr), .die_on(b_die_on), .power_mode(b_mode)
  );

  assign all_ready  = a_step_ready && b_step_ready;
  assign done_vec   = {b_step_done, a_step_done};

  function automatic int sb_checks();
    return sb_a.checks + sb_b.checks;
  endfunction
  function automatic int sb_failures();
    return sb_a.failures + sb_b.failures;
  endfunction

  task automatic extra_final_checks();
    st_check("defective core ran every step", sb_b.n_steps == sb_a.n_steps);
    st_check("defects widened the model", sb_b.n_lossy_steps > sb_a.n_lossy_steps);
    st_check("same mode in both cores", sb_b.n_mode_steps == sb_a.n_mode_steps);
    $display("core B: spikes=%0d decided=%0d undecided=%0d", sb_b.n_spikes, sb_b.n_decided, sb_b.n_undecided);
  endtask

  `include "core_stimulus.svh"

endmodule
