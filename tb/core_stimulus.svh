// core_stimulus.svh: stimulus shared by the neuro_core testbenches. It is
// included inside a testbench module that declares the core's input signals,
// the status signals listed below, the localparams AX, NEU, STEPS, WATCHDOG,
// a scoreboard instance sb_a for the first core, and the hooks sb_checks(),
// sb_failures() and extra_final_checks().
//
// Status signals expected: all_ready (every core's step_ready), done_vec
// (every core's step_done), a_out_valid/a_out_addr (first core's output
// events), a_cfg_ready, a_pwr_busy, a_reload_req, a_die_on.
//
// Sequence: load all weights; run time steps in normal mode, low-power mode
// I (m2, m3 at 0.8 V), mode II (m3 gated, then m2 and m3 gated), mode III
// (m0 0.825 V, m1 0.8 V, m2 and m3 gated), normal, mode III again (m1
// 0.8 V, m2 0.75 V, m3 gated) and normal, reloading the weights of dies
// that were gated.
// Each step gets a dozen random input events; some steps also get the
// previous step's output events looped back as inputs, an out-of-range
// event, or random back-pressure on the output events. Every few steps the
// neurons are cleared for a new sample.

  int st_checks = 0, st_failures = 0;
  int n_loop_events = 0, n_stall_steps = 0, n_reloads = 0, n_bottom_up = 0;
  int loop_q [$];
  weight_t wmat [AX][NEU];

  task automatic st_check(string what, bit ok);
    st_checks++;
    if (!ok) begin
      st_failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic layer_supply_t sup(logic g, int v);
    layer_supply_t s;
    s.gate = g; s.vsel = 5'(v);
    return s;
  endfunction

  task automatic tick();
    @(posedge clk); #1;
  endtask

  task automatic load_weights();
    for (int a = 0; a < AX; a++) begin
      for (int n = 0; n < NEU; n++) begin
        wl_valid = 1; wl_axon = $bits(wl_axon)'(a); wl_neuron = $bits(wl_neuron)'(n);
        wl_weight = wmat[a][n];
        tick();
      end
    end
    wl_valid = 0;
    tick(); tick();
  endtask

  // Apply a supply setting, check bottom-up restoration, reload if needed.
  task automatic set_power(layer_supply_t [NUM_LAYERS-1:0] cfg);
    int rise_order [$];
    logic [NUM_LAYERS-1:0] on_prev;
    int guard;
    guard = 0;
    while (!a_cfg_ready && guard < 10000) begin tick(); guard++; end
    pwr_cfg = cfg; pwr_cfg_valid = 1;
    on_prev = a_die_on;
    tick();
    pwr_cfg_valid = 0;
    while (a_pwr_busy && guard < 100000) begin
      for (int l = 0; l < NUM_LAYERS; l++)
        if (a_die_on[l] && !on_prev[l]) rise_order.push_back(l);
      on_prev = a_die_on;
      tick(); guard++;
    end
    for (int l = 0; l < NUM_LAYERS; l++)
      if (a_die_on[l] && !on_prev[l]) rise_order.push_back(l);
    for (int i = 1; i < rise_order.size(); i++)
      st_check("dies restored bottom-up", rise_order[i] > rise_order[i-1]);
    if (rise_order.size() >= 2) n_bottom_up++;
    if (a_reload_req != '0) begin
      load_weights();
      reload_ack = a_reload_req;
      tick();
      reload_ack = '0;
      n_reloads++;
    end
    tick(); tick(); tick();
  endtask

  task automatic send_event(int addr);
    in_valid = 1; in_addr = $bits(in_addr)'(addr);
    tick();
    in_valid = 0;
  endtask

  task automatic run_step(bit stall, bit loopback, bit bad, bit clear);
    int guard;
    logic [$bits(done_vec)-1:0] seen;
    if (clear) begin
      while (!all_ready) tick();
      sample_clear = 1; tick(); sample_clear = 0;
    end
    for (int i = 0; i < 12; i++) send_event($urandom_range(0, AX - 1));
    if (loopback) begin
      foreach (loop_q[i]) if (loop_q[i] < AX) begin
        send_event(loop_q[i]);
        n_loop_events++;
      end
    end
    if (bad) send_event(AX + $urandom_range(0, (1 << $bits(in_addr)) - AX - 1));
    loop_q.delete();
    guard = 0;
    while (!all_ready && guard < 10000) begin tick(); guard++; end
    step_start = 1;
    tick();
    step_start = 0;
    seen = '0;
    if (stall) n_stall_steps++;
    while (seen != '1 && guard < 100000) begin
      out_ready = stall ? ($urandom_range(0, 2) == 0) : 1'b1;
      #1;
      if (a_out_valid && out_ready) loop_q.push_back(int'(a_out_addr));
      seen |= done_vec;
      tick();
      guard++;
    end
    out_ready = 1;
    st_check("step finished", seen == '1);
  endtask

  task automatic run_phase(int steps);
    for (int t = 0; t < steps; t++)
      run_step((t % 4) == 3, (t % 3) == 1, (t % 5) == 2, (t % 8) == 0);
  endtask

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", st_checks + sb_checks(), st_failures + sb_failures() + 1);
    $finish;
  end

  initial begin
    rst_n = 0; in_valid = 0; in_addr = '0; step_start = 0; sample_clear = 0;
    wl_valid = 0; wl_axon = '0; wl_neuron = '0; wl_weight = '0;
    pwr_cfg_valid = 0; pwr_cfg = '0; reload_ack = '0; out_ready = 1;
    for (int a = 0; a < AX; a++)
      for (int n = 0; n < NEU; n++) begin
        weight_t w;
        w[6:0] = 7'($urandom_range(0, 48));
        w[7]   = ($urandom_range(0, 3) == 0);
        wmat[a][n] = w;
      end
    repeat (3) @(posedge clk);
    rst_n = 1;
    tick();
    load_weights();
    // normal operation
    run_phase(STEPS);
    // low-power mode I: m2, m3 at 0.8 V
    set_power({sup(0, 12), sup(0, 12), sup(0, 0), sup(0, 0)});
    run_phase(STEPS);
    // low-power mode II: m3 gated, then m2 and m3 gated
    set_power({sup(1, 0), sup(0, 0), sup(0, 0), sup(0, 0)});
    run_phase(STEPS);
    set_power({sup(1, 0), sup(1, 0), sup(0, 0), sup(0, 0)});
    run_phase(STEPS);
    // low-power mode III: m0 0.825 V, m1 0.8 V, m2 and m3 gated
    set_power({sup(1, 0), sup(1, 0), sup(0, 12), sup(0, 11)});
    run_phase(STEPS);
    // back to normal: m0..m3 restored bottom-up, m2 and m3 reloaded
    set_power('0);
    run_phase(STEPS);
    // low-power mode III: m1 0.8 V, m2 0.75 V, m3 gated
    set_power({sup(1, 0), sup(0, 14), sup(0, 12), sup(0, 0)});
    run_phase(STEPS);
    // back to normal: restore bottom-up, reload the gated dies
    set_power('0);
    run_phase(STEPS);

    // every mechanism must have happened
    st_check("normal-mode steps", sb_a.n_mode_steps[0] > 0);
    st_check("mode I steps", sb_a.n_mode_steps[1] > 0);
    st_check("mode II steps", sb_a.n_mode_steps[2] > 0);
    st_check("mode III steps", sb_a.n_mode_steps[3] > 0);
    st_check("steps with uncertain weights", sb_a.n_lossy_steps > 0);
    st_check("output back-pressure", sb_a.n_stall > 0);
    st_check("latency checked", sb_a.n_latency_checked > 0);
    st_check("refractory drops", sb_a.n_refr_drop > 0);
    st_check("bad addresses flagged", sb_a.n_bad_sent > 0 && sb_a.n_bad_seen == sb_a.n_bad_sent);
    st_check("loopback events", n_loop_events > 0);
    st_check("bottom-up restore", n_bottom_up > 0);
    st_check("reload after gating", n_reloads > 0);
    st_check("spikes", sb_a.n_spikes > 0);
    st_check("decided checks", sb_a.n_decided > 0);
    extra_final_checks();
    $display("steps N/I/II/III=%0d/%0d/%0d/%0d stalls=%0d refr_drops=%0d bad=%0d loop=%0d bottom_up=%0d reloads=%0d spikes=%0d decided=%0d undecided=%0d",
             sb_a.n_mode_steps[0], sb_a.n_mode_steps[1], sb_a.n_mode_steps[2], sb_a.n_mode_steps[3],
             sb_a.n_stall, sb_a.n_refr_drop, sb_a.n_bad_seen, n_loop_events, n_bottom_up, n_reloads,
             sb_a.n_spikes, sb_a.n_decided, sb_a.n_undecided);
    $display("TB_RESULT checks=%0d failures=%0d", st_checks + sb_checks(), st_failures + sb_failures());
    $finish;
  end
