// core_scoreboard: reference model and checker for one neuro_core, used by
// the core testbenches. It watches only the core's ports.
//
// It keeps its own copy of the weight subsets held by each die (a broadcast
// write reaches a die only if the die is on when the write lands, one cycle
// after the request), collects the input events of each time step the way
// the decoder does, and when a step starts computes the expected spikes with
// a LIF model that carries an interval [lo, hi] per neuron instead of one
// value. A die that is gated contributes known zeros; a die that runs below
// 0.85 V, or that is declared defective, contributes unknown bits, which
// widen the weight interval. A neuron whose spike cannot be decided is left
// unchecked until the next sample_clear; all others are checked exactly.
//
// At step_done it checks: step_spikes against the model, the output events
// of the step (each fired neuron once, ascending), and, when the receiver
// never stalled, the step latency of k + f + 5 cycles (f + 4 with no input
// spike). It also counts the mechanisms it saw: steps per power mode,
// stalled cycles, refractory drops, bad input addresses, undecided neurons.
module core_scoreboard
  import snn_pkg::*;
#(
  parameter int unsigned        AXONS       = 784,
  parameter int unsigned        NEURONS     = 48,
  parameter int                 THRESH      = 128,
  parameter int                 LEAK        = 1,
  parameter int                 REFRACT     = 1,
  parameter int unsigned        DEFECT_PPM  = 0,
  parameter logic [NUM_LAYERS-1:0] DEFECT_DIES = 4'b1100,
  localparam int unsigned AXON_W   = (AXONS < 2) ? 1 : $clog2(AXONS),
  localparam int unsigned NEURON_W = (NEURONS < 2) ? 1 : $clog2(NEURONS)
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           in_valid,
  input  logic [AXON_W-1:0]              in_addr,
  input  logic                           in_bad_addr,
  input  logic                           out_valid,
  input  logic                           out_ready,
  input  logic [NEURON_W-1:0]            out_addr,
  input  logic                           step_start,
  input  logic                           step_ready,
  input  logic                           step_done,
  input  logic                           sample_clear,
  input  logic [NEURONS-1:0]             step_spikes,
  input  logic                           wl_valid,
  input  logic [AXON_W-1:0]              wl_axon,
  input  logic [NEURON_W-1:0]            wl_neuron,
  input  weight_t                        wl_weight,
  input  layer_supply_t [NUM_LAYERS-1:0] vr_supply,
  input  logic          [NUM_LAYERS-1:0] die_on,
  input  power_mode_e                    power_mode
);

  int checks = 0, failures = 0;
  int n_steps = 0, n_mode_steps [4] = '{default: 0};
  int n_stall = 0, n_refr_drop = 0, n_bad_sent = 0, n_bad_seen = 0;
  int n_undecided = 0, n_decided = 0, n_spikes = 0, n_latency_checked = 0;
  int n_lossy_steps = 0;

  logic [LAYER_BITS-1:0] sh [NUM_LAYERS][AXONS][NEURONS];
  logic [AXONS-1:0] collect, active;
  int lo [NEURONS], hi [NEURONS], rc [NEURONS];
  bit det [NEURONS];
  logic [NEURONS-1:0] exp_spk, got_evt;
  int last_evt, t_start, cycle, k_act, stalls_in_step;
  bit in_step;

  logic          wp_v;
  logic [AXON_W-1:0] wp_a;
  logic [NEURON_W-1:0] wp_n;
  weight_t       wp_w;

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL [%m] %s at %0t", what, $time);
    end
  endtask

  function automatic int lk(int v);
    if (v > LEAK) return v - LEAK;
    if (v < -LEAK) return v + LEAK;
    return 0;
  endfunction

  function automatic int sat(int v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return v;
  endfunction

  // Interval of one weight given the die states.
  task automatic w_range(int a, int n, output int wlo, output int whi);
    logic [7:0] kv, unk;
    int mmin, mmax;
    kv = '0; unk = '0;
    for (int l = 0; l < NUM_LAYERS; l++) begin
      int top;
      top = WEIGHT_BITS - 1 - l * LAYER_BITS;
      if (vr_supply[l].gate || !die_on[l]) begin
        kv[top -: LAYER_BITS] = '0;
      end else if (supply_mv(vr_supply[l]) < 850 || (DEFECT_PPM != 0 && DEFECT_DIES[l])) begin
        unk[top -: LAYER_BITS] = '1;
      end else begin
        kv[top -: LAYER_BITS] = sh[l][a][n];
      end
    end
    mmin = int'(kv[6:0] & ~unk[6:0]);
    mmax = int'(kv[6:0] | unk[6:0]);
    if (unk[7]) begin wlo = -mmax; whi = mmax; end
    else if (kv[7]) begin wlo = -mmax; whi = -mmin; end
    else begin wlo = mmin; whi = mmax; end
  endtask

  task automatic eval_step();
    bit lossy;
    lossy = 0;
    for (int n = 0; n < int'(NEURONS); n++) begin
      int slo, shi, llo, lhi;
      slo = lo[n]; shi = hi[n];
      for (int a = 0; a < int'(AXONS); a++) begin
        if (active[a]) begin
          if (rc[n] == 0) begin
            int wlo, whi;
            w_range(a, n, wlo, whi);
            if (wlo != whi) lossy = 1;
            slo = sat(slo + wlo); shi = sat(shi + whi);
          end else begin
            n_refr_drop++;
          end
        end
      end
      llo = lk(slo); lhi = lk(shi);
      exp_spk[n] = 1'b0;
      if (rc[n] != 0) begin
        lo[n] = llo; hi[n] = lhi; rc[n]--;
      end else if (llo >= THRESH) begin
        exp_spk[n] = 1'b1; lo[n] = 0; hi[n] = 0; rc[n] = REFRACT;
      end else if (lhi < THRESH) begin
        lo[n] = llo; hi[n] = lhi;
      end else begin
        det[n] = 0;   // spike undecidable: stop checking this neuron
      end
    end
    if (lossy) n_lossy_steps++;
  endtask

  initial begin
    for (int n = 0; n < int'(NEURONS); n++) begin
      lo[n] = 0; hi[n] = 0; rc[n] = 0; det[n] = 1;
    end
    collect = '0; active = '0; in_step = 0; cycle = 0; wp_v = 0;
    exp_spk = '0; got_evt = '0; last_evt = -1; t_start = 0; k_act = 0;
    stalls_in_step = 0;
  end

  always @(posedge clk) begin
    cycle++;
    if (rst_n) begin
      // weight writes land one cycle after the request
      if (wp_v)
        for (int l = 0; l < NUM_LAYERS; l++)
          if (die_on[l]) sh[l][wp_a][wp_n] = wp_w[WEIGHT_BITS-1-l*LAYER_BITS -: LAYER_BITS];
      wp_v = wl_valid && wl_axon < AXON_W'(AXONS) && wl_neuron < NEURON_W'(NEURONS);
      wp_a = wl_axon; wp_n = wl_neuron; wp_w = wl_weight;

      if (in_bad_addr) n_bad_seen++;
      if (in_valid && in_addr >= AXON_W'(AXONS)) n_bad_sent++;

      if (sample_clear && step_ready) begin
        for (int n = 0; n < int'(NEURONS); n++) begin
          lo[n] = 0; hi[n] = 0; rc[n] = 0; det[n] = 1;
        end
      end

      if (in_step) begin
        if (out_valid && !out_ready) begin n_stall++; stalls_in_step++; end
        if (out_valid && out_ready) begin
          check("event order", int'(out_addr) > last_evt);
          check("event of a fired neuron", exp_spk[out_addr] == 1'b1 || !det[out_addr]);
          got_evt[out_addr] = 1'b1;
          last_evt = int'(out_addr);
        end
        if (step_done) begin
          int f;
          in_step = 0;
          f = $countones(step_spikes);
          n_spikes += f;
          check("events match step_spikes", got_evt == step_spikes);
          for (int n = 0; n < int'(NEURONS); n++) begin
            if (det[n]) begin
              n_decided++;
              check("spike matches model", step_spikes[n] == exp_spk[n]);
            end else n_undecided++;
          end
          if (stalls_in_step == 0) begin
            n_latency_checked++;
            check("step latency", (cycle - t_start) == ((k_act == 0) ? f + 4 : k_act + f + 5));
          end
        end
      end

      if (step_start && step_ready) begin
        active = collect;
        collect = '0;
        k_act = $countones(active);
        n_steps++;
        n_mode_steps[int'(power_mode)]++;
        eval_step();
        in_step = 1; t_start = cycle; got_evt = '0; last_evt = -1; stalls_in_step = 0;
      end
      if (in_valid && in_addr < AXON_W'(AXONS)) collect[in_addr] = 1'b1;
    end
  end

endmodule
