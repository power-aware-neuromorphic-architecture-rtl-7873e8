// tb_mnist_net: workload testbench. A 784:48:10 spiking network, the size
// of the MNIST network of the source design, runs on two neuro_core
// instances at their default sizes: core A holds the 784 x 48 hidden layer,
// core B the 48 x 10 output layer (its axons 0..47 and neurons 0..9; the
// other neurons get zero weights). Core A's output events feed core B's
// input port directly. Both cores start their time steps together, so core B
// processes in step t the hidden spikes core A produced in step t - 1 (the
// decoder's double buffer keeps the two steps apart).
//
// No MNIST data or trained weights are used. Instead there are ten random
// 120-pixel class patterns; each test image is its class pattern with 5 %
// of the pixels flipped, rate-coded as input spikes (probability 1/4 per
// step for a lit pixel, 1/100 otherwise). Hidden neuron j is tuned to class
// j mod 10 and output neuron c listens to the hidden neurons of class c, with
// random weight magnitudes, so the network classifies the images and the
// effect of each power setting on the answer can be seen.
//
// Every image (IMAGES per setting, STEPS time steps each, against up to 350
// in the source design; neurons cleared in between) is run under each
// supply setting of the source design's evaluation: normal operation
// (setting II-1), case 1 / setting III-1 at 0.8 V (m2, m3 at 0.8 V), setting
// II-2 (m3 gated), setting II-3 (m2, m3 gated), setting III-2 at 0.8 V (m1,
// m2 at 0.8 V, m3 gated), case 2 / setting III-3 at 0.8 V (m0 0.825 V, m1
// 0.8 V, m2, m3 gated) and case 3 (m0 0.825 V, m1 0.8 V, m2 0.8 V, m3
// gated). After each setting the supplies go back to nominal and the
// weights of dies that were gated are reloaded. Then come the voltage
// sweeps of the source design's evaluation:
//   - the top one, two, three and four dies undervolted together, at each
//     of 0.825, 0.8, 0.775, 0.75, 0.725 and 0.7 V;
//   - setting III-1: m2 and m3 swept from 0.8 V down to 0.675 V;
//   - setting III-2: m1 at 0.8 V, m2 swept, m3 gated;
//   - setting III-3: m0 at 0.825 V, m1 swept, m2 and m3 gated.
//
// The network is built twice. Copy 0 has perfect dies. Copy 1 has stuck-at
// fabrication defects on 10 % of the cells of its two upper dies (m2, m3),
// the worst die yield (0.9) of the defect study in the source design, read
// here as a 1 - 0.9 chance of a stuck cell. Both copies get the same weights,
// input events and supply settings and run their time steps together.
//
// All four cores are checked by core_scoreboard (exact spikes whenever the
// weights are known, output events, latency). The testbench also checks
// that the perfect network classifies every test image correctly in normal
// operation, and that it keeps all but at most one of its answers when only
// low-order bits are lost (case 1, m3 gated, m2 and m3 gated, m3 alone
// undervolted at any swept voltage). It prints, per copy and setting, how
// many images are classified correctly and the mean spike margin of the
// winning output neuron over the runner-up.
module tb_mnist_net;
  import snn_pkg::*;

  localparam int AX = 784, HID = 48, OUT = 10, CLASSES = 10;
  localparam int IMAGES = 10, STEPS = 100, NETS = 2;
  localparam int SETTINGS = 7 + 4 * 6 + 3 * 6;
  localparam int WATCHDOG = 40000000;
  localparam int AXW = $clog2(AX), NW = $clog2(HID);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  // shared drive: input events, weight writes, time steps, supplies
  logic in_valid = 1'b0;
  logic [AXW-1:0] in_addr = '0;
  logic a_wl_valid = 1'b0, b_wl_valid = 1'b0;
  logic [AXW-1:0] wl_axon = '0;
  logic [NW-1:0] wl_neuron = '0;
  weight_t wl_weight = '0;
  logic step_start = 1'b0, sample_clear = 1'b0, pwr_cfg_valid = 1'b0;
  layer_supply_t [NUM_LAYERS-1:0] pwr_cfg = '0;
  logic [NUM_LAYERS-1:0] reload_ack = '0;

  // per copy: A = hidden-layer core, B = output-layer core
  logic [NETS-1:0] a_step_ready, a_step_done, b_step_ready, b_step_done;
  logic [NETS-1:0] a_cfg_ready, b_cfg_ready, a_pwr_busy, b_pwr_busy;
  logic [NETS-1:0] b_out_valid;
  logic [NW-1:0] b_out_addr [NETS];
  layer_supply_t [NUM_LAYERS-1:0] a_vr [NETS], b_vr [NETS];
  logic [NUM_LAYERS-1:0] a_reload_req [NETS], b_reload_req [NETS];
  int sb_checks [NETS], sb_failures [NETS];

  for (genvar g = 0; g < NETS; g++) begin : g_net
    localparam int unsigned PPM = (g == 0) ? 0 : 100000;
    logic a_in_ready, a_bad, a_out_valid, a_wl_ready;
    logic [NW-1:0] a_out_addr;
    logic [HID-1:0] a_spikes, b_spikes;
    logic [NUM_LAYERS-1:0] a_die_on, b_die_on;
    power_mode_e a_mode, b_mode;
    logic b_in_ready, b_bad, b_wl_ready;
    logic [AXW-1:0] b_in_addr;

    assign b_in_addr = AXW'(a_out_addr);

    neuro_core #(.DEFECT_PPM(PPM), .SEED(3 + g)) core_a (
      .clk, .rst_n,
      .in_valid, .in_ready(a_in_ready), .in_addr, .in_bad_addr(a_bad),
      .out_valid(a_out_valid), .out_ready(b_in_ready), .out_addr(a_out_addr),
      .step_start, .step_ready(a_step_ready[g]), .step_done(a_step_done[g]),
      .sample_clear, .step_spikes(a_spikes),
      .wl_valid(a_wl_valid), .wl_ready(a_wl_ready), .wl_axon, .wl_neuron, .wl_weight,
      .pwr_cfg_valid, .pwr_cfg_ready(a_cfg_ready[g]), .pwr_cfg,
      .vr_supply(a_vr[g]), .die_on(a_die_on), .power_mode(a_mode), .pwr_busy(a_pwr_busy[g]),
      .reload_req(a_reload_req[g]), .reload_ack
    );

    neuro_core #(.DEFECT_PPM(PPM), .SEED(5 + g)) core_b (
      .clk, .rst_n,
      .in_valid(a_out_valid), .in_ready(b_in_ready), .in_addr(b_in_addr), .in_bad_addr(b_bad),
      .out_valid(b_out_valid[g]), .out_ready(1'b1), .out_addr(b_out_addr[g]),
      .step_start, .step_ready(b_step_ready[g]), .step_done(b_step_done[g]),
      .sample_clear, .step_spikes(b_spikes),
      .wl_valid(b_wl_valid), .wl_ready(b_wl_ready), .wl_axon, .wl_neuron, .wl_weight,
      .pwr_cfg_valid, .pwr_cfg_ready(b_cfg_ready[g]), .pwr_cfg,
      .vr_supply(b_vr[g]), .die_on(b_die_on), .power_mode(b_mode), .pwr_busy(b_pwr_busy[g]),
      .reload_req(b_reload_req[g]), .reload_ack
    );

    core_scoreboard #(.AXONS(AX), .NEURONS(HID), .DEFECT_PPM(PPM)) sb_a (
      .clk, .rst_n, .in_valid, .in_addr, .in_bad_addr(a_bad),
      .out_valid(a_out_valid), .out_ready(b_in_ready), .out_addr(a_out_addr),
      .step_start, .step_ready(a_step_ready[g]), .step_done(a_step_done[g]),
      .sample_clear, .step_spikes(a_spikes),
      .wl_valid(a_wl_valid), .wl_axon, .wl_neuron, .wl_weight,
      .vr_supply(a_vr[g]), .die_on(a_die_on), .power_mode(a_mode)
    );

    core_scoreboard #(.AXONS(AX), .NEURONS(HID), .DEFECT_PPM(PPM)) sb_b (
      .clk, .rst_n, .in_valid(a_out_valid), .in_addr(b_in_addr), .in_bad_addr(b_bad),
      .out_valid(b_out_valid[g]), .out_ready(1'b1), .out_addr(b_out_addr[g]),
      .step_start, .step_ready(b_step_ready[g]), .step_done(b_step_done[g]),
      .sample_clear, .step_spikes(b_spikes),
      .wl_valid(b_wl_valid), .wl_axon, .wl_neuron, .wl_weight,
      .vr_supply(b_vr[g]), .die_on(b_die_on), .power_mode(b_mode)
    );

    always_comb begin
      sb_checks[g]   = sb_a.checks + sb_b.checks;
      sb_failures[g] = sb_a.failures + sb_b.failures;
    end
  end

  int checks = 0, failures = 0;
  weight_t w_hid [AX][HID];
  weight_t w_out [HID][OUT];
  bit      pattern [CLASSES][AX];
  bit      image [IMAGES][AX];
  int      label [IMAGES];
  int      answer [NETS][SETTINGS][IMAGES];
  int      margin [NETS][SETTINGS][IMAGES];
  int      out_count [NETS][OUT];
  int      n_reloads = 0;
  string   set_name [SETTINGS];

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic tick();
    @(posedge clk); #1;
  endtask

  function automatic int total_checks();
    int n;
    n = checks;
    for (int g = 0; g < NETS; g++) n += sb_checks[g];
    return n;
  endfunction

  function automatic int total_failures();
    int n;
    n = failures;
    for (int g = 0; g < NETS; g++) n += sb_failures[g];
    return n;
  endfunction

  function automatic layer_supply_t sup(logic g, int v);
    layer_supply_t s;
    s.gate = g; s.vsel = 5'(v);
    return s;
  endfunction

  function automatic weight_t sm(bit neg, int mag);
    weight_t w;
    w[7] = neg && (mag != 0);
    w[6:0] = 7'(mag);
    return w;
  endfunction

  // hidden-layer weights to the A cores, output-layer weights to the B cores
  task automatic load_weights();
    for (int a = 0; a < AX; a++)
      for (int n = 0; n < HID; n++) begin
        a_wl_valid = 1; wl_axon = AXW'(a); wl_neuron = NW'(n); wl_weight = w_hid[a][n];
        tick();
      end
    a_wl_valid = 0;
    for (int a = 0; a < HID; a++)
      for (int n = 0; n < HID; n++) begin
        b_wl_valid = 1; wl_axon = AXW'(a); wl_neuron = NW'(n);
        wl_weight = (n < OUT) ? w_out[a][n] : '0;
        tick();
      end
    b_wl_valid = 0;
    tick();
  endtask

  task automatic set_power(layer_supply_t [NUM_LAYERS-1:0] cfg);
    int guard;
    logic [NUM_LAYERS-1:0] req;
    guard = 0;
    while (!(&a_cfg_ready && &b_cfg_ready) && guard < 10000) begin tick(); guard++; end
    pwr_cfg = cfg; pwr_cfg_valid = 1;
    tick();
    pwr_cfg_valid = 0;
    while ((|a_pwr_busy || |b_pwr_busy) && guard < 100000) begin tick(); guard++; end
    req = '0;
    for (int g = 0; g < NETS; g++) begin
      check("supplies applied", a_vr[g] == cfg && b_vr[g] == cfg);
      check("all cores ask for the same reload", a_reload_req[g] == a_reload_req[0] &&
                                                 b_reload_req[g] == a_reload_req[0]);
      req |= a_reload_req[g] | b_reload_req[g];
    end
    if (req != '0) begin
      load_weights();
      reload_ack = req;
      tick();
      reload_ack = '0;
      n_reloads++;
    end
    tick(); tick();
  endtask

  // One time step on all cores: input events of the image to the A cores,
  // then a common step_start; the B cores' output events are counted.
  task automatic run_step(int img, bit last);
    int guard;
    logic [NETS-1:0] seen_a, seen_b;
    for (int p = 0; p < AX; p++)
      if (($urandom_range(0, 99) < (image[img][p] ? 25 : 1)) && !last) begin
        in_valid = 1; in_addr = AXW'(p);
        tick();
      end
    in_valid = 0;
    guard = 0;
    while (!(&a_step_ready && &b_step_ready) && guard < 10000) begin tick(); guard++; end
    step_start = 1;
    tick();
    step_start = 0;
    seen_a = '0; seen_b = '0;
    while (!(&seen_a && &seen_b) && guard < 20000) begin
      // neurons OUT and up hold zero weights; with undervolted or defective
      // dies their weights pick up wrong bits, so their events are ignored
      for (int g = 0; g < NETS; g++)
        if (b_out_valid[g] && int'(b_out_addr[g]) < OUT) out_count[g][b_out_addr[g]]++;
      seen_a |= a_step_done;
      seen_b |= b_step_done;
      tick();
      guard++;
    end
    check("step finished", &seen_a && &seen_b);
  endtask

  task automatic run_image(int s, int img);
    while (!(&a_step_ready && &b_step_ready)) tick();
    sample_clear = 1; tick(); sample_clear = 0;
    foreach (out_count[g, c]) out_count[g][c] = 0;
    // one extra step with no input lets the B cores take the last hidden spikes
    for (int t = 0; t <= STEPS; t++) run_step(img, t == STEPS);
    for (int g = 0; g < NETS; g++) begin
      int best, second;
      best = 0;
      for (int c = 1; c < OUT; c++)
        if (out_count[g][c] > out_count[g][best]) best = c;
      second = 0;
      for (int c = 0; c < OUT; c++)
        if (c != best && out_count[g][c] > second) second = out_count[g][c];
      answer[g][s][img] = best;
      // margin: spikes of the winner minus spikes of the runner-up
      margin[g][s][img] = out_count[g][best] - second;
    end
  endtask

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", total_checks(), total_failures() + 1);
    $finish;
  end

  initial begin
    layer_supply_t [NUM_LAYERS-1:0] cfg [SETTINGS];
    int lsb_only [$] = '{1, 2, 3, 7, 8, 9, 10, 11, 12};
    // class patterns and test images
    for (int c = 0; c < CLASSES; c++) begin
      foreach (pattern[c][p]) pattern[c][p] = 0;
      for (int i = 0; i < 120; i++) pattern[c][$urandom_range(0, AX - 1)] = 1;
    end
    for (int i = 0; i < IMAGES; i++) begin
      label[i] = (i * 7 + 3) % CLASSES;
      for (int p = 0; p < AX; p++)
        image[i][p] = pattern[label[i]][p] ^ ($urandom_range(0, 99) < 5);
    end
    // hidden neuron j tuned to class j mod 10
    for (int a = 0; a < AX; a++)
      for (int j = 0; j < HID; j++)
        if (pattern[j % CLASSES][a]) w_hid[a][j] = sm(0, $urandom_range(8, 40));
        else if ($urandom_range(0, 99) < 30) w_hid[a][j] = sm(1, $urandom_range(1, 15));
        else w_hid[a][j] = '0;
    // output neuron c listens to the hidden neurons of class c
    for (int j = 0; j < HID; j++)
      for (int c = 0; c < OUT; c++)
        w_out[j][c] = (j % CLASSES == c) ? sm(0, $urandom_range(60, 100))
                                         : sm(1, $urandom_range(0, 6));

    set_name[0] = "normal (II-1)";
    set_name[1] = "case 1 / III-1 0.8V";
    set_name[2] = "II-2 m3 gated";
    set_name[3] = "II-3 m2,m3 gated";
    set_name[4] = "III-2 0.8V";
    set_name[5] = "case 2 / III-3 0.8V";
    set_name[6] = "case 3";
    cfg[0] = '0;
    cfg[1] = {sup(0, 12), sup(0, 12), sup(0, 0),  sup(0, 0)};
    cfg[2] = {sup(1, 0),  sup(0, 0),  sup(0, 0),  sup(0, 0)};
    cfg[3] = {sup(1, 0),  sup(1, 0),  sup(0, 0),  sup(0, 0)};
    cfg[4] = {sup(1, 0),  sup(0, 12), sup(0, 12), sup(0, 0)};
    cfg[5] = {sup(1, 0),  sup(1, 0),  sup(0, 12), sup(0, 11)};
    cfg[6] = {sup(1, 0),  sup(0, 12), sup(0, 12), sup(0, 11)};
    // undervolting sweep: the top 1..4 dies at 0.825 V down to 0.7 V
    for (int d = 1; d <= NUM_LAYERS; d++)
      for (int v = 11; v <= 16; v++) begin
        int s;
        s = 7 + (d - 1) * 6 + (v - 11);
        cfg[s] = '0;
        for (int l = NUM_LAYERS - d; l < NUM_LAYERS; l++) cfg[s][l] = sup(0, v);
        set_name[s] = $sformatf("m%0d..m3 at %0d mV", NUM_LAYERS - d, 1100 - 25 * v);
      end
    // settings III-1..III-3 with the swept dies at 0.8 V down to 0.675 V
    for (int k = 0; k < 3; k++)
      for (int v = 12; v <= 17; v++) begin
        int s;
        s = 7 + 24 + k * 6 + (v - 12);
        case (k)
          0: cfg[s] = {sup(0, v),  sup(0, v),  sup(0, 0),  sup(0, 0)};
          1: cfg[s] = {sup(1, 0),  sup(0, v),  sup(0, 12), sup(0, 0)};
          default: cfg[s] = {sup(1, 0),  sup(1, 0),  sup(0, v),  sup(0, 11)};
        endcase
        set_name[s] = $sformatf("III-%0d at %0d mV", k + 1, 1100 - 25 * v);
      end

    repeat (3) @(posedge clk);
    rst_n = 1;
    tick();
    load_weights();

    for (int s = 0; s < SETTINGS; s++) begin
      set_power(cfg[s]);
      for (int i = 0; i < IMAGES; i++) run_image(s, i);
      set_power('0);
    end

    // the perfect network works in normal operation
    for (int i = 0; i < IMAGES; i++)
      check("normal operation classifies the image", answer[0][0][i] == label[i]);
    for (int g = 0; g < NETS; g++)
      for (int s = 0; s < SETTINGS; s++) begin
        int same, msum;
        same = 0; msum = 0;
        for (int i = 0; i < IMAGES; i++) begin
          if (answer[g][s][i] == label[i]) same++;
          msum += margin[g][s][i];
        end
        $display("%s, %-22s: %0d of %0d images right, mean winner margin %0d spikes",
                 (g == 0) ? "perfect dies   " : "defective m2,m3", set_name[s], same, IMAGES,
                 msum / IMAGES);
      end
    // losing only low-order bits must not cost the perfect network its answers:
    // case 1, m3 gated, m2 and m3 gated, and m3 alone at every swept voltage
    foreach (lsb_only[k]) begin
      int same;
      same = 0;
      for (int i = 0; i < IMAGES; i++) if (answer[0][lsb_only[k]][i] == label[i]) same++;
      check($sformatf("low-order loss keeps the answers (%s)", set_name[lsb_only[k]]),
            same >= IMAGES - 1);
    end
    check("all power modes used", g_net[0].sb_a.n_mode_steps[0] > 0 && g_net[0].sb_a.n_mode_steps[1] > 0 &&
                                  g_net[0].sb_a.n_mode_steps[2] > 0 && g_net[0].sb_a.n_mode_steps[3] > 0);
    check("gated dies reloaded", n_reloads > 0);
    check("hidden spikes", g_net[0].sb_a.n_spikes > 0 && g_net[1].sb_a.n_spikes > 0);
    check("output spikes", g_net[0].sb_b.n_spikes > 0 && g_net[1].sb_b.n_spikes > 0);
    check("decided checks on all cores", g_net[0].sb_a.n_decided > 0 && g_net[0].sb_b.n_decided > 0 &&
                                         g_net[1].sb_a.n_decided > 0 && g_net[1].sb_b.n_decided > 0);
    $display("hidden spikes=%0d/%0d output spikes=%0d/%0d reloads=%0d",
             g_net[0].sb_a.n_spikes, g_net[1].sb_a.n_spikes,
             g_net[0].sb_b.n_spikes, g_net[1].sb_b.n_spikes, n_reloads);
    $display("TB_RESULT checks=%0d failures=%0d", total_checks(), total_failures());
    $finish;
  end

endmodule
