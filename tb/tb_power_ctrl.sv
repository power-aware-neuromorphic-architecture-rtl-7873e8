// tb_power_ctrl: self-checking testbench of power_ctrl (4 dies,
// SETTLE_CYCLES = 5). It walks through the operating settings of the design:
// low-power mode I (m2, m3 at 0.8 V), mode II (m3 gated, then m2 and m3
// gated), mode III (m2, m3 gated, m1 at 0.8 V, m0 at 0.825 V) and back to
// normal, plus random settings. For each it checks that lowering supplies
// take effect in the edge after the setting is taken, that raised supplies
// are restored one die at a time from m0 upwards with SETTLE_CYCLES + 1
// cycles per die, that a gated die is reported off at once and on only after
// its rail settles, that reload requests appear exactly for dies coming back
// from gating and clear on acknowledge, and that the reported mode matches
// the supplies.
module tb_power_ctrl;
  import snn_pkg::*;

  localparam int SETTLE = 5;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cfg_valid = 1'b0, cfg_ready, busy;
  layer_supply_t [NUM_LAYERS-1:0] cfg_target = '0, vr_supply;
  logic [NUM_LAYERS-1:0] die_on, reload_req, reload_ack = '0;
  power_mode_e mode;

  int checks = 0, failures = 0;
  int n_mode [4] = '{default: 0};
  int n_restores = 0;

  power_ctrl #(.SETTLE_CYCLES(SETTLE)) dut (
    .clk, .rst_n, .cfg_valid, .cfg_ready, .cfg_target,
    .vr_supply, .die_on, .mode, .busy, .reload_req, .reload_ack
  );

  always #5 clk = ~clk;

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic layer_supply_t sup(logic g, int v);
    layer_supply_t s;
    s.gate = g; s.vsel = 5'(v);
    return s;
  endfunction

  function automatic power_mode_e exp_mode(layer_supply_t [NUM_LAYERS-1:0] s);
    bit sc, gt;
    sc = 0; gt = 0;
    for (int i = 0; i < NUM_LAYERS; i++) begin
      if (s[i].gate) gt = 1;
      else if (s[i].vsel != 0) sc = 1;
    end
    if (sc && gt) return MODE_LP3;
    if (gt) return MODE_LP2;
    if (sc) return MODE_LP1;
    return MODE_NORMAL;
  endfunction

  // Apply one setting and check the whole transition against the rules.
  task automatic apply(layer_supply_t [NUM_LAYERS-1:0] tgt);
    layer_supply_t [NUM_LAYERS-1:0] prev_sup;
    logic [NUM_LAYERS-1:0] up, was_off, req_before;
    int nup, cyc;
    prev_sup = vr_supply;
    req_before = reload_req;
    up = '0; was_off = '0;
    for (int i = 0; i < NUM_LAYERS; i++) begin
      up[i] = supply_mv(tgt[i]) > supply_mv(prev_sup[i]);
      was_off[i] = !die_on[i];
    end
    nup = $countones(up);
    check("cfg_ready when idle", cfg_ready == 1'b1);
    cfg_target = tgt; cfg_valid = 1;
    @(posedge clk); #1;
    cfg_valid = 0;
    // lowered or unchanged dies: immediate
    for (int i = 0; i < NUM_LAYERS; i++) begin
      if (!up[i]) begin
        check("down at once", vr_supply[i] == tgt[i]);
        if (tgt[i].gate) check("gated die off at once", die_on[i] == 1'b0);
      end else begin
        check("up waits", vr_supply[i] == prev_sup[i]);
      end
    end
    // raised dies: bottom-up, one at a time
    cyc = 1;
    for (int i = 0; i < NUM_LAYERS; i++) begin
      if (up[i]) begin
        // all lower raised dies are done, higher ones not yet started
        for (int j = i + 1; j < NUM_LAYERS; j++)
          if (up[j]) check("higher die not started", vr_supply[j] == prev_sup[j]);
        check("busy while restoring", busy == 1'b1 && cfg_ready == 1'b0);
        @(posedge clk); #1; cyc++;                 // die i rail starts
        check("die i commanded", vr_supply[i] == tgt[i]);
        if (was_off[i]) check("not on before it settles", die_on[i] == 1'b0);
        repeat (SETTLE) begin
          @(posedge clk); #1; cyc++;
        end
        check("die on after settle", die_on[i] == 1'b1);
        if (was_off[i]) begin
          check("reload requested", reload_req[i] == 1'b1);
          n_restores++;
        end
      end
    end
    check("restore time", cyc == 1 + nup * (SETTLE + 1));
    check("idle after restore", busy == 1'b0 && cfg_ready == 1'b1);
    check("all at target", vr_supply == tgt);
    for (int i = 0; i < NUM_LAYERS; i++)
      check("die_on matches gating", die_on[i] == !tgt[i].gate);
    check("mode", mode == exp_mode(tgt));
    n_mode[int'(mode)]++;
    // acknowledge reloads
    reload_ack = reload_req;
    @(posedge clk); #1;
    reload_ack = '0;
    check("reload cleared", reload_req == '0);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    check("reset nominal", vr_supply == '0 && die_on == '1 && mode == MODE_NORMAL);
    // mode I: m2, m3 at 0.8 V
    apply({sup(0, 12), sup(0, 12), sup(0, 0), sup(0, 0)});
    // mode II: m3 gated, then m2 and m3 gated
    apply({sup(1, 0), sup(0, 0), sup(0, 0), sup(0, 0)});
    apply({sup(1, 0), sup(1, 0), sup(0, 0), sup(0, 0)});
    // mode III: m0 0.825 V, m1 0.8 V, m2 m3 gated
    apply({sup(1, 0), sup(1, 0), sup(0, 12), sup(0, 11)});
    // back to normal: all four restored bottom-up
    apply('0);
    // random settings
    for (int t = 0; t < 200; t++) begin
      layer_supply_t [NUM_LAYERS-1:0] r;
      for (int i = 0; i < NUM_LAYERS; i++)
        r[i] = sup(($urandom_range(0, 3) == 0), ($urandom_range(0, 1) == 0) ? 0 : $urandom_range(1, 17));
      apply(r);
    end
    check("all modes seen", n_mode[0] > 0 && n_mode[1] > 0 && n_mode[2] > 0 && n_mode[3] > 0);
    check("restores seen", n_restores > 0);
    $display("modes N/I/II/III = %0d/%0d/%0d/%0d restores=%0d",
             n_mode[0], n_mode[1], n_mode[2], n_mode[3], n_restores);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
