// tb_lif_neuron: self-checking testbench of lif_neuron. It drives random
// sign-magnitude weights and end-of-step fire strobes and compares potential,
// spike and refractory state every cycle with a reference model written here
// (integer arithmetic, saturation at 16 bits, constant leak towards zero,
// reset to zero on a spike, REFRACT steps of refractory time). It also checks
// directed cases: a weight of 1.0 fires at once, spike is a one-cycle pulse
// the cycle after fire, and weights are ignored while refractory.
module tb_lif_neuron;
  import snn_pkg::*;

  localparam int THR = 128;
  localparam int LK  = 3;
  localparam int RF  = 2;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic clear = 1'b0, integ_valid = 1'b0, fire = 1'b0;
  weight_t weight = '0;
  logic spike, refractory;
  logic signed [15:0] potential;

  int checks = 0, failures = 0;
  int ref_pot = 0, ref_rc = 0;
  bit ref_spike = 0;
  int nspikes = 0, nrefr_drop = 0;

  lif_neuron #(.POT_W(16), .THRESH(16'(THR)), .LEAK(16'(LK)), .REFRACT(RF)) dut (
    .clk, .rst_n, .clear, .integ_valid, .weight, .fire,
    .spike, .potential, .refractory
  );

  always #5 clk = ~clk;

  function automatic int sm_val(weight_t w);
    return w[7] ? -int'(w[6:0]) : int'(w[6:0]);
  endfunction

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  // Reference model update for one clock edge.
  task automatic model_step();
    int l;
    if (clear) begin
      ref_pot = 0; ref_rc = 0; ref_spike = 0;
    end else if (fire) begin
      if (ref_pot > LK) l = ref_pot - LK;
      else if (ref_pot < -LK) l = ref_pot + LK;
      else l = 0;
      if (ref_rc == 0 && l >= THR) begin
        ref_spike = 1; ref_pot = 0; ref_rc = RF;
      end else begin
        ref_spike = 0; ref_pot = l;
        if (ref_rc != 0) ref_rc--;
      end
    end else begin
      ref_spike = 0;
      if (integ_valid) begin
        if (ref_rc == 0) begin
          ref_pot = ref_pot + sm_val(weight);
          if (ref_pot > 32767) ref_pot = 32767;
          if (ref_pot < -32768) ref_pot = -32768;
        end else nrefr_drop++;
      end
    end
  endtask

  task automatic cycle();
    model_step();
    @(posedge clk);
    #1;
    check("potential", int'(potential), ref_pot);
    check("spike", int'(spike), int'(ref_spike));
    check("refractory", int'(refractory), int'(ref_rc != 0));
    if (spike) nspikes++;
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // directed: 127/128 + 2/128, then fire with leak 3/128 -> no spike
    @(posedge clk); #1;
    integ_valid = 1; weight = 8'h7F; cycle();
    weight = 8'h02; cycle();       // 129
    integ_valid = 0; fire = 1; cycle();   // 129-3 = 126 < 128 -> no spike
    check("no spike below thr", int'(spike), 0);
    fire = 0; integ_valid = 1; weight = 8'h10; cycle();  // 142
    integ_valid = 0; fire = 1; cycle();   // 139 -> spike
    check("spike after fire", int'(spike), 1);
    fire = 0; cycle();
    check("spike is one cycle", int'(spike), 0);
    check("refractory set", int'(refractory), 1);
    integ_valid = 1; weight = 8'h7F; cycle();   // ignored
    check("refractory ignores", int'(potential), 0);
    integ_valid = 0;
    // negative weights: sign-magnitude 8'hAC = -44
    fire = 1; cycle(); cycle(); fire = 0;
    integ_valid = 1; weight = 8'hAC; cycle();
    check("sm negative", int'(potential), -44);
    integ_valid = 0; clear = 1; cycle(); clear = 0;
    check("clear", int'(potential), 0);
    // random phase
    for (int i = 0; i < 20000; i++) begin
      int r;
      r = $urandom_range(0, 99);
      integ_valid = (r < 70);
      fire        = (r >= 70 && r < 90);
      clear       = (r == 99) && ($urandom_range(0, 9) == 0);
      weight      = weight_t'($urandom);
      if ($urandom_range(0, 3) == 0) weight[7] = 1'b0;
      cycle();
    end
    integ_valid = 0; fire = 0; clear = 0;
    // saturation: drive a long run of +127
    clear = 1; cycle(); clear = 0;
    integ_valid = 1; weight = 8'h7F;
    repeat (300) cycle();
    check("saturation", int'(potential), 32767);
    integ_valid = 0;
    checks++;
    if (nspikes == 0 || nrefr_drop == 0) begin
      failures++;
      $display("FAIL coverage spikes=%0d refr_drop=%0d", nspikes, nrefr_drop);
    end
    $display("spikes=%0d weights dropped while refractory=%0d", nspikes, nrefr_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
