// tb_spike_encoder: self-checking testbench of spike_encoder at a reduced
// size (20 neurons). Random fired-neuron vectors are loaded; the receiver
// takes events with random back-pressure. The testbench checks that each
// fired neuron is sent exactly once, in ascending order, that an event held
// back by out_ready low stays unchanged, that load is refused while busy,
// and, with out_ready held high, that the k events take exactly k cycles.
module tb_spike_encoder;
  localparam int NEU = 20;

  logic clk = 1'b0, rst_n = 1'b0;
  logic load = 1'b0, load_ready, out_valid, out_ready = 1'b1, busy;
  logic [NEU-1:0] spikes_in = '0;
  logic [4:0] out_addr;

  int checks = 0, failures = 0, nstall = 0, nrefused = 0;

  spike_encoder #(.NEURONS(NEU)) dut (
    .clk, .rst_n, .load, .load_ready, .spikes_in,
    .out_valid, .out_ready, .out_addr, .busy
  );

  always #5 clk = ~clk;

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    for (int t = 0; t < 500; t++) begin
      logic [NEU-1:0] v, got;
      int k, last, cyc;
      bit bp, held;
      logic [4:0] held_addr;
      v = NEU'($urandom) & NEU'($urandom);
      if (t == 0) v = '0;
      if (t == 1) v = '1;
      k = $countones(v);
      bp = (t % 2 == 1);
      check("load_ready when idle", load_ready == 1'b1);
      spikes_in = v; load = 1;
      @(posedge clk); #1;
      load = 0;
      got = '0; last = -1; cyc = 0; held = 0; held_addr = '0;
      while (busy && cyc < 10000) begin
        check("valid while busy", out_valid == 1'b1);
        if (held) check("held event unchanged", out_addr == held_addr);
        out_ready = bp ? ($urandom_range(0, 2) == 0) : 1'b1;
        // a second load while busy must be ignored
        if ($urandom_range(0, 9) == 0) begin
          load = 1; spikes_in = '1; nrefused++;
          check("load_ready low while busy", load_ready == 1'b0);
        end
        if (out_ready) begin
          check("ascending", int'(out_addr) > last);
          check("only fired neurons", v[out_addr] == 1'b1);
          got[out_addr] = 1'b1;
          last = int'(out_addr);
          held = 0;
        end else begin
          held = 1; held_addr = out_addr; nstall++;
        end
        @(posedge clk); #1;
        load = 0;
        cyc++;
      end
      out_ready = 1;
      check("every fired neuron sent", got == v);
      if (!bp) check("one event per cycle", cyc == k);
    end
    check("back-pressure exercised", nstall > 0 && nrefused > 0);
    $display("stalled cycles=%0d refused loads=%0d", nstall, nrefused);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
