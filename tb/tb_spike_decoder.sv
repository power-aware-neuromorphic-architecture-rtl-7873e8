// tb_spike_decoder: self-checking testbench of spike_decoder at a reduced
// size (40 axons). Random event streams, including repeated and out-of-range
// axon indices, are sent while swap strobes mark time-step boundaries at
// random. A reference set kept here collects the events of each step; after
// every swap the decoder's vector must equal the set of the step just closed
// (events in the swap cycle count for the next step), it must hold until the
// next swap, and every out-of-range event must raise bad_addr once.
module tb_spike_decoder;
  localparam int AX = 40;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_ready, swap = 1'b0, bad_addr;
  logic [5:0] in_addr = '0;
  logic [AX-1:0] spikes_out;

  logic [AX-1:0] ref_collect, ref_out;
  int checks = 0, failures = 0, nbad_sent = 0, nbad_seen = 0, nswaps = 0;

  spike_decoder #(.AXONS(AX)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_addr, .swap, .spikes_out, .bad_addr
  );

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_collect = '0; ref_out = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    for (int i = 0; i < 20000; i++) begin
      in_valid = ($urandom_range(0, 2) != 0);
      in_addr  = ($urandom_range(0, 30) == 0) ? 6'(AX + $urandom_range(0, 23))
                                              : 6'($urandom_range(0, AX - 1));
      swap     = ($urandom_range(0, 24) == 0);
      // reference update for this edge
      if (swap) begin
        ref_out = ref_collect;
        ref_collect = '0;
        nswaps++;
      end
      if (in_valid && in_addr < AX) ref_collect[in_addr] = 1'b1;
      if (in_valid && in_addr >= AX) nbad_sent++;
      checks++;
      if (!in_ready) begin failures++; $display("FAIL in_ready low"); end
      @(posedge clk); #1;
      if (bad_addr) nbad_seen++;
      checks++;
      if (spikes_out !== ref_out) begin
        failures++;
        $display("FAIL spikes_out %h expected %h at %0t", spikes_out, ref_out, $time);
      end
    end
    in_valid = 0; swap = 0;
    @(posedge clk); #1;
    checks++;
    if (nbad_seen != nbad_sent || nbad_sent == 0 || nswaps < 100) begin
      failures++;
      $display("FAIL bad events sent %0d flagged %0d swaps %0d", nbad_sent, nbad_seen, nswaps);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
