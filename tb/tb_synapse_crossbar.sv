// tb_synapse_crossbar: self-checking testbench of synapse_crossbar at a
// reduced size (50 axons, 5 neurons, 4 dies of 2 bits). The testbench keeps a
// random 8-bit weight matrix, models the four dies as one-cycle-latency
// arrays holding the 2-bit subsets (die 0 = W[7:6] ... die 3 = W[1:0]) and
// feeds random spike vectors. It checks that exactly the active axons are
// read, in ascending order and one per cycle, that every reassembled weight
// equals the original matrix entry, and that done comes k + 2 cycles after
// load for k active axons (1 cycle when none is active).
module tb_synapse_crossbar;
  import snn_pkg::*;

  localparam int AX = 50, NEU = 5, W = NEU * LAYER_BITS;

  logic clk = 1'b0, rst_n = 1'b0;
  logic load = 1'b0;
  logic [AX-1:0] spikes_in = '0;
  logic rd_en;
  logic [5:0] rd_addr;
  logic [NUM_LAYERS-1:0][W-1:0] layer_data;
  logic syn_valid, busy, done;
  logic [5:0] syn_axon;
  weight_t [NEU-1:0] syn_weight;

  weight_t wmat [AX][NEU];
  int checks = 0, failures = 0;

  synapse_crossbar #(.AXONS(AX), .NEURONS(NEU)) dut (
    .clk, .rst_n, .load, .spikes_in, .rd_en, .rd_addr, .layer_data,
    .syn_valid, .syn_axon, .syn_weight, .busy, .done
  );

  always #5 clk = ~clk;

  // die models: registered read of the subsets
  always_ff @(posedge clk) begin
    if (rd_en) begin
      for (int l = 0; l < NUM_LAYERS; l++)
        for (int n = 0; n < NEU; n++)
          layer_data[l][n*2 +: 2] <= wmat[rd_addr][n][7-2*l -: 2];
    end
  end

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
    for (int a = 0; a < AX; a++)
      for (int n = 0; n < NEU; n++) wmat[a][n] = weight_t'($urandom);
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    for (int t = 0; t < 300; t++) begin
      logic [AX-1:0] v;
      int k, cyc, last, nread, nvalid;
      int dens;
      dens = (t % 3 == 0) ? 0 : $urandom_range(0, 100);
      v = '0;
      if (t == 1) v = '1;                          // all axons active
      else if (t != 2)                             // t == 2: none active
        for (int a = 0; a < AX; a++) v[a] = ($urandom_range(0, 99) < dens);
      k = $countones(v);
      spikes_in = v; load = 1;
      @(posedge clk); #1;
      load = 0; spikes_in = '0;
      cyc = 1; last = -1; nread = 0; nvalid = 0;
      while (!done && cyc < 1000) begin
        if (rd_en) begin
          check("read only active axons", v[rd_addr] == 1'b1);
          check("ascending order", int'(rd_addr) > last);
          last = int'(rd_addr);
          nread++;
        end
        if (syn_valid) begin
          nvalid++;
          for (int n = 0; n < NEU; n++)
            check("weight reassembled", syn_weight[n] == wmat[syn_axon][n]);
        end
        @(posedge clk); #1;
        cyc++;
      end
      check("busy during scan", busy == 1'b1);
      check("all active axons read", nread == k && nvalid == k);
      check("done latency", cyc == ((k == 0) ? 1 : k + 2));
      @(posedge clk); #1;
      check("idle after done", busy == 1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
