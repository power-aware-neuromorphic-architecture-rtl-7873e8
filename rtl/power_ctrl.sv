// power_ctrl: per-die supply controller of the stacked synaptic memory. It
// sets, for every memory die, whether the die is power-gated and which
// voltage the die's regulator should deliver, and derives from that the
// core's power-aware mode: normal, low-power mode I (some dies undervolted),
// II (some dies gated) or III (both).
//
// A new setting (one layer_supply_t per die) is taken with cfg_valid when
// cfg_ready is high. Every die whose supply goes down (lower voltage or
// gated) changes at once; a gated die is isolated (die_on low) in the same
// edge. Dies whose supply goes up are restored one at a time, bottom-up,
// starting with the lowest-numbered die (m0, the most significant bits);
// each restored die gets SETTLE_CYCLES for its rail to settle before the
// next one starts. A die coming back from power gating has lost its
// contents: when it is settled, die_on rises and its reload_req bit is set
// until the host acknowledges the reload with reload_ack. The modes, the
// per-die gating and scaling and the bottom-up, one-by-one restoration
// follow the source design; the settle time, the reload handshake and the
// supply encoding (see snn_pkg) are this design's choices. Which setting to
// use is decided outside the core.
//
// Timing: cfg_ready is high only when no restoration is in progress.
// Restoring j dies takes j * (SETTLE_CYCLES + 1) cycles after the setting
// is taken; busy is high meanwhile.
module power_ctrl
  import snn_pkg::*;
#(
  parameter int unsigned SETTLE_CYCLES = 16
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           cfg_valid,
  output logic                           cfg_ready,
  input  layer_supply_t [NUM_LAYERS-1:0] cfg_target,
  output layer_supply_t [NUM_LAYERS-1:0] vr_supply,   // to regulators / switches
  output logic          [NUM_LAYERS-1:0] die_on,      // die powered and settled
  output power_mode_e                    mode,
  output logic                           busy,
  output logic          [NUM_LAYERS-1:0] reload_req,
  input  logic          [NUM_LAYERS-1:0] reload_ack
);

  localparam int unsigned CNT_W = $clog2(SETTLE_CYCLES + 2);
  localparam int unsigned IDX_W = (NUM_LAYERS < 2) ? 1 : $clog2(NUM_LAYERS);

  layer_supply_t [NUM_LAYERS-1:0] cur_q, tgt_q;
  logic [NUM_LAYERS-1:0] pend_q, on_q, req_q;
  logic                  ramp_q;
  logic [CNT_W-1:0]      cnt_q;
  logic [IDX_W-1:0]      idx_q;
  logic [IDX_W-1:0]      low_idx;
  logic                  any_scaled, any_gated;

  always_comb begin
    low_idx = '0;
    for (int i = int'(NUM_LAYERS) - 1; i >= 0; i--)
      if (pend_q[i]) low_idx = IDX_W'(i);
  end

  always_comb begin
    any_scaled = 1'b0;
    any_gated  = 1'b0;
    for (int i = 0; i < int'(NUM_LAYERS); i++) begin
      if (cur_q[i].gate)              any_gated  = 1'b1;
      else if (cur_q[i].vsel != '0)   any_scaled = 1'b1;
    end
  end

  assign cfg_ready  = !busy;
  assign busy       = (pend_q != '0) || ramp_q;
  assign vr_supply  = cur_q;
  assign die_on     = on_q;
  assign reload_req = req_q;
  assign mode       = classify_mode(any_scaled, any_gated);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_q  <= '0;
      tgt_q  <= '0;
      pend_q <= '0;
      on_q   <= '1;
      req_q  <= '0;
      ramp_q <= 1'b0;
      cnt_q  <= '0;
      idx_q  <= '0;
    end else begin
      req_q <= req_q & ~reload_ack;
      if (cfg_valid && cfg_ready) begin
        tgt_q <= cfg_target;
        for (int i = 0; i < int'(NUM_LAYERS); i++) begin
          if (supply_mv(cfg_target[i]) > supply_mv(cur_q[i])) begin
            pend_q[i] <= 1'b1;           // goes up: restore in order
          end else begin
            cur_q[i] <= cfg_target[i];   // goes down or stays: at once
            if (cfg_target[i].gate) begin
              on_q[i]  <= 1'b0;
              req_q[i] <= 1'b0;
            end
          end
        end
      end else if (ramp_q) begin
        if (cnt_q == '0) begin
          ramp_q        <= 1'b0;
          pend_q[idx_q] <= 1'b0;
          if (!on_q[idx_q]) begin
            on_q[idx_q]  <= 1'b1;
            req_q[idx_q] <= 1'b1;
          end
        end else begin
          cnt_q <= cnt_q - 1'b1;
        end
      end else if (pend_q != '0) begin
        ramp_q         <= 1'b1;
        idx_q          <= low_idx;
        cur_q[low_idx] <= tgt_q[low_idx];
        cnt_q          <= CNT_W'(SETTLE_CYCLES - 1);
      end
    end
  end

  // A die is never reported powered while its supply is gated.
  for (genvar g = 0; g < int'(NUM_LAYERS); g++) begin : g_chk
    a_on_not_gated: assert property (@(posedge clk) disable iff (!rst_n)
                                     on_q[g] |-> !cur_q[g].gate);
  end

endmodule
