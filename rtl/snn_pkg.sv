// snn_pkg: types and constants shared by the 3D-stacked neuromorphic core.
//
// Synaptic weights are 8-bit sign-magnitude numbers: bit 7 is the sign and
// bits 6:0 are a 7-bit fraction, so 8'b1010_1100 is -44/128 = -0.34375.
// A weight is split into NUM_LAYERS subsets of LAYER_BITS bits, one per
// stacked memory die. Die m0 (bottom, next to the logic die) holds the most
// significant pair W[7:6], die m3 (top) holds the least significant pair
// W[1:0]. The weight format, the 2-2-2-2 split and the MSB-at-the-bottom
// order follow the source design; the supply-code encoding is this design's.
//
// Each die's supply is described by a gate bit (die switched off) and a
// voltage select code: the requested supply is 1100 mV - 25 mV * vsel, so
// code 0 is the nominal 1.1 V, 11 is 0.825 V, 12 is 0.8 V and 17 is 0.675 V.
package snn_pkg;

  localparam int unsigned WEIGHT_BITS = 8;   // n
  localparam int unsigned NUM_LAYERS  = 4;   // M
  localparam int unsigned LAYER_BITS  = WEIGHT_BITS / NUM_LAYERS;
  localparam int unsigned VSEL_W      = 5;
  localparam int unsigned VNOM_MV     = 1100;
  localparam int unsigned VSTEP_MV    = 25;

  typedef logic [WEIGHT_BITS-1:0] weight_t;  // sign-magnitude
  typedef logic [LAYER_BITS-1:0]  subset_t;

  // Supply request / state of one memory die.
  typedef struct packed {
    logic              gate;  // 1: die power-gated (0 V)
    logic [VSEL_W-1:0] vsel;  // 25 mV steps below nominal when not gated
  } layer_supply_t;

  // Power-aware operating modes.
  typedef enum logic [1:0] {
    MODE_NORMAL = 2'd0,  // no die scaled or gated
    MODE_LP1    = 2'd1,  // low-power mode I: voltage scaling only
    MODE_LP2    = 2'd2,  // low-power mode II: power gating only
    MODE_LP3    = 2'd3   // low-power mode III: both
  } power_mode_e;

  // Supply of a die in millivolts (0 when gated).
  function automatic int unsigned supply_mv(layer_supply_t s);
    int unsigned drop;
    drop = VSTEP_MV * int'(s.vsel);
    if (s.gate) return 0;
    if (drop >= VNOM_MV) return 0;
    return VNOM_MV - drop;
  endfunction

  // Sign-magnitude weight to a signed two's-complement value of the same scale.
  function automatic logic signed [WEIGHT_BITS:0] sm_to_signed(weight_t w);
    logic signed [WEIGHT_BITS:0] mag;
    mag = $signed({2'b00, w[WEIGHT_BITS-2:0]});
    return w[WEIGHT_BITS-1] ? -mag : mag;
  endfunction

  // Rank of a power mode derived from the per-die supplies.
  function automatic power_mode_e classify_mode(logic any_scaled, logic any_gated);
    if (any_scaled && any_gated) return MODE_LP3;
    if (any_gated)               return MODE_LP2;
    if (any_scaled)              return MODE_LP1;
    return MODE_NORMAL;
  endfunction

endpackage
