// die_supply_model: behavioural model (not synthesizable logic) of what a
// memory die's supply voltage and its fabrication defects do to the bits it
// delivers through the TSVs. It stands for the analog behaviour of the 6T
// SRAM cells and sits between a mem_die's read port and the crossbar.
//
// Undervolting: when the die runs below nominal, each cell's read-out is
// wrong with the bit error rate of that supply. The model draws a fresh map
// of failing cells (each bit independently, probability BER) every time the
// die's supply setting changes, and XORs the map onto every read. Back at
// nominal supply the map is cleared. BER per supply is taken from the source
// design's 45 nm SRAM characterisation: 0.825 V 0.00116, 0.8 V 0.01903,
// 0.775 V 0.11519, 0.75 V 0.27163, 0.725 V 0.43982, 0.7 V 0.62309. Supplies
// from 0.85 V up are treated as error-free, and anything below 0.7 V uses the
// 0.7 V rate; both are this model's assumptions.
//
// Fabrication defects: at time zero each cell is made stuck-at-0 or stuck-at-1
// (equal odds) with probability DEFECT_PPM per million; stuck cells override
// the stored value on every read, at any supply.
//
// Power gating: a gated die delivers zeros (its output is clamped).
//
// Timing: rd_en/rd_addr are the same signals the mem_die sees; din is the
// die's read data one cycle later and dout follows din combinationally.
module die_supply_model
  import snn_pkg::*;
#(
  parameter int unsigned ROWS       = 784,
  parameter int unsigned NEURONS    = 48,
  parameter int unsigned DEFECT_PPM = 0,
  parameter int unsigned SEED       = 1,
  localparam int unsigned ROW_W = (ROWS < 2) ? 1 : $clog2(ROWS),
  localparam int unsigned WIDTH = NEURONS * LAYER_BITS
) (
  input  logic             clk,
  input  layer_supply_t    supply,
  input  logic             rd_en,
  input  logic [ROW_W-1:0] rd_addr,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout,
  output int unsigned      ber_ppm,     // error rate in force (per million)
  output int unsigned      flip_cells   // cells currently failing
);

  logic [WIDTH-1:0] flip_map  [ROWS];
  logic [WIDTH-1:0] stuck_map [ROWS];
  logic [WIDTH-1:0] stuck_val [ROWS];
  layer_supply_t    supply_q;
  logic [ROW_W-1:0] row_q;
  int unsigned      nflip;

  function automatic int unsigned ber_of(layer_supply_t s);
    if (s.gate)       return 0;
    case (s.vsel)
      5'd0, 5'd1, 5'd2, 5'd3, 5'd4, 5'd5,
      5'd6, 5'd7, 5'd8, 5'd9, 5'd10: return 0;
      5'd11: return 1160;     // 0.825 V
      5'd12: return 19030;    // 0.800 V
      5'd13: return 115190;   // 0.775 V
      5'd14: return 271630;   // 0.750 V
      5'd15: return 439820;   // 0.725 V
      default: return 623090; // 0.700 V and below
    endcase
  endfunction

  initial begin
    void'($urandom(SEED));
    for (int r = 0; r < int'(ROWS); r++) begin
      flip_map[r]  = '0;
      stuck_map[r] = '0;
      stuck_val[r] = '0;
      for (int b = 0; b < int'(WIDTH); b++) begin
        int unsigned draw;
        draw = $urandom % 1000000;
        if (draw < DEFECT_PPM) begin
          stuck_map[r][b] = 1'b1;
          stuck_val[r][b] = 1'($urandom);
        end
      end
    end
    supply_q = '0;
    row_q    = '0;
    nflip    = 0;
  end

  always @(posedge clk) begin
    if (rd_en) row_q <= rd_addr;
    if (supply != supply_q) begin
      int unsigned ber;
      ber   = ber_of(supply);
      nflip = 0;
      for (int r = 0; r < int'(ROWS); r++) begin
        for (int b = 0; b < int'(WIDTH); b++) begin
          int unsigned draw;
          draw = $urandom % 1000000;
          flip_map[r][b] = (draw < ber);
          if (flip_map[r][b]) nflip++;
        end
      end
      supply_q <= supply;
    end
  end

  always_comb begin
    if (supply.gate)
      dout = '0;
    else
      dout = ((din ^ flip_map[row_q]) & ~stuck_map[row_q])
           | (stuck_map[row_q] & stuck_val[row_q]);
  end

  assign ber_ppm    = ber_of(supply_q);
  assign flip_cells = nflip;

endmodule
