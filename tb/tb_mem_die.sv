// tb_mem_die: self-checking testbench of mem_die at a reduced size
// (40 rows x 6 neurons x 2 bits). A shadow array kept here receives the same
// cell writes; every read is compared with it one cycle later. The die is
// switched off at random times: the testbench checks that reads then return
// zeros, that writes while off are dropped and that reads right after the
// die returns see the kept contents. Out-of-range rows read as zero.
module tb_mem_die;

  localparam int ROWS = 40, NEU = 6, LB = 2, W = NEU * LB;

  logic clk = 1'b0;
  logic pwr_on = 1'b1;
  logic rd_en = 1'b0, wr_en = 1'b0;
  logic [5:0] rd_addr = '0, wr_row = '0;
  logic [2:0] wr_col = '0;
  logic [1:0] wr_bits = '0;
  logic [W-1:0] rd_data;

  logic [W-1:0] shadow [ROWS];
  int checks = 0, failures = 0;
  int n_off_reads = 0, n_off_writes = 0;

  mem_die #(.ROWS(ROWS), .NEURONS(NEU), .LAYER_BITS(LB)) dut (
    .clk, .pwr_on, .rd_en, .rd_addr, .rd_data,
    .wr_en, .wr_row, .wr_col, .wr_bits
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
    logic [W-1:0] exp_q;
    logic         exp_vld;
    exp_vld = 0;
    exp_q = '0;
    @(posedge clk); #1;
    // fill every cell once
    for (int r = 0; r < ROWS; r++) begin
      for (int c = 0; c < NEU; c++) begin
        wr_en = 1; wr_row = 6'(r); wr_col = 3'(c); wr_bits = 2'($urandom);
        shadow[r][c*LB +: LB] = wr_bits;
        @(posedge clk); #1;
      end
    end
    wr_en = 0;
    for (int i = 0; i < 20000; i++) begin
      // expected read data for the read issued last cycle
      if (exp_vld) begin
        checks++;
        if (rd_data !== exp_q) begin
          failures++;
          $display("FAIL read: got %h expected %h at %0t", rd_data, exp_q, $time);
        end
      end
      // next stimulus
      if ($urandom_range(0, 199) == 0) pwr_on = ~pwr_on;
      rd_en   = ($urandom_range(0, 3) != 0);
      rd_addr = ($urandom_range(0, 19) == 0) ? 6'(ROWS + $urandom_range(0, 23)) : 6'($urandom_range(0, ROWS - 1));
      wr_en   = ($urandom_range(0, 2) == 0);
      wr_row  = 6'($urandom_range(0, ROWS - 1));
      wr_col  = 3'($urandom_range(0, NEU - 1));
      wr_bits = 2'($urandom);
      exp_vld = rd_en;
      if (rd_en) begin
        if (!pwr_on || rd_addr >= ROWS) exp_q = '0;
        else exp_q = shadow[rd_addr];       // old contents on same-cycle write
        if (!pwr_on) n_off_reads++;
      end
      if (wr_en && pwr_on) shadow[wr_row][wr_col*LB +: LB] = wr_bits;
      if (wr_en && !pwr_on) n_off_writes++;
      @(posedge clk); #1;
    end
    checks++;
    if (n_off_reads == 0 || n_off_writes == 0) begin
      failures++;
      $display("FAIL coverage off_reads=%0d off_writes=%0d", n_off_reads, n_off_writes);
    end
    $display("reads while off=%0d writes dropped=%0d", n_off_reads, n_off_writes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
