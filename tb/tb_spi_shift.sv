// tb_spi_shift: self-checking test of the shared data register and shifter.
//
// The testbench makes its own serial clock: a counter toggles s_clk every
// HALF cycles while tip is high and raises the pos_edge/neg_edge strobe in the
// cycle before each edge. A behavioural slave (spi_slave_model), set to the
// edges that pair with the master's mode, exchanges bits with the shifter.
//
// For every combination of tx_negedge, rx_negedge and lsb, and for lengths
// 1, 7, 8, 32, 100, 127 and 0 (= 128 bits) plus random ones, it checks:
//   - the bits the slave received, in wire order, against the loaded data;
//   - p_out afterwards: received bits in the transfer's positions, the rest of
//     the loaded word untouched (the register is shared);
//   - that tip lasts exactly n serial clock periods and `last` is high during
//     the final period only.
// It also checks byte-enabled loading and that loads during a transfer are
// ignored.
module tb_spi_shift;
  localparam int unsigned MAXC = 128;
  localparam int unsigned HALF = 3;

  logic            clk = 1'b0;
  logic            rst;
  logic [3:0]      latch, byte_sel;
  logic [6:0]      len;
  logic            lsb, go, rx_negedge, tx_negedge;
  logic            pos_edge, neg_edge, s_clk, s_in, s_out, tip, last;
  logic [31:0]     p_in;
  logic [MAXC-1:0] p_out;

  logic            arm;
  logic [MAXC-1:0] slv_tx, slv_rx;
  int              slv_rx_count, slv_tx_count;

  int checks = 0, failures = 0;

  spi_shift #(.MAX_CHAR_P(MAXC)) dut (
    .clk, .rst, .latch, .byte_sel, .len, .lsb, .go, .pos_edge, .neg_edge,
    .rx_negedge, .tx_negedge, .s_clk, .s_in, .p_in, .tip, .last, .p_out, .s_out
  );

  spi_slave_model #(.MAX_BITS(MAXC)) slave (
    .sclk(s_clk), .sel_n(1'b1), .arm, .mosi(s_out), .miso(s_in),
    .sample_on_rise(tx_negedge), .drive_on_rise(rx_negedge),
    .tx_stream(slv_tx), .rx_stream(slv_rx),
    .rx_count(slv_rx_count), .tx_count(slv_tx_count)
  );

  always #5 clk = ~clk;

  // Serial clock made by the testbench.
  int hcnt;
  assign pos_edge = tip && (hcnt == HALF - 1) && !s_clk;
  assign neg_edge = tip && (hcnt == HALF - 1) &&  s_clk;
  always_ff @(posedge clk) begin
    if (rst || !tip) begin
      hcnt  <= 0;
      s_clk <= 1'b0;
    end else if (hcnt == HALF - 1) begin
      hcnt  <= 0;
      s_clk <= ~s_clk;
    end else begin
      hcnt <= hcnt + 1;
    end
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic load_word(input int w, input logic [31:0] v, input logic [3:0] be);
    @(negedge clk);
    latch = 4'b0001 << w;
    byte_sel = be;
    p_in = v;
    @(negedge clk);
    latch = '0;
  endtask

  task automatic load_all(input logic [MAXC-1:0] v);
    for (int w = 0; w < 4; w++) load_word(w, v[32*w +: 32], 4'hf);
  endtask

  task automatic transfer(input logic [MAXC-1:0] data, input int n, input logic l,
                          input logic txn, input logic rxn);
    logic [MAXC-1:0] exp_rx, exp_pout;
    int tip_cycles, last_cycles, pos;
    load_all(data);
    check(p_out == data, "load");
    slv_tx = {$urandom, $urandom, $urandom, $urandom};
    @(negedge clk);
    len = 7'(n);  // 128 wraps to 0
    lsb = l; tx_negedge = txn; rx_negedge = rxn;
    arm = 1'b1;
    @(negedge clk);
    arm = 1'b0;
    go = 1'b1;
    @(negedge clk);
    check(tip == 1'b1, "tip after go");
    tip_cycles = 0;
    last_cycles = 0;
    while (tip) begin
      tip_cycles++;
      if (last) last_cycles++;
      // The caller drops go in the cycle that ends the transfer.
      if (last && neg_edge) go = 1'b0;
      // A load during the transfer must be ignored.
      if (tip_cycles == 2) begin
        latch = 4'hf; byte_sel = 4'hf; p_in = 32'hdead_beef;
      end else begin
        latch = '0;
      end
      @(negedge clk);
    end
    latch = '0;
    go = 1'b0;
    // Expected results from the data alone.
    exp_pout = data;
    for (int k = 0; k < n; k++) begin
      pos = l ? k : n - 1 - k;
      exp_rx[k] = data[pos];
      exp_pout[pos] = slv_tx[k];
    end
    check(slv_rx_count == n, $sformatf("slave got %0d bits, want %0d", slv_rx_count, n));
    for (int k = 0; k < n; k++)
      check(slv_rx[k] == exp_rx[k], $sformatf("mosi bit %0d n=%0d lsb=%0b tx=%0b rx=%0b", k, n, l, txn, rxn));
    check(p_out == exp_pout, $sformatf("p_out n=%0d lsb=%0b tx=%0b rx=%0b", n, l, txn, rxn));
    check(tip_cycles == n * 2 * HALF, $sformatf("tip cycles %0d want %0d", tip_cycles, n * 2 * HALF));
    check(last_cycles == 2 * HALF, $sformatf("last cycles %0d", last_cycles));
    repeat (3) @(negedge clk);
    check(!tip, "stays idle");
  endtask

  initial begin
    automatic int lens[7] = '{1, 7, 8, 32, 100, 127, 128};
    rst = 1'b1; latch = '0; byte_sel = '0; len = '0; lsb = 1'b0; go = 1'b0;
    rx_negedge = 1'b0; tx_negedge = 1'b1; p_in = '0; arm = 1'b0; slv_tx = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    check(p_out == '0 && !tip && !last, "reset state");

    // Byte-enabled loading.
    load_all({4{32'h0}});
    load_word(2, 32'h1122_3344, 4'b0101);
    check(p_out == {32'h0, 32'h0022_0044, 64'h0}, "byte enables");
    load_word(3, 32'haabb_ccdd, 4'b1000);
    check(p_out[127:96] == 32'haa00_0000, "byte enable 3");

    for (int m = 0; m < 8; m++)
      foreach (lens[i])
        transfer({$urandom, $urandom, $urandom, $urandom}, lens[i], m[0], m[1], m[2]);
    repeat (10)
      transfer({$urandom, $urandom, $urandom, $urandom}, int'($urandom_range(1, 128)),
               1'($urandom), 1'($urandom), 1'($urandom));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
