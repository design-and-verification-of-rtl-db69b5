// tb_spi_top: end-to-end test of the SPI master core at its default size.
//
// A Wishbone master task plays the host and a behavioural SPI slave
// (spi_slave_model) sits on the pads. Each transfer loads random data into the
// four data words, programs DIVIDER, SS and CTRL, sets GO, waits for the end
// (on wb_int_o when IE is set, else by polling GO) and reads the data words
// back. Checked against values worked out from the stimulus alone:
//   - the bits the slave received (wire order, bit order set by LSB);
//   - the data words read back: received bits in the transfer's positions,
//     the other bits of the loaded word unchanged (shared register);
//   - the number of SCLK rising edges (= transfer length);
//   - every SCLK half period during a transfer = DIVIDER+1 wb clock cycles,
//     and the first SCLK rise DIVIDER+2 cycles after the GO write is acked;
//   - the slave-select pad: low only during the transfer with ASS, low from
//     the SS write with ASS clear;
//   - that register writes during a transfer are ignored.
// Every mechanism (each of the four edge modes, both bit orders, the
// 128-bit length, odd and even divider, automatic and manual slave select,
// interrupt and polled completion, a write dropped during a transfer) is
// counted, and one that never happened counts as a failure.
module tb_spi_top;
  logic        clk = 1'b0;
  logic        rst;
  logic [4:0]  adr;
  logic [31:0] dat_i, dat_o;
  logic [3:0]  sel;
  logic        we, stb, cyc, ack, irq;
  logic [0:0]  ss_n;
  logic        sclk, mosi, miso;

  logic         arm, s_sample_rise, s_drive_rise;
  logic [127:0] slv_tx, slv_rx;
  int           slv_rx_count, slv_tx_count;

  int checks = 0, failures = 0;

  typedef enum int {
    M_MODE0, M_MODE1, M_MODE2, M_MODE3, M_LSB, M_MSB, M_LEN128, M_DIV_ODD,
    M_DIV_EVEN, M_ASS, M_MANUAL_SS, M_IRQ, M_POLL, M_WRITE_BLOCKED, M_COUNT
  } mech_e;
  int mech[M_COUNT];

  spi_top dut (
    .wb_clk_i(clk), .wb_rst_i(rst), .wb_adr_i(adr), .wb_dat_i(dat_i),
    .wb_sel_i(sel), .wb_we_i(we), .wb_stb_i(stb), .wb_cyc_i(cyc),
    .wb_dat_o(dat_o), .wb_ack_o(ack), .wb_int_o(irq),
    .ss_pad_o(ss_n), .sclk_pad_o(sclk), .mosi_pad_o(mosi), .miso_pad_i(miso)
  );

  spi_slave_model #(.MAX_BITS(128)) slave (
    .sclk, .sel_n(ss_n[0]), .arm, .mosi, .miso,
    .sample_on_rise(s_sample_rise), .drive_on_rise(s_drive_rise),
    .tx_stream(slv_tx), .rx_stream(slv_rx),
    .rx_count(slv_rx_count), .tx_count(slv_tx_count)
  );

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // SCLK monitor: rising edges and half-period lengths while measuring.
  logic measuring = 1'b0;
  int   rises, half_len, bad_halves, first_rise_at, cyc_count;
  logic sclk_q;
  int   exp_half;
  always @(posedge clk) cyc_count++;
  always @(negedge clk) begin
    if (measuring) begin
      half_len++;
      if (sclk != sclk_q) begin
        if (sclk) begin
          rises++;
          if (rises == 1) first_rise_at = cyc_count;
        end
        if (rises > 1 || !sclk) begin
          if (half_len != exp_half) bad_halves++;
        end
        half_len = 0;
      end
    end
    sclk_q = sclk;
  end

  task automatic wb_cycle(input logic w, input logic [4:0] a, input logic [31:0] d,
                          output logic [31:0] q);
    @(negedge clk);
    cyc = 1'b1; stb = 1'b1; we = w; adr = a; dat_i = d; sel = 4'hf;
    @(negedge clk);
    while (!ack) @(negedge clk);
    q = dat_o;
    cyc = 1'b0; stb = 1'b0; we = 1'b0;
  endtask

  task automatic wb_write(input logic [4:0] a, input logic [31:0] d);
    logic [31:0] q;
    wb_cycle(1'b1, a, d, q);
  endtask

  task automatic wb_read(input logic [4:0] a, output logic [31:0] q);
    wb_cycle(1'b0, a, '0, q);
  endtask

  task automatic transfer(input int n, input int div, input logic lsb, input logic txn,
                          input logic rxn, input logic ass, input logic ie);
    logic [127:0] data, exp_rx, exp_words, got_words;
    logic [31:0]  q, ctrl_word;
    int           pos, go_ack_at, guard;
    logic         long_xfer;
    data   = {$urandom, $urandom, $urandom, $urandom};
    slv_tx = {$urandom, $urandom, $urandom, $urandom};
    s_sample_rise = txn;
    s_drive_rise  = rxn;
    for (int w = 0; w < 4; w++) wb_write(5'(4 * w), data[32 * w +: 32]);
    wb_write(5'h14, 32'(div));
    wb_write(5'h18, 32'h1);
    ctrl_word = {18'b0, ass, ie, lsb, txn, rxn, 1'b0, 1'b0, 7'(n)};
    wb_write(5'h10, ctrl_word);
    @(negedge clk);
    check(ss_n[0] == ass, "ss pad before transfer");
    arm = 1'b1;
    @(negedge clk);
    arm = 1'b0;
    exp_half = div + 1;
    rises = 0; bad_halves = 0; half_len = 0; first_rise_at = -1;
    measuring = 1'b1;
    wb_write(5'h10, ctrl_word | 32'h100);
    go_ack_at = cyc_count;
    // On a transfer long enough, try to change the divider and a data word
    // while it runs (two bus cycles take 6 clocks).
    long_xfer = n * 2 * (div + 1) > 40;
    if (long_xfer) begin
      wb_write(5'h14, 32'(div + 5));
      wb_write(5'h00, 32'h5a5a_5a5a);
      check(ss_n[0] == 1'b0, "ss pad low in transfer");
    end
    if (ie) begin
      guard = 0;
      while (!irq && guard < 300000) begin
        @(negedge clk);
        guard++;
      end
      check(irq, "interrupt raised");
      mech[M_IRQ]++;
    end else begin
      do wb_read(5'h10, q); while (q[8]);
      mech[M_POLL]++;
    end
    measuring = 1'b0;
    wb_read(5'h10, q);
    check(q[8] == 1'b0, "GO cleared");
    if (ie) check(!irq, "interrupt cleared by access");
    check(ss_n[0] == ass, "ss pad after transfer");
    wb_read(5'h14, q);
    check(q == 32'(div), "divider write dropped");
    if (q == 32'(div) && long_xfer) mech[M_WRITE_BLOCKED]++;
    for (int w = 0; w < 4; w++) begin
      wb_read(5'(4 * w), q);
      got_words[32 * w +: 32] = q;
    end
    // Expected values from the stimulus alone.
    exp_words = data;
    for (int k = 0; k < n; k++) begin
      pos = lsb ? k : n - 1 - k;
      exp_rx[k] = data[pos];
      exp_words[pos] = slv_tx[k];
    end
    check(slv_rx_count == n, $sformatf("slave bits %0d want %0d", slv_rx_count, n));
    for (int k = 0; k < n; k++)
      check(slv_rx[k] == exp_rx[k], $sformatf("slave bit %0d n=%0d", k, n));
    check(got_words == exp_words, $sformatf("rx words n=%0d div=%0d lsb=%0b tx=%0b rx=%0b",
                                            n, div, lsb, txn, rxn));
    check(rises == n, $sformatf("sclk rises %0d want %0d", rises, n));
    check(bad_halves == 0, $sformatf("%0d half periods not %0d cycles", bad_halves, div + 1));
    check(first_rise_at - go_ack_at == div + 2,
          $sformatf("first edge after %0d cycles want %0d", first_rise_at - go_ack_at, div + 2));
    check(sclk == 1'b0, "sclk idles low");
    mech[mech_e'({txn, rxn} == 2'b10 ? M_MODE0 : {txn, rxn} == 2'b01 ? M_MODE1 :
                 {txn, rxn} == 2'b00 ? M_MODE2 : M_MODE3)]++;
    mech[lsb ? M_LSB : M_MSB]++;
    if (n == 128) mech[M_LEN128]++;
    mech[(div % 2) != 0 ? M_DIV_ODD : M_DIV_EVEN]++;
    mech[ass ? M_ASS : M_MANUAL_SS]++;
  endtask

  initial begin
    logic [31:0] q;
    rst = 1'b1; adr = '0; dat_i = '0; sel = '0; we = 1'b0; stb = 1'b0; cyc = 1'b0;
    arm = 1'b0; s_sample_rise = 1'b1; s_drive_rise = 1'b0; slv_tx = '0;
    cyc_count = 0; sclk_q = 1'b0; exp_half = 1;
    repeat (4) @(negedge clk);
    rst = 1'b0;
    check(ss_n == 1'b1 && sclk == 1'b0 && !irq, "reset state");
    wb_read(5'h10, q);
    check(q == 32'h0, "ctrl after reset");

    // Directed: every edge mode in both bit orders, 128-bit and short words.
    for (int m = 0; m < 8; m++)
      transfer(m[0] ? 128 : 8 + 5 * m, m % 3, m[1], m[2], m[0], m[1] ^ m[2], m[0] ^ m[1]);
    transfer(1, 0, 1'b0, 1'b1, 1'b0, 1'b1, 1'b1);
    transfer(32, 7, 1'b1, 1'b1, 1'b0, 1'b0, 1'b0);
    transfer(128, 4, 1'b0, 1'b1, 1'b0, 1'b1, 1'b1);
    // Random mix.
    repeat (12)
      transfer(int'($urandom_range(1, 128)), int'($urandom_range(0, 9)),
               1'($urandom), 1'($urandom), 1'($urandom), 1'($urandom), 1'($urandom));

    for (int i = 0; i < M_COUNT; i++) begin
      check(mech[i] > 0, $sformatf("mechanism %s never exercised", mech_e'(i)));
      $display("mechanism %-16s x%0d", mech_e'(i), mech[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
