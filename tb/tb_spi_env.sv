// tb_spi_env: layered, constrained-random test of the SPI master core.
//
// A generator makes random transfers (length 1..128, divider 0..7, edge mode,
// bit order, slave-select mode, interrupt or polling, random data on both
// sides) and passes them through a mailbox to a driver. The driver plays the
// Wishbone host: it programs the core, arms the behavioural slave with its
// data and mode, waits for the end of the transfer and reads the data words
// back. A receiver on the SPI side collects what the slave got. The
// scoreboard checks both directions against values worked out from the
// transaction alone: slave bits = master data in wire order, read-back words
// = slave data placed into the shared register with the untouched bits kept.
// A functional-coverage table counts each edge mode, bit order, select mode,
// completion mode, odd/even divider and the 1- and 128-bit lengths; an
// unhit bin counts as a failure. The core runs at its default parameters.
module tb_spi_env;
  localparam int unsigned N_TRANS = 60;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  spi_bus_if bus (clk);

  spi_top dut (
    .wb_clk_i(clk), .wb_rst_i(bus.rst), .wb_adr_i(bus.adr), .wb_dat_i(bus.dat_i),
    .wb_sel_i(bus.sel), .wb_we_i(bus.we), .wb_stb_i(bus.stb), .wb_cyc_i(bus.cyc),
    .wb_dat_o(bus.dat_o), .wb_ack_o(bus.ack), .wb_int_o(bus.irq),
    .ss_pad_o(bus.ss_n), .sclk_pad_o(bus.sclk), .mosi_pad_o(bus.mosi), .miso_pad_i(bus.miso)
  );

  spi_slave_model #(.MAX_BITS(128)) slave (
    .sclk(bus.sclk), .sel_n(bus.ss_n[0]), .arm(bus.arm), .mosi(bus.mosi), .miso(bus.miso),
    .sample_on_rise(bus.sample_on_rise), .drive_on_rise(bus.drive_on_rise),
    .tx_stream(bus.slv_tx), .rx_stream(bus.slv_rx),
    .rx_count(bus.slv_rx_count), .tx_count(bus.slv_tx_count)
  );

  int checks = 0, failures = 0;

  function automatic void check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endfunction

  // ---------------------------------------------------------------- transaction
  class spi_trans;
    int           id;
    int           len;       // 1..128
    int           div;
    logic         lsb, tx_neg, rx_neg, ass, ie;
    logic [127:0] master_data, slave_data;
    // results
    logic [127:0] master_rx;   // data words read back
    logic [127:0] slave_rx;    // bits the slave got, wire order
    int           slave_bits;

    function void make(int n);
      id  = n;
      case ($urandom_range(0, 7))
        0:       len = 1;
        1:       len = 128;
        default: len = int'($urandom_range(1, 128));
      endcase
      div    = int'($urandom_range(0, 7));
      lsb    = 1'($urandom);
      tx_neg = 1'($urandom);
      rx_neg = 1'($urandom);
      ass    = 1'($urandom);
      ie     = 1'($urandom);
      master_data = {$urandom, $urandom, $urandom, $urandom};
      slave_data  = {$urandom, $urandom, $urandom, $urandom};
    endfunction

    function logic [31:0] ctrl_word(logic go);
      return {18'b0, ass, ie, lsb, tx_neg, rx_neg, go, 1'b0, 7'(len)};
    endfunction
  endclass

  typedef mailbox #(spi_trans) trans_mbx;

  // ---------------------------------------------------------------- generator
  class generator;
    trans_mbx to_drv;
    function new(trans_mbx m);
      to_drv = m;
    endfunction
    task run(int n);
      for (int i = 0; i < n; i++) begin
        spi_trans t = new();
        t.make(i);
        to_drv.put(t);
      end
    endtask
  endclass

  // ---------------------------------------------------------------- driver
  class driver;
    virtual spi_bus_if vif;
    trans_mbx from_gen, to_sb;
    event     xfer_end;
    function new(virtual spi_bus_if v, trans_mbx g, trans_mbx s);
      vif = v; from_gen = g; to_sb = s;
    endfunction

    task wb(input logic w, input logic [4:0] a, input logic [31:0] d, output logic [31:0] q);
      @(negedge vif.clk);
      vif.cyc = 1'b1; vif.stb = 1'b1; vif.we = w; vif.adr = a; vif.dat_i = d; vif.sel = 4'hf;
      @(negedge vif.clk);
      while (!vif.ack) @(negedge vif.clk);
      q = vif.dat_o;
      vif.cyc = 1'b0; vif.stb = 1'b0; vif.we = 1'b0;
    endtask

    task drive(spi_trans t);
      logic [31:0] q;
      int guard;
      for (int w = 0; w < 4; w++) wb(1'b1, 5'(4 * w), t.master_data[32 * w +: 32], q);
      wb(1'b1, 5'h14, 32'(t.div), q);
      wb(1'b1, 5'h18, 32'h1, q);
      wb(1'b1, 5'h10, t.ctrl_word(1'b0), q);
      vif.slv_tx = t.slave_data;
      vif.sample_on_rise = t.tx_neg;
      vif.drive_on_rise  = t.rx_neg;
      @(negedge vif.clk);
      vif.arm = 1'b1;
      @(negedge vif.clk);
      vif.arm = 1'b0;
      wb(1'b1, 5'h10, t.ctrl_word(1'b1), q);
      guard = 0;
      if (t.ie) begin
        while (!vif.irq && guard < 100000) begin
          @(negedge vif.clk);
          guard++;
        end
        check(vif.irq, $sformatf("trans %0d: interrupt", t.id));
      end else begin
        do begin
          wb(1'b0, 5'h10, 32'h0, q);
          guard++;
        end while (q[8] && guard < 100000);
      end
      wb(1'b0, 5'h10, 32'h0, q);
      check(q[8] == 1'b0, $sformatf("trans %0d: GO cleared", t.id));
      for (int w = 0; w < 4; w++) begin
        wb(1'b0, 5'(4 * w), 32'h0, q);
        t.master_rx[32 * w +: 32] = q;
      end
      ->xfer_end;
      to_sb.put(t);
    endtask

    task run(int n);
      spi_trans t;
      repeat (n) begin
        from_gen.get(t);
        drive(t);
      end
    endtask
  endclass

  // ---------------------------------------------------------------- receiver
  class receiver;
    virtual spi_bus_if vif;
    function new(virtual spi_bus_if v);
      vif = v;
    endfunction
    // Pairs each finished transfer with what the slave received.
    task collect(spi_trans t);
      t.slave_rx   = vif.slv_rx;
      t.slave_bits = vif.slv_rx_count;
    endtask
  endclass

  // ---------------------------------------------------------------- scoreboard
  typedef enum int {
    C_MODE0, C_MODE1, C_MODE2, C_MODE3, C_LSB, C_MSB, C_ASS, C_MANUAL, C_IRQ, C_POLL,
    C_DIV_ODD, C_DIV_EVEN, C_LEN1, C_LEN128, C_COUNT
  } cov_e;

  class scoreboard;
    trans_mbx from_drv;
    receiver  rcv;
    int       hits[C_COUNT];
    function new(trans_mbx d, receiver r);
      from_drv = d; rcv = r;
    endfunction

    function void sample(spi_trans t);
      hits[{t.tx_neg, t.rx_neg} == 2'b10 ? C_MODE0 : {t.tx_neg, t.rx_neg} == 2'b01 ? C_MODE1 :
           {t.tx_neg, t.rx_neg} == 2'b00 ? C_MODE2 : C_MODE3]++;
      hits[t.lsb ? C_LSB : C_MSB]++;
      hits[t.ass ? C_ASS : C_MANUAL]++;
      hits[t.ie ? C_IRQ : C_POLL]++;
      hits[(t.div % 2) != 0 ? C_DIV_ODD : C_DIV_EVEN]++;
      if (t.len == 1)   hits[C_LEN1]++;
      if (t.len == 128) hits[C_LEN128]++;
    endfunction

    task run(int n);
      spi_trans     t;
      logic [127:0] exp_words;
      int           pos;
      logic         ok;
      repeat (n) begin
        from_drv.get(t);
        rcv.collect(t);
        exp_words = t.master_data;
        ok = (t.slave_bits == t.len);
        for (int k = 0; k < t.len; k++) begin
          pos = t.lsb ? k : t.len - 1 - k;
          if (t.slave_rx[k] != t.master_data[pos]) ok = 1'b0;
          exp_words[pos] = t.slave_data[k];
        end
        check(ok, $sformatf("trans %0d: slave data (len %0d)", t.id, t.len));
        check(t.master_rx == exp_words, $sformatf("trans %0d: master data", t.id));
        sample(t);
      end
    endtask

    function void report();
      for (int i = 0; i < C_COUNT; i++) begin
        check(hits[i] > 0, $sformatf("coverage bin %s empty", cov_e'(i)));
        $display("coverage %-12s %0d", cov_e'(i), hits[i]);
      end
    endfunction
  endclass

  // ---------------------------------------------------------------- environment
  initial begin
    automatic trans_mbx  g2d = new();
    automatic trans_mbx  d2s = new();
    automatic generator  gen = new(g2d);
    automatic driver     drv = new(bus, g2d, d2s);
    automatic receiver   rcv = new(bus);
    automatic scoreboard sb  = new(d2s, rcv);

    bus.rst = 1'b1; bus.adr = '0; bus.dat_i = '0; bus.sel = '0; bus.we = 1'b0;
    bus.stb = 1'b0; bus.cyc = 1'b0; bus.arm = 1'b0; bus.sample_on_rise = 1'b1;
    bus.drive_on_rise = 1'b0; bus.slv_tx = '0;
    repeat (4) @(negedge clk);
    bus.rst = 1'b0;

    fork
      gen.run(N_TRANS);
      drv.run(N_TRANS);
      sb.run(N_TRANS);
    join
    sb.report();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
