// tb_spi_wb_if: self-checking test of the Wishbone register interface.
//
// A Wishbone master task issues single read and write cycles and checks that
// each is acknowledged in the second cycle and for one cycle only. The test
// then checks: read-back of CTRL (reserved bits read as zero), DIVIDER and SS;
// reads of the four data words from rx_data; the latch/byte_sel/p_in strobe
// of data writes; that writes are dropped while GO is set or tip is high;
// that xfer_done clears GO; and that wb_int_o is raised by xfer_done only
// when IE is set and cleared by the next access.
module tb_spi_wb_if;
  localparam int unsigned SS_NB = 8;

  logic        clk = 1'b0;
  logic        rst;
  logic [4:0]  adr;
  logic [31:0] dat_i, dat_o;
  logic [3:0]  sel;
  logic        we, stb, cyc, ack, irq;
  logic [127:0] rx_data;
  logic        tip, xfer_done;
  spi_pkg::spi_ctrl_t ctrl;
  logic [15:0] divider;
  logic [SS_NB-1:0] ss;
  logic [3:0]  latch, byte_sel;
  logic [31:0] p_in;

  int checks = 0, failures = 0;
  // Data-word write strobes seen: word, bytes and data of the latest one.
  int          n_latch = 0;
  logic [3:0]  seen_latch, seen_be;
  logic [31:0] seen_p_in;

  spi_wb_if #(.SS_NB(SS_NB)) dut (
    .wb_clk_i(clk), .wb_rst_i(rst), .wb_adr_i(adr), .wb_dat_i(dat_i),
    .wb_sel_i(sel), .wb_we_i(we), .wb_stb_i(stb), .wb_cyc_i(cyc),
    .wb_dat_o(dat_o), .wb_ack_o(ack), .wb_int_o(irq),
    .rx_data, .tip, .xfer_done, .ctrl, .divider, .ss, .latch, .byte_sel, .p_in
  );

  always #5 clk = ~clk;

  always @(posedge clk) if (latch != 0) begin
    n_latch++;
    seen_latch = latch; seen_be = byte_sel; seen_p_in = p_in;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic wb_cycle(input logic w, input logic [4:0] a, input logic [31:0] d,
                          input logic [3:0] be, output logic [31:0] q);
    int waited = 0;
    @(negedge clk);
    cyc = 1'b1; stb = 1'b1; we = w; adr = a; dat_i = d; sel = be;
    @(negedge clk);
    while (!ack) begin
      waited++;
      @(negedge clk);
    end
    check(waited == 0, "ack in second cycle");
    q = dat_o;
    cyc = 1'b0; stb = 1'b0; we = 1'b0;
    @(negedge clk);
    check(!ack, "ack one cycle");
  endtask

  task automatic wb_write(input logic [4:0] a, input logic [31:0] d, input logic [3:0] be = 4'hf);
    logic [31:0] q;
    wb_cycle(1'b1, a, d, be, q);
  endtask

  task automatic wb_read(input logic [4:0] a, output logic [31:0] q);
    wb_cycle(1'b0, a, '0, 4'hf, q);
  endtask

  // One-cycle pulse of xfer_done while tip is high.
  task automatic finish_transfer();
    @(negedge clk);
    xfer_done = 1'b1;
    @(negedge clk);
    xfer_done = 1'b0;
    tip = 1'b0;
  endtask

  initial begin
    logic [31:0] q;
    int nl;
    rst = 1'b1; adr = '0; dat_i = '0; sel = '0; we = 1'b0; stb = 1'b0; cyc = 1'b0;
    rx_data = '0; tip = 1'b0; xfer_done = 1'b0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    check(ctrl == '0 && divider == '0 && ss == '0 && !irq && !ack, "reset state");

    // Control registers.
    wb_write(5'h10, 32'hffff_fe7f & ~32'h100);  // everything but GO
    check(ctrl.len == 7'h7f && ctrl.rx_neg && ctrl.tx_neg && ctrl.lsb && ctrl.ie && ctrl.ass && !ctrl.go,
          "ctrl fields");
    wb_read(5'h10, q);
    check(q == 32'h0000_3e7f, $sformatf("ctrl readback %h", q));
    wb_write(5'h14, 32'hffff_1234);
    check(divider == 16'h1234, "divider");
    wb_read(5'h14, q);
    check(q == 32'h0000_1234, "divider readback");
    wb_write(5'h18, 32'h0000_01a5);
    check(ss == 8'ha5, "ss");
    wb_read(5'h18, q);
    check(q == 32'h0000_00a5, "ss readback");

    // Data words: reads come from rx_data, writes become latch strobes.
    rx_data = {32'h4444_4444, 32'h3333_3333, 32'h2222_2222, 32'h1111_1111};
    for (int w = 0; w < 4; w++) begin
      wb_read(5'(4 * w), q);
      check(q == rx_data[32 * w +: 32], $sformatf("data word %0d read", w));
      nl = n_latch;
      wb_write(5'(4 * w), 32'hcafe_0000 + 32'(w), 4'(w + 1));
      check(n_latch == nl + 1 && seen_latch == 4'(1 << w) && seen_be == 4'(w + 1)
            && seen_p_in == 32'hcafe_0000 + 32'(w), $sformatf("data word %0d write", w));
    end
    nl = n_latch;
    wb_read(5'h00, q);
    check(n_latch == nl, "no latch on read");

    // GO, write blocking, xfer_done and the interrupt.
    wb_write(5'h10, 32'h0000_1108);  // IE, GO, len 8
    check(ctrl.go && ctrl.ie && ctrl.len == 7'd8, "go set");
    tip = 1'b1;
    nl = n_latch;
    wb_write(5'h14, 32'h0000_0001);
    wb_write(5'h18, 32'h0000_0000);
    wb_write(5'h10, 32'h0000_0020);
    wb_write(5'h04, 32'h0);
    check(divider == 16'h1234 && ss == 8'ha5 && ctrl.len == 7'd8 && ctrl.go, "writes blocked in transfer");
    check(n_latch == nl, "data write blocked in transfer");
    wb_read(5'h10, q);
    check(q[8] == 1'b1, "busy reads GO");
    check(!irq, "no irq yet");
    finish_transfer();
    check(!ctrl.go, "go cleared by xfer_done");
    check(irq, "irq raised");
    @(negedge clk);
    check(irq, "irq held");
    wb_read(5'h10, q);
    check(!irq, "irq cleared by access");
    check(q[8] == 1'b0, "GO reads 0 after transfer");

    // Without IE no interrupt.
    wb_write(5'h10, 32'h0000_0108);
    tip = 1'b1;
    finish_transfer();
    check(!ctrl.go && !irq, "no irq without IE");
    wb_write(5'h14, 32'h0000_0007);
    check(divider == 16'h0007, "writes accepted after transfer");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
