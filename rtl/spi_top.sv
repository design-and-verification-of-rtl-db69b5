// spi_top: SPI master core with a Wishbone slave host interface.
//
// A host on a Wishbone bus writes up to 128 bits into the data words, sets
// the clock divider, the slave selects and the control word (length, bit
// order, which SCLK edges drive MOSI and sample MISO, interrupt enable,
// automatic slave select) and finally sets GO. The core then clocks out
// `len` bits on mosi_pad_o while it clocks in the same number from
// miso_pad_i, both in the one shared data register, and clears GO (and
// raises wb_int_o if enabled) when the last bit is done. The host then reads
// the received bits back from the same data words.
//
// Structure (three parts, as published): spi_wb_if decodes the bus and holds
// the control registers, spi_clk_gen makes SCLK = wb_clk / ((DIVIDER+1)*2)
// while tip is high, and spi_shift moves the data. SCLK idles low.
//
// Slave selects: ss_pad_o is active low, one line per slave (SS_NB lines).
// With ASS = 0 a line is low whenever its SS bit is set; with ASS = 1 only
// while a transfer is in progress.
//
// Timing: a register access takes two cycles (request, then ack). SCLK first
// rises DIVIDER+2 clock edges after the edge that takes the GO write, and a
// transfer of n bits lasts n*2*(DIVIDER+1) cycles from there, less one half
// period (GO clears with the last falling edge of SCLK).
//
// Port names and widths follow the published top level. SS_NB = 1 matches
// the single slave-select line drawn there; it may be raised to address more
// slaves.
module spi_top #(
  parameter int unsigned SS_NB = 1
) (
  input  logic             wb_clk_i,
  input  logic             wb_rst_i,
  input  logic [4:0]       wb_adr_i,
  input  logic [31:0]      wb_dat_i,
  input  logic [3:0]       wb_sel_i,
  input  logic             wb_we_i,
  input  logic             wb_stb_i,
  input  logic             wb_cyc_i,
  output logic [31:0]      wb_dat_o,
  output logic             wb_ack_o,
  output logic             wb_int_o,
  output logic [SS_NB-1:0] ss_pad_o,
  output logic             sclk_pad_o,
  output logic             mosi_pad_o,
  input  logic             miso_pad_i
);

  spi_pkg::spi_ctrl_t               ctrl;
  logic [spi_pkg::DIV_W-1:0]        divider;
  logic [SS_NB-1:0]                 ss;
  logic [3:0]                       latch, byte_sel;
  logic [31:0]                      p_in;
  logic [spi_pkg::MAX_CHAR-1:0]     p_out;
  logic                             tip, last, s_clk, pos_edge, neg_edge;
  logic                             xfer_done;

  assign xfer_done = last && neg_edge;

  spi_wb_if #(.SS_NB(SS_NB)) u_wb_if (
    .wb_clk_i, .wb_rst_i, .wb_adr_i, .wb_dat_i, .wb_sel_i, .wb_we_i,
    .wb_stb_i, .wb_cyc_i, .wb_dat_o, .wb_ack_o, .wb_int_o,
    .rx_data (p_out),
    .tip, .xfer_done, .ctrl, .divider, .ss, .latch, .byte_sel, .p_in
  );

  spi_clk_gen #(.DIV_W(spi_pkg::DIV_W)) u_clk_gen (
    .wb_clk   (wb_clk_i),
    .wb_reset (wb_rst_i),
    .go_busy  (tip),
    .divider,
    .s_clk,
    .cpol_0   (pos_edge),
    .cpol_1   (neg_edge)
  );

  spi_shift #(.MAX_CHAR_P(spi_pkg::MAX_CHAR)) u_shift (
    .clk        (wb_clk_i),
    .rst        (wb_rst_i),
    .latch, .byte_sel,
    .len        (ctrl.len),
    .lsb        (ctrl.lsb),
    .go         (ctrl.go),
    .pos_edge, .neg_edge,
    .rx_negedge (ctrl.rx_neg),
    .tx_negedge (ctrl.tx_neg),
    .s_clk,
    .s_in       (miso_pad_i),
    .p_in,
    .tip, .last, .p_out,
    .s_out      (mosi_pad_o)
  );

  assign sclk_pad_o = s_clk;
  assign ss_pad_o   = ~(ss & {SS_NB{!ctrl.ass || tip}});

endmodule
