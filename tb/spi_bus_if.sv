// spi_bus_if: testbench interface bundling the SPI master's Wishbone side, its
// pads, and the control and result signals of the behavioural slave, so that
// class-based testbench components can reach them through one virtual
// interface.
interface spi_bus_if (input logic clk);
  // Wishbone side
  logic         rst;
  logic [4:0]   adr;
  logic [31:0]  dat_i, dat_o;
  logic [3:0]   sel;
  logic         we, stb, cyc, ack, irq;
  // SPI pads
  logic [0:0]   ss_n;
  logic         sclk, mosi, miso;
  // behavioural slave
  logic         arm, sample_on_rise, drive_on_rise;
  logic [127:0] slv_tx, slv_rx;
  int           slv_rx_count, slv_tx_count;

  // Wishbone rule: a request holds its address and data until acked.
  a_stable_until_ack: assert property (@(posedge clk) disable iff (rst)
    (cyc && stb && !ack) |=> $stable(adr) && $stable(we) || ack);
endinterface
