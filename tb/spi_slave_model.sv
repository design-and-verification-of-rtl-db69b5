// spi_slave_model: behavioural SPI slave for the testbenches (not synthesizable).
//
// It receives MOSI bits into rx_stream and sends the bits of tx_stream on
// MISO, both in wire order: bit k of a stream is the k-th bit on the wire.
// The edges it uses are set by two inputs, chosen by the testbench to pair
// with the master's settings:
//   sample_on_rise  1: take MOSI on rising SCLK edges, 0: on falling edges
//   drive_on_rise   1: change MISO on rising edges, 0: on falling edges, in
//                   which case the first bit is put out when the slave is armed
// The slave is armed (bit counters cleared) on a falling edge of sel_n or on
// a rising edge of arm. After that it counts edges without looking at sel_n,
// so a select line that rises together with the last clock edge does no harm.
// Bits beyond MAX_BITS are ignored.
module spi_slave_model #(
  parameter int unsigned MAX_BITS = 128
) (
  input  logic                sclk,
  input  logic                sel_n,
  input  logic                arm,
  input  logic                mosi,
  output logic                miso,
  input  logic                sample_on_rise,
  input  logic                drive_on_rise,
  input  logic [MAX_BITS-1:0] tx_stream,
  output logic [MAX_BITS-1:0] rx_stream,
  output int                  rx_count,
  output int                  tx_count
);

  initial begin
    miso      = 1'b0;
    rx_stream = '0;
    rx_count  = 0;
    tx_count  = 0;
  end

  task automatic do_arm();
    rx_count = 0;
    tx_count = 0;
    if (!drive_on_rise) begin
      miso     = tx_stream[0];
      tx_count = 1;
    end
  endtask

  task automatic do_sample();
    if (rx_count < MAX_BITS) begin
      rx_stream[rx_count] = mosi;
      rx_count++;
    end
  endtask

  task automatic do_drive();
    if (tx_count < MAX_BITS) begin
      miso = tx_stream[tx_count];
      tx_count++;
    end
  endtask

  always @(negedge sel_n) do_arm();
  always @(posedge arm)   do_arm();

  always @(posedge sclk) begin
    if (sample_on_rise) do_sample();
    if (drive_on_rise)  do_drive();
  end

  always @(negedge sclk) begin
    if (!sample_on_rise) do_sample();
    if (!drive_on_rise)  do_drive();
  end

endmodule
