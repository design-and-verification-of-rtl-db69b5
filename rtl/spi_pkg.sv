// spi_pkg: constants and types shared by the SPI master core.
//
// The core is a Wishbone slave with a 5-bit byte address and 32-bit data. Its
// register map is this design's own choice (the published description only
// names the control fields through the shift-register ports): four data words,
// then the control, divider and slave-select registers, one 32-bit word each.
//
//   offset 0x00..0x0C  DATA0..DATA3  read: received bits, write: bits to send
//   offset 0x10        CTRL          see spi_ctrl_t
//   offset 0x14        DIVIDER       16-bit clock divider
//   offset 0x18        SS            slave-select bits, one per slave
//
// CTRL layout (bit 31 down to bit 0), packed into spi_ctrl_t:
//   [13] ASS     drive the selected slave-select lines automatically during a transfer
//   [12] IE      raise wb_int_o at the end of a transfer
//   [11] LSB     send and receive least significant bit first
//   [10] TX_NEG  change MOSI on the falling edge of SCLK (else on the rising edge)
//   [9]  RX_NEG  sample MISO on the falling edge of SCLK (else on the rising edge)
//   [8]  GO      write 1 to start; reads 1 while the transfer is busy
//   [6:0] LEN    number of bits in the transfer, 0 meaning 128
package spi_pkg;

  // Width of the shared transmit/receive register and of the length field.
  localparam int unsigned MAX_CHAR   = 128;
  localparam int unsigned LEN_W      = 7;
  localparam int unsigned DIV_W      = 16;
  localparam int unsigned WB_DATA_W  = 32;
  localparam int unsigned WB_ADR_W   = 5;
  localparam int unsigned DATA_WORDS = MAX_CHAR / WB_DATA_W;

  // Word index (wb_adr_i[4:2]) of each register.
  typedef enum logic [2:0] {
    REG_DATA0   = 3'd0,
    REG_DATA1   = 3'd1,
    REG_DATA2   = 3'd2,
    REG_DATA3   = 3'd3,
    REG_CTRL    = 3'd4,
    REG_DIVIDER = 3'd5,
    REG_SS      = 3'd6
  } spi_reg_e;

  typedef struct packed {
    logic [17:0]      reserved_hi;  // [31:14]
    logic             ass;          // [13]
    logic             ie;           // [12]
    logic             lsb;          // [11]
    logic             tx_neg;       // [10]
    logic             rx_neg;       // [9]
    logic             go;           // [8]
    logic             reserved_lo;  // [7]
    logic [LEN_W-1:0] len;          // [6:0]
  } spi_ctrl_t;

  // Number of bits a LEN field value stands for (0 encodes MAX_CHAR).
  function automatic logic [LEN_W:0] char_bits(input logic [LEN_W-1:0] len);
    return (len == '0) ? (LEN_W+1)'(MAX_CHAR) : {1'b0, len};
  endfunction

endpackage
