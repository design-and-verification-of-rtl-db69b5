// spi_wb_if: Wishbone slave register interface of the SPI master.
//
// Decodes single Wishbone classic cycles to the core's registers (map and
// CTRL layout in spi_pkg). Every cycle takes two clocks: the access is taken
// in the first cycle where wb_cyc_i and wb_stb_i are high, registers are
// written and read data is registered then, and wb_ack_o is high in the next
// cycle. wb_sel_i gives byte enables for writes to the data words; CTRL,
// DIVIDER and SS are written as whole words.
//
// Data words are not stored here: a write to DATA0..DATA3 is passed to the
// shift register as a one-cycle latch[i] strobe with byte_sel and p_in, and a
// read returns the matching 32 bits of the shift register's p_out.
// byte_sel and p_in are therefore wired straight from wb_sel_i and wb_dat_i;
// only the latch strobes qualify them.
//
// While a transfer is busy (GO set or tip high) all register writes are
// dropped, so the length, mode, divider and slave selects stay fixed during a
// transfer. GO is cleared by xfer_done, the strobe of the cycle that ends the
// transfer. wb_int_o is set by xfer_done when IE is set and cleared by the
// next Wishbone access.
//
// The Wishbone port names and widths follow the published top level; the
// register map, the two-cycle handshake, the write blocking and the interrupt
// rule are this design's choices.
module spi_wb_if #(
  parameter int unsigned SS_NB = 1  // number of slave-select lines
) (
  input  logic                          wb_clk_i,
  input  logic                          wb_rst_i,
  input  logic [spi_pkg::WB_ADR_W-1:0]  wb_adr_i,
  input  logic [31:0]                   wb_dat_i,
  input  logic [3:0]                    wb_sel_i,
  input  logic                          wb_we_i,
  input  logic                          wb_stb_i,
  input  logic                          wb_cyc_i,
  output logic [31:0]                   wb_dat_o,
  output logic                          wb_ack_o,
  output logic                          wb_int_o,
  // towards the shift register and clock generator
  input  logic [spi_pkg::MAX_CHAR-1:0]  rx_data,
  input  logic                          tip,
  input  logic                          xfer_done,
  output spi_pkg::spi_ctrl_t            ctrl,
  output logic [spi_pkg::DIV_W-1:0]     divider,
  output logic [SS_NB-1:0]              ss,
  output logic [3:0]                    latch,
  output logic [3:0]                    byte_sel,
  output logic [31:0]                   p_in
);

  import spi_pkg::*;

  logic     access, wr, busy;
  spi_reg_e reg_sel;

  assign access   = wb_cyc_i && wb_stb_i && !wb_ack_o;
  assign wr       = access && wb_we_i && !busy;
  assign busy     = tip || ctrl.go;
  assign reg_sel  = spi_reg_e'(wb_adr_i[4:2]);

  always_comb begin
    for (int i = 0; i < 4; i++)
      latch[i] = wr && (wb_adr_i[4:2] == 3'(i));
  end
  assign byte_sel = wb_sel_i;
  assign p_in     = wb_dat_i;

  always_ff @(posedge wb_clk_i) begin
    if (wb_rst_i) begin
      wb_ack_o <= 1'b0;
      wb_dat_o <= '0;
      wb_int_o <= 1'b0;
      ctrl     <= '0;
      divider  <= '0;
      ss       <= '0;
    end else begin
      wb_ack_o <= access;

      if (access) begin
        unique case (reg_sel)
          REG_DATA0:   wb_dat_o <= rx_data[31:0];
          REG_DATA1:   wb_dat_o <= rx_data[63:32];
          REG_DATA2:   wb_dat_o <= rx_data[95:64];
          REG_DATA3:   wb_dat_o <= rx_data[127:96];
          REG_CTRL:    wb_dat_o <= 32'(ctrl);
          REG_DIVIDER: wb_dat_o <= 32'(divider);
          REG_SS:      wb_dat_o <= 32'(ss);
          default:     wb_dat_o <= '0;
        endcase
      end

      if (wr) begin
        case (reg_sel)
          REG_CTRL: begin
            ctrl        <= spi_ctrl_t'(wb_dat_i);
            ctrl.reserved_hi <= '0;
            ctrl.reserved_lo <= 1'b0;
          end
          REG_DIVIDER: divider <= wb_dat_i[DIV_W-1:0];
          REG_SS:      ss      <= wb_dat_i[SS_NB-1:0];
          default: ;
        endcase
      end else if (xfer_done) begin
        ctrl.go <= 1'b0;
      end

      if (xfer_done && ctrl.ie)
        wb_int_o <= 1'b1;
      else if (access)
        wb_int_o <= 1'b0;
    end
  end

  // Wishbone: ack only answers a request and lasts one cycle.
  a_ack_one_cycle: assert property (@(posedge wb_clk_i) disable iff (wb_rst_i)
    wb_ack_o |=> !wb_ack_o);
  // A transfer ends only while one is running.
  a_done_in_xfer: assert property (@(posedge wb_clk_i) disable iff (wb_rst_i)
    xfer_done |-> tip);

endmodule
