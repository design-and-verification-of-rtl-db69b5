// spi_clk_gen: serial clock generator of the SPI master.
//
// Divides the Wishbone clock down to the serial clock:
//     f(s_clk) = f(wb_clk) / ((divider + 1) * 2)
// A down-counter is loaded with `divider`; when it reaches zero it reloads and
// s_clk toggles, so each half period lasts divider+1 wb_clk cycles. Any
// divider value, odd or even, gives a clock with an exact 50 % duty cycle.
//
// The generator runs only while go_busy (the shift register's transfer in
// progress flag) is high. While it is low, s_clk is held low (the idle level)
// and the counter is held at `divider`, so the first edge of a transfer comes
// divider+1 cycles after go_busy rises.
//
// cpol_0 and cpol_1 are one-cycle strobes, decoded from the counter, that
// announce the edge s_clk makes at the
// next wb_clk rising edge: cpol_0 before a rising edge of s_clk, cpol_1 before
// a falling edge. The shift register acts on them in the same cycle, so its
// outputs change together with s_clk.
//
// The port names and the divider width (16 bits) are the published ones; the
// idle level, the counter scheme and the meaning of the two strobes are this
// design's choices.
module spi_clk_gen #(
  parameter int unsigned DIV_W = 16
) (
  input  logic             wb_clk,
  input  logic             wb_reset,   // synchronous, active high
  input  logic             go_busy,    // transfer in progress
  input  logic [DIV_W-1:0] divider,
  output logic             s_clk,
  output logic             cpol_0,     // s_clk rises at the next wb_clk edge
  output logic             cpol_1      // s_clk falls at the next wb_clk edge
);

  logic [DIV_W-1:0] cnt;
  logic             cnt_zero;

  assign cnt_zero = (cnt == '0);

  always_ff @(posedge wb_clk) begin
    if (wb_reset) begin
      cnt   <= '0;
      s_clk <= 1'b0;
    end else if (!go_busy) begin
      cnt   <= divider;
      s_clk <= 1'b0;
    end else if (cnt_zero) begin
      cnt   <= divider;
      s_clk <= ~s_clk;
    end else begin
      cnt   <= cnt - 1'b1;
    end
  end

  assign cpol_0 = go_busy && cnt_zero && !s_clk;
  assign cpol_1 = go_busy && cnt_zero &&  s_clk;

  // The two strobes never coincide.
  a_strobes_exclusive: assert property (@(posedge wb_clk) disable iff (wb_reset)
    !(cpol_0 && cpol_1));

endmodule
