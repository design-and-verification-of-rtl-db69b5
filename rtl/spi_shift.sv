// spi_shift: data register and serial shifter of the SPI master.
//
// One MAX_CHAR-bit register (128 bits) holds the word to send and, as the
// transfer goes on, collects the word received: the bit at a position is put
// on s_out before the bit received for that same position is written over it,
// so the transmit and receive data share a single register.
//
// Loading: while no transfer is in progress, a write of p_in lands in the
// 32-bit word chosen by latch[i] (word i = bits 32*i+31..32*i), in the bytes
// enabled by byte_sel. Writes during a transfer are ignored. p_out shows the
// whole register at all times; after a transfer its low `len` bits (or its high
// bits when sending MSB first, see below) hold the received data.
//
// A transfer of n = len bits (len = 0 means 128) starts in the cycle after go
// is seen high with tip low; tip then stays high until the n-th falling edge
// of s_clk. Bit k of the transfer (k = 0 first on the wire) is register bit k
// when lsb = 1, and bit n-1-k when lsb = 0.
//   - s_out changes on the edge chosen by tx_negedge (1: falling, 0: rising).
//     When it changes on falling edges, the first bit is put out as the
//     transfer starts, ahead of the first rising edge.
//   - s_in is sampled on the edge chosen by rx_negedge (1: falling, 0: rising).
// pos_edge and neg_edge are the clock generator's strobes, high in the cycle
// before s_clk rises or falls, so s_out changes and s_in is taken together
// with the s_clk edge. last is high during the final bit of a transfer.
//
// The port list and widths follow the published block; the register sharing
// is the published idea. The start rule, the edge handling and the meaning
// of `last` are this design's choices. The caller must clear go in the cycle
// that ends a transfer (last && neg_edge), or a new transfer starts.
module spi_shift #(
  parameter int unsigned MAX_CHAR_P = spi_pkg::MAX_CHAR
) (
  input  logic                  clk,
  input  logic                  rst,         // synchronous, active high
  input  logic [3:0]            latch,       // word select for a write of p_in
  input  logic [3:0]            byte_sel,    // byte enables for that write
  input  logic [spi_pkg::LEN_W-1:0] len,         // bits per transfer, 0 = MAX_CHAR
  input  logic                  lsb,         // 1: least significant bit first
  input  logic                  go,          // start request
  input  logic                  pos_edge,    // s_clk rises at the next clk edge
  input  logic                  neg_edge,    // s_clk falls at the next clk edge
  input  logic                  rx_negedge,  // 1: sample s_in on falling edges
  input  logic                  tx_negedge,  // 1: change s_out on falling edges
  input  logic                  s_clk,       // serial clock, checked by assertions only
  input  logic                  s_in,
  input  logic [31:0]           p_in,
  output logic                  tip,         // transfer in progress
  output logic                  last,        // final bit of the transfer
  output logic [MAX_CHAR_P-1:0] p_out,
  output logic                  s_out
);

  localparam int unsigned CNT_W = $clog2(MAX_CHAR_P + 1);
  localparam int unsigned IDX_W = $clog2(MAX_CHAR_P);

  logic [MAX_CHAR_P-1:0] data;
  logic [CNT_W-1:0]      n_bits;     // length of the running transfer
  logic [CNT_W-1:0]      bits_left;  // falling edges still to come
  logic [CNT_W-1:0]      tx_cnt;     // bits put on s_out so far
  logic [CNT_W-1:0]      rx_cnt;     // bits taken from s_in so far
  logic [CNT_W-1:0]      start_bits;
  logic                  tx_clk, rx_clk;

  // Register position of bit k of an n-bit transfer.
  function automatic logic [IDX_W-1:0] bit_pos(input logic [CNT_W-1:0] k,
                                               input logic [CNT_W-1:0] n,
                                               input logic             lsb_first);
    logic [CNT_W-1:0] p;
    p = lsb_first ? k : CNT_W'(n - k - 1'b1);
    return IDX_W'(p);
  endfunction

  assign start_bits = (len == '0) ? CNT_W'(MAX_CHAR_P) : CNT_W'(len);
  assign tx_clk     = tip && (tx_negedge ? neg_edge : pos_edge);
  assign rx_clk     = tip && (rx_negedge ? neg_edge : pos_edge);
  assign last       = tip && (bits_left == CNT_W'(1));
  assign p_out      = data;

  always_ff @(posedge clk) begin
    if (rst) begin
      data      <= '0;
      tip       <= 1'b0;
      n_bits    <= '0;
      bits_left <= '0;
      tx_cnt    <= '0;
      rx_cnt    <= '0;
      s_out     <= 1'b0;
    end else if (!tip) begin
      for (int w = 0; w < 4; w++)
        if (latch[w] && (32*w < MAX_CHAR_P))
          for (int b = 0; b < 4; b++)
            if (byte_sel[b] && (32*w + 8*b + 8 <= MAX_CHAR_P))
              data[32*w + 8*b +: 8] <= p_in[8*b +: 8];
      if (go) begin
        tip       <= 1'b1;
        n_bits    <= start_bits;
        bits_left <= start_bits;
        rx_cnt    <= '0;
        if (tx_negedge) begin
          // First bit goes out ahead of the first rising edge.
          s_out  <= data[bit_pos('0, start_bits, lsb)];
          tx_cnt <= CNT_W'(1);
        end else begin
          tx_cnt <= '0;
        end
      end
    end else begin
      if (tx_clk && (tx_cnt < n_bits)) begin
        s_out  <= data[bit_pos(tx_cnt, n_bits, lsb)];
        tx_cnt <= tx_cnt + 1'b1;
      end
      if (rx_clk && (rx_cnt < n_bits)) begin
        data[bit_pos(rx_cnt, n_bits, lsb)] <= s_in;
        rx_cnt <= rx_cnt + 1'b1;
      end
      if (neg_edge) begin
        bits_left <= bits_left - 1'b1;
        if (bits_left == CNT_W'(1))
          tip <= 1'b0;
      end
    end
  end

  // The strobes must agree with the level of the serial clock.
  a_pos_from_low:  assert property (@(posedge clk) disable iff (rst) pos_edge |-> !s_clk);
  a_neg_from_high: assert property (@(posedge clk) disable iff (rst) neg_edge |->  s_clk);

endmodule
