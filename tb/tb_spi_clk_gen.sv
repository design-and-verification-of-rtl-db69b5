// tb_spi_clk_gen: self-checking test of the serial clock generator.
//
// For a set of divider values (even, odd, zero and the largest tried) the
// generator is enabled for a stretch of cycles. A reference computed from the
// number of enabled cycles alone (s_clk toggles once every divider+1 cycles,
// starting low) is compared every cycle with s_clk and with the two edge
// strobes. It also checks that s_clk returns low and stays still once go_busy
// drops, and measures the s_clk period against 2*(divider+1).
module tb_spi_clk_gen;
  localparam int unsigned DIV_W = 16;

  logic             clk = 1'b0;
  logic             rst;
  logic             go_busy;
  logic [DIV_W-1:0] divider;
  logic             s_clk, cpol_0, cpol_1;

  int checks = 0, failures = 0;

  spi_clk_gen #(.DIV_W(DIV_W)) dut (
    .wb_clk(clk), .wb_reset(rst), .go_busy, .divider, .s_clk, .cpol_0, .cpol_1
  );

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Run the generator for `cycles` enabled cycles with divider d.
  task automatic run(input int d, input int cycles);
    int t, toggles, last_rise, period;
    logic exp_clk, exp_c0, exp_c1;
    @(negedge clk);
    divider = DIV_W'(d);
    go_busy = 1'b0;
    @(negedge clk);
    check(s_clk == 1'b0 && !cpol_0 && !cpol_1, "idle state");
    go_busy = 1'b1;
    t = 0;
    last_rise = -1;
    period = -1;
    repeat (cycles) begin
      @(negedge clk);
      t++;
      toggles = t / (d + 1);
      exp_clk = toggles[0];
      exp_c0  = ((t + 1) % (d + 1) == 0) && !exp_clk;
      exp_c1  = ((t + 1) % (d + 1) == 0) &&  exp_clk;
      check(s_clk == exp_clk, $sformatf("s_clk d=%0d t=%0d", d, t));
      check(cpol_0 == exp_c0, $sformatf("cpol_0 d=%0d t=%0d", d, t));
      check(cpol_1 == exp_c1, $sformatf("cpol_1 d=%0d t=%0d", d, t));
      if (s_clk && t % (d + 1) == 0 && toggles % 2 == 1) begin
        if (last_rise >= 0) period = t - last_rise;
        last_rise = t;
      end
    end
    if (cycles >= 4 * (d + 1)) check(period == 2 * (d + 1), $sformatf("period d=%0d got %0d", d, period));
    go_busy = 1'b0;
    @(negedge clk);
    check(s_clk == 1'b0, "s_clk back low");
    repeat (3) begin
      @(negedge clk);
      check(s_clk == 1'b0 && !cpol_0 && !cpol_1, "stays idle");
    end
  endtask

  initial begin
    rst = 1'b1; go_busy = 1'b0; divider = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    run(0, 20);
    run(1, 30);
    run(2, 40);
    run(3, 50);
    run(6, 80);
    run(9, 33);   // stopped in the middle of a period
    run(255, 1100);
    for (int i = 0; i < 5; i++) run(int'($urandom_range(0, 20)), int'($urandom_range(10, 200)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
