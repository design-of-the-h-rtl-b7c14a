// tb_hnet_hbus_clock: gated HBUS clock at its default HALF = 2. Checks: no
// clock unless /XMT low, EOT low and DECIS high; every pulse is HALF cycles
// high and pulses come every 2*HALF cycles; an enable that arrives during a
// high phase gives no partial pulse; SO strobes on each falling edge; the EOP
// word sets EOT, which stops the clock; /XTCLR clears EOT.
module tb_hnet_hbus_clock;
  localparam int HALF = 2;
  logic clk = 0, rst = 1, xmt_n = 1, xtclr_n = 1, decis = 0, eop_bit = 0;
  logic dclk, so, eot;
  always #5 clk = ~clk;
  hnet_hbus_clock dut (.clk, .rst, .xmt_n, .xtclr_n, .decis, .eop_bit, .dclk, .so, .eot);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  // pulse-width and period monitor
  int hi_len = 0, last_rise = -1, cyc = 0, rises = 0, sos = 0;
  logic dclk_q = 0;
  always @(posedge clk) if (!rst) begin
    cyc++;
    if (dclk) hi_len++;
    if (!dclk && dclk_q) begin
      check(hi_len == HALF, $sformatf("high phase %0d cycles", hi_len));
      hi_len = 0;
    end
    if (dclk && !dclk_q) begin
      if (last_rise >= 0 && xmt_n == 0)
        check(cyc - last_rise == 2 * HALF || cyc - last_rise > 2 * HALF, "period");
      last_rise = cyc; rises++;
    end
    if (so) begin
      sos++;
      check(!dclk && dclk_q, "SO on falling edge");
    end
    dclk_q <= dclk;
  end

  initial begin
    int r0, s0;
    repeat (3) @(negedge clk); rst = 0;
    xtclr_n = 0; @(negedge clk); xtclr_n = 1;
    // enable pieces missing
    xmt_n = 0; decis = 0; repeat (20) @(negedge clk);
    check(rises == 0, "no clock while DECIS low");
    xmt_n = 1; decis = 1; repeat (20) @(negedge clk);
    check(rises == 0, "no clock while /XMT high");
    // enable arriving in mid high phase of the free-running oscillator
    while (!(dut.osc_high && !dut.period_start)) @(negedge clk);
    xmt_n = 0; #1;
    check(!dclk, "no partial pulse when enabled in a high phase");
    r0 = rises; s0 = sos;
    repeat (10 * 2 * HALF) @(negedge clk);
    check(rises - r0 >= 9 && rises - r0 <= 10, $sformatf("%0d pulses in 10 periods", rises - r0));
    // last word: EOP set, next falling edge latches EOT and the clock stops
    eop_bit = 1;
    while (!so) @(negedge clk);
    @(negedge clk);
    check(eot, "EOT latched from EOP on falling edge");
    eop_bit = 0;
    r0 = rises; repeat (20) @(negedge clk);
    check(rises == r0, "clock stopped by EOT");
    xtclr_n = 0; @(negedge clk); xtclr_n = 1; #1;
    check(!eot, "/XTCLR clears EOT");
    xmt_n = 1; decis = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk); failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
