// tb_hnet_test_set: test-and-set semaphore. Checks: idle network -> set,
// /MASTER low already in the TST&SET cycle, /HBUS-ACTV driven; busy network
// -> stays clear, /MASTER high; /RELEASE clears; a TST&SET held high does not
// re-sample. Then random TST&SET, /RELEASE and HBUS-ACTV against a
// reference model of the flip-flop.
module tb_hnet_test_set;
  logic clk = 0, rst = 1, tst_set = 0, release_n = 1, hactv = 0;
  logic actv_drv, master_n;
  always #5 clk = ~clk;
  hnet_test_set dut (.clk, .rst, .tst_set, .release_n, .hactv, .actv_drv, .master_n);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst = 0;
    @(negedge clk);
    check(!actv_drv && master_n, "clear after reset");
    // idle network
    hactv = 0; tst_set = 1; #1;
    check(!master_n, "/MASTER low in the TST&SET cycle when idle");
    @(negedge clk);
    check(actv_drv && !master_n, "won: drives /HBUS-ACTV");
    hactv = 1;          // own drive seen on the bus
    repeat (3) @(negedge clk);
    check(actv_drv && !master_n, "held TST&SET does not re-sample");
    tst_set = 0; @(negedge clk);
    release_n = 0; @(negedge clk);
    check(!actv_drv && master_n, "/RELEASE clears");
    release_n = 1; @(negedge clk);
    // busy network
    hactv = 1; tst_set = 1; #1;
    check(master_n, "/MASTER high in the TST&SET cycle when busy");
    @(negedge clk);
    check(!actv_drv && master_n, "lost: no drive");
    tst_set = 0; @(negedge clk);
    hactv = 0; repeat (2) @(negedge clk);
    check(!actv_drv, "no set without a TST&SET edge");
    tst_set = 1; @(negedge clk); tst_set = 0; @(negedge clk);
    check(actv_drv && !master_n, "second attempt wins on idle network");
    // random stimulus against a reference model
    begin
      bit m_q, m_tq, rise;
      m_q = actv_drv; m_tq = tst_set;
      for (int t = 0; t < 2000; t++) begin
        tst_set = 1'($urandom); release_n = ($urandom_range(0, 7) != 0); hactv = 1'($urandom);
        #1;
        rise = tst_set && !m_tq;
        check(master_n == !((rise && release_n) ? !hactv : m_q), "model: /MASTER");
        check(actv_drv == m_q, "model: ACTV drive");
        if (!release_n) m_q = 0; else if (rise) m_q = !hactv;
        m_tq = tst_set;
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk); failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
