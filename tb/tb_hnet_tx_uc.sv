// tb_hnet_tx_uc: the microcontroller running the transmit microcode, with
// its seven status inputs driven by the testbench. The sequence of ROM
// addresses is compared with the transmit algorithm's state diagram along
// every branch: wait for SEND, lost test and set, ID collision and its
// wait for the network to go idle, late collision, receiver-forced abort,
// transmission to EOT. Control outputs are checked in key states, a
// held clock enable freezes the controller, and reset returns to zero.
module tb_hnet_tx_uc;
  import hnet_pkg::*;
  logic clk = 0, rst = 1, tick = 1;
  uc_in_t in;
  csd_t csd;
  logic [4:0] upc, state;
  always #5 clk = ~clk;
  hnet_tx_uc dut (.clk, .rst, .tick, .in, .csd, .upc, .state);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  // advance one controller clock and check the state reached
  task automatic expect_state(input logic [4:0] s);
    @(posedge clk); #1;
    check(state == s, $sformatf("state %h, expected %h", state, s));
  endtask

  initial begin
    in = '{senda_n: 1, empty_n: 0, eot: 0, master_n: 1, hactv: 0, hcollis: 0, idok: 0};
    repeat (2) @(posedge clk); #1;
    check(csd == '0 && state == 0, "reset: all control lines low");
    rst = 0;
    expect_state(5'h00);
    check(csd.xtclr_n && csd.xmt_n && !csd.release_n, "state 0 outputs");
    expect_state(5'h03); expect_state(5'h03); expect_state(5'h03);
    in.senda_n = 0;
    expect_state(5'h03);             // /SENDA seen at this load, branch next
    expect_state(5'h02);
    check(csd.chclk, "CHCLK high in state 2");
    in.senda_n = 1;                  // host may drop SEND now
    @(posedge clk); #1;
    check(state == 5'h04 || state == 5'h05, "state 4 or 5 after CHCLK");
    check(csd.tst_set, "TST&SET in state 4/5");
    in.master_n = 1;                 // network busy
    expect_state(5'h07); expect_state(5'h09);
    check(csd.tst_set, "retry TST&SET in state 9");
    expect_state(5'h07); expect_state(5'h09);
    in.master_n = 0;                 // won
    expect_state(5'h07); expect_state(5'h08);
    check(csd.iden, "IDEN in state 8");
    in.idok = 0;                     // another master
    expect_state(5'h0A); expect_state(5'h0B); expect_state(5'h0C);
    check(csd.collis && !csd.release_n, "collision: COLLIS and /RELEASE");
    in.hactv = 1;
    expect_state(5'h0F); expect_state(5'h0F); expect_state(5'h0F);
    tick = 0; repeat (3) @(posedge clk); #1;
    check(state == 5'h0F, "controller frozen without clock enable");
    tick = 1;
    in.hactv = 0;
    expect_state(5'h0F); expect_state(5'h0E);
    check(!csd.collis && !csd.iden, "collision removed in 0E");
    in.master_n = 0;
    expect_state(5'h10); expect_state(5'h07); expect_state(5'h08);
    in.idok = 1; in.hcollis = 1;     // sole master but someone saw a collision
    expect_state(5'h0A); expect_state(5'h0B); expect_state(5'h0D);
    expect_state(5'h12); expect_state(5'h15);
    in.hactv = 0;
    expect_state(5'h0F); expect_state(5'h0E);
    in.hcollis = 0;
    expect_state(5'h10); expect_state(5'h07); expect_state(5'h08);
    expect_state(5'h0A); expect_state(5'h0B); expect_state(5'h0D);
    expect_state(5'h12); expect_state(5'h14);
    check(!csd.iden, "ID removed in 14");
    expect_state(5'h16);
    check(!csd.xmt_n && csd.dest, "state 16: FIFO on bus, DEST");
    in.hcollis = 1;                  // receiver has no free FIFO
    expect_state(5'h17);
    check(!csd.dest, "DEST dropped in 17");
    expect_state(5'h18);             // HCOLLIS sampled leaving 17
    expect_state(5'h1B);
    check(csd.collis && !csd.release_n && csd.xmt_n, "abort in 1B");
    in.hcollis = 0;
    expect_state(5'h0F); expect_state(5'h0E); expect_state(5'h10);
    expect_state(5'h07); expect_state(5'h08); expect_state(5'h0A);
    expect_state(5'h0B); expect_state(5'h0D); expect_state(5'h12);
    expect_state(5'h14); expect_state(5'h16); expect_state(5'h17);
    expect_state(5'h18); expect_state(5'h1A);
    in.eot = 0;
    expect_state(5'h1C); expect_state(5'h1C); expect_state(5'h1C);
    check(!csd.xmt_n, "transmitting in 1C");
    in.eot = 1;
    expect_state(5'h1C); expect_state(5'h1D);
    check(!csd.xtclr_n && !csd.release_n && csd.xmt_n, "1D: clear and release");
    in.eot = 0; in.senda_n = 1;
    @(posedge clk); #1;              // 00 and 01 hold the same word
    check(state == 5'h00 || state == 5'h01, "back to the idle loop");
    expect_state(5'h03);
    rst = 1; @(posedge clk); #1;
    check(state == 0 && csd == '0, "reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk); failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
