// tb_hnet_tx_glue: host words pass to the FIFO with EOP clear; a CHCLK
// rising edge writes one word with EOP set holding minus the sum of the host
// words (so the packet sums to zero); a held CHCLK writes once; /XTCLR
// clears the sum and blocks writes.
module tb_hnet_tx_glue;
  logic clk = 0, rst = 1, xtclr_n = 1, host_si = 0, chclk = 0;
  logic [15:0] host_d = '0;
  logic fifo_si;
  logic [16:0] fifo_d;
  always #5 clk = ~clk;
  hnet_tx_glue dut (.clk, .rst, .xtclr_n, .host_si, .host_d, .chclk, .fifo_si, .fifo_d);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  int writes;
  always @(posedge clk) if (fifo_si) writes++;

  initial begin
    logic [15:0] s;
    repeat (2) @(negedge clk); rst = 0;
    for (int p = 0; p < 6; p++) begin
      xtclr_n = 0; @(negedge clk); xtclr_n = 1;
      s = 0; writes = 0;
      for (int k = 0; k < 1 + p * 7; k++) begin
        host_si = 1; host_d = 16'($urandom); s = s + host_d; #1;
        check(fifo_si && fifo_d == {1'b0, host_d}, "host word to FIFO");
        @(negedge clk);
      end
      host_si = 0; @(negedge clk);
      chclk = 1; #1;
      check(fifo_si && fifo_d[16], "checksum word carries EOP");
      check(16'(fifo_d[15:0] + s) == 16'h0, $sformatf("checksum %h for sum %h", fifo_d[15:0], s));
      repeat (3) @(negedge clk);
      chclk = 0; @(negedge clk);
      check(writes == 2 + p * 7, $sformatf("%0d writes, expected %0d", writes, 2 + p * 7));
    end
    xtclr_n = 0; host_si = 1; #1;
    check(!fifo_si, "no write during transmit clear");
    host_si = 0; xtclr_n = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk); failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
