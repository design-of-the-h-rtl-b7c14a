// tb_hnet_rx_checksum: intact packets (checksum word = minus the sum of the
// rest) give done with no error; a packet with one word changed gives an
// error; words after the EOP word are ignored; clear resets.
module tb_hnet_rx_checksum;
  logic clk = 0, rst = 1, clr = 0, shift_in = 0;
  logic [16:0] word = '0;
  logic done, err;
  always #5 clk = ~clk;
  hnet_rx_checksum dut (.clk, .rst, .clr, .shift_in, .word, .done, .err);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  task automatic send_pkt(int len, bit corrupt);
    logic [15:0] s, w;
    s = 0;
    for (int k = 0; k < len; k++) begin
      w = 16'($urandom); s = s + w;
      if (corrupt && k == len / 2) w = w ^ 16'h0100;
      @(negedge clk); shift_in = 1; word = {1'b0, w};
      @(negedge clk); shift_in = 0;
      check(!done, "not done before EOP word");
    end
    @(negedge clk); shift_in = 1; word = {1'b1, 16'(-s)};
    @(negedge clk); shift_in = 0;
    check(done, "done after EOP word");
    check(err == corrupt, $sformatf("err=%b corrupt=%b", err, corrupt));
    @(negedge clk); shift_in = 1; word = {1'b0, 16'h1234};   // ignored
    @(negedge clk); shift_in = 0;
    check(done && err == corrupt, "result held after EOP");
    clr = 1; @(negedge clk); clr = 0;
    check(!done && !err, "clear");
  endtask

  initial begin
    repeat (2) @(negedge clk); rst = 0;
    for (int i = 0; i < 10; i++) send_pkt($urandom_range(20, 1), i % 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk); failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
