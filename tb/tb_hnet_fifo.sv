// tb_hnet_fifo: self-checking test of the packet FIFO at its default size
// (17 bits x 128 words). A queue is the reference model. Checks fall-through
// head, order, full at 128 words with the 129th write dropped, zero head when
// empty, simultaneous read/write, and flush.
module tb_hnet_fifo;
  localparam int W = 17, D = 128;
  logic clk = 0, rst = 1, clr = 0, si = 0, so = 0;
  logic [W-1:0] d = '0, q;
  logic empty, full;
  logic [$clog2(D+1)-1:0] count;
  always #5 clk = ~clk;

  hnet_fifo dut (.clk, .rst, .clr, .si, .d, .so, .q, .empty, .full, .count);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  logic [W-1:0] model [$];
  task automatic step(input bit w, input logic [W-1:0] wd, input bit r);
    si = w; d = wd; so = r;
    @(posedge clk); #1;
    if (r && model.size() > 0) void'(model.pop_front());
    if (w && (model.size() < D || r)) model.push_back(wd);
    si = 0; so = 0;
    check(count == model.size(), $sformatf("count %0d model %0d", count, model.size()));
    check(empty == (model.size() == 0), "empty flag");
    check(full == (model.size() == D), "full flag");
    check(q == (model.size() ? model[0] : '0), $sformatf("head %h model %h", q, model.size() ? model[0] : '0));
  endtask

  initial begin
    repeat (2) @(posedge clk); #1 rst = 0;
    check(empty && q == '0, "empty after reset with zero head");
    for (int i = 0; i < D + 3; i++) step(1, W'($urandom), 0);   // fill and overfill
    check(full && count == D, "full at 128 words");
    for (int i = 0; i < 40; i++) step(0, '0, 1);
    for (int i = 0; i < 300; i++) step($urandom_range(1), W'($urandom), $urandom_range(1));
    step(1, 17'h1abcd, 1);
    clr = 1; @(posedge clk); #1 clr = 0; model.delete();
    check(empty && count == 0 && q == '0, "flush empties the FIFO");
    for (int i = 0; i < 10; i++) step(1, W'(i), 0);
    for (int i = 0; i < 12; i++) step(0, '0, 1);                 // read past empty
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
