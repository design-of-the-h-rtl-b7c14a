// tb_hnet_rx_idcmp: destination ID compare. After reset only the node's own
// number and broadcast 0 match. The host then sets and clears random group
// addresses; for every destination value MATCH is compared with a model of
// the table (own number, zero, or an entry that is set).
module tb_hnet_rx_idcmp;
  logic clk = 0, rst = 1, grp_we = 0, grp_set = 0, match;
  logic [7:0] node_id = 8'd21, dest_id = '0, grp_addr = '0;
  always #5 clk = ~clk;
  hnet_rx_idcmp dut (.clk, .rst, .node_id, .dest_id, .grp_we, .grp_addr, .grp_set, .match);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  bit tbl [256];

  task automatic sweep();
    for (int a = 0; a < 256; a++) begin
      dest_id = 8'(a); #1;
      check(match == (a == 0 || a == int'(node_id) || tbl[a]),
            $sformatf("dest %0d: match %0b", a, match));
    end
  endtask

  initial begin
    repeat (2) @(negedge clk); rst = 0;
    foreach (tbl[a]) tbl[a] = 0;
    sweep();
    for (int r = 0; r < 20; r++) begin
      repeat ($urandom_range(1, 8)) begin
        grp_we = 1; grp_addr = 8'($urandom); grp_set = ($urandom_range(0, 2) != 0);
        tbl[grp_addr] = grp_set;
        @(negedge clk);
      end
      grp_we = 0;
      if (r % 5 == 0) node_id = 8'($urandom_range(1, 255));
      sweep();
      @(negedge clk);
    end
    rst = 1; @(negedge clk); rst = 0;
    foreach (tbl[a]) tbl[a] = 0;
    sweep();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk); failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
