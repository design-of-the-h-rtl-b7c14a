// tb_hnet_rx_decision: receive decision of one station, with the bus lines
// driven by the testbench. For random destinations and node numbers it
// checks the three outcomes latched at the start of DEST: not addressed
// (permit, no reception), addressed with a free FIFO (permit and receive,
// also for destination 0 = broadcast) and addressed with a used FIFO
// (collision, permit held back). Also checks that the decision is taken
// once (words arriving while DEST is still held do not change it), that the
// latch clears when the network goes idle, that DCLK rising edges become
// single shift-in strobes only while receiving, and that receive clear
// frees the FIFO.
module tb_hnet_rx_decision;
  import hnet_pkg::*;
  logic clk = 0, rst = 1, rcvclr = 0, bus_dclk = 0;
  logic [7:0] node_id;
  hbus_ctl_t bus;
  logic [15:0] bus_data;
  logic collis_drv, decis_hold, rx_en, shift_in, used;
  always #5 clk = ~clk;
  hnet_rx_decision dut (.clk, .rst, .rcvclr, .node_id, .bus, .bus_data, .bus_dclk,
                        .grp_we(1'b0), .grp_addr(8'h0), .grp_set(1'b0),
                        .collis_drv, .decis_hold, .rx_en, .shift_in, .used);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  int strobes;
  always @(posedge clk) if (shift_in) strobes++;

  initial begin
    logic [7:0] dest;
    bit addressed, was_used, long_dest;
    bus = '0; bus_data = '0; node_id = 8'd5;
    repeat (2) @(negedge clk); rst = 0;
    @(negedge clk);
    check(decis_hold && !collis_drv && !rx_en, "idle: permit held, no collision");
    for (int t = 0; t < 300; t++) begin
      node_id = 8'($urandom_range(1, 255));
      case ($urandom_range(0, 3))
        0: dest = node_id;
        1: dest = 8'h00;
        default: dest = 8'($urandom);
      endcase
      addressed = (dest == node_id) || (dest == 0);
      was_used  = used;
      bus.actv = 1; @(negedge clk);
      long_dest = ($urandom_range(0, 1) == 1);
      bus_data = {8'($urandom), dest}; bus.dest = 1; @(negedge clk);
      // a slow master may hold DEST while the words already flow
      if (!long_dest) bus.dest = 0;
      bus_data = {8'($urandom), 8'(dest + 1)}; @(negedge clk);
      check(collis_drv == (addressed && was_used), "collision iff addressed and FIFO used");
      check(decis_hold == (addressed && was_used), "permit held only when blocking");
      check(rx_en == (addressed && !was_used), "receive iff addressed and FIFO free");
      strobes = 0;
      for (int k = 0; k < 3; k++) begin
        bus_dclk = 1; repeat (2) @(negedge clk); bus_dclk = 0; repeat (2) @(negedge clk);
      end
      bus.dest = 0;
      check(rx_en == (addressed && !was_used) && collis_drv == (addressed && was_used),
            "decision unchanged until the network goes idle");
      check(strobes == (rx_en ? 3 : 0), $sformatf("%0d shift-in strobes", strobes));
      bus.actv = 0; @(negedge clk);
      check(!rx_en && !collis_drv && decis_hold, "idle clears the decision");
      if ($urandom_range(0, 2) == 0) begin
        rcvclr = 1; @(negedge clk); rcvclr = 0;
        check(!used, "receive clear frees the FIFO");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk); failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
