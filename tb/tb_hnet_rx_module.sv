// tb_hnet_rx_module: receive section with the testbench acting as the bus
// master (ACTV, DEST with the destination word on HBUS-DATA, DCLK pulses,
// EOP on the last word). Random packets with a correct or a spoiled
// checksum are sent to this station, to broadcast or to another station.
// Checks: the host reads back exactly the words sent, RCVEOP rises with the
// last word, the checksum verdict matches, a second packet before receive
// clear is answered with a collision and not stored, and packets for other
// stations are ignored.
module tb_hnet_rx_module;
  import hnet_pkg::*;
  localparam int DEPTH = HNET_FIFO_DEPTH;
  logic clk = 0, rst = 1, rcvclr = 0, host_so = 0, rcvdata_n = 1;
  logic bus_eop = 0, bus_dclk = 0;
  logic [7:0] node_id = 8'd9;
  hbus_ctl_t bus;
  logic [15:0] bus_data, rx_data;
  logic rx_empty, rx_avail, rx_eop, ck_done, ck_err, collis_drv, decis_hold;
  always #5 clk = ~clk;
  hnet_rx_module dut (.clk, .rst, .node_id, .rcvclr, .grp_we(1'b0), .grp_addr(8'h0), .grp_set(1'b0), .host_so, .rcvdata_n, .rx_data,
                      .rx_empty, .rx_avail, .rx_eop, .ck_done, .ck_err,
                      .bus, .bus_data, .bus_eop, .bus_dclk, .collis_drv, .decis_hold);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  logic [15:0] pkt[$];

  // build a packet: destination word, random body, checksum word
  task automatic build(input logic [7:0] dest, input int len, input bit bad);
    logic [15:0] s;
    pkt.delete();
    pkt.push_back({8'h33, dest});
    for (int k = 0; k < len; k++) pkt.push_back(16'($urandom));
    s = 0; foreach (pkt[k]) s += pkt[k];
    pkt.push_back(16'(-s) ^ (bad ? 16'h0100 : 16'h0));
  endtask

  // master side of one transfer; returns whether a collision was seen
  task automatic transfer(output bit coll);
    bus.actv = 1; @(negedge clk);
    bus_data = pkt[0]; bus.dest = 1; @(negedge clk);
    bus.dest = 0; @(negedge clk);
    coll = collis_drv;
    if (!coll) begin
      foreach (pkt[k]) begin
        bus_data = pkt[k]; bus_eop = (k == pkt.size() - 1);
        bus_dclk = 1; repeat (2) @(negedge clk); bus_dclk = 0; repeat (2) @(negedge clk);
      end
    end
    bus_eop = 0; bus_data = 0; bus.actv = 0; @(negedge clk);
  endtask

  initial begin
    bit coll, bad, mine;
    logic [7:0] dest;
    int len;
    bus = '0; bus_data = '0;
    repeat (2) @(negedge clk); rst = 0;
    rcvclr = 1; @(negedge clk); rcvclr = 0;
    for (int t = 0; t < 40; t++) begin
      len = (t == 0) ? DEPTH - 2 : $urandom_range(0, 20);
      bad = ($urandom_range(0, 3) == 0);
      case ($urandom_range(0, 2)) 0: dest = node_id; 1: dest = 0; default: dest = 8'd200; endcase
      mine = (dest == node_id) || (dest == 0);
      build(dest, len, bad);
      transfer(coll);
      check(!coll, "no collision with a free FIFO");
      if (!mine) begin
        check(rx_empty && !rx_avail, "packet for another station ignored");
        continue;
      end
      check(!rx_empty && ck_done, "packet received, checksum done");
      check(ck_err == bad, $sformatf("checksum verdict %0b, expected %0b", ck_err, bad));
      // a second packet while the first is unread is refused
      transfer(coll);
      check(coll, "collision while the input FIFO is in use");
      // host readout
      rcvdata_n = 0;
      foreach (pkt[k]) begin
        #1;
        check(rx_avail && rx_data == pkt[k], $sformatf("word %0d = %h, expected %h", k, rx_data, pkt[k]));
        check(!rx_eop, "RCVEOP not before last word");
        host_so = 1; @(negedge clk); host_so = 0;
      end
      rcvdata_n = 1; #1;
      check(rx_eop && !rx_avail, "RCVEOP after last word, FIFO empty");
      check(rx_data == 0, "host buffer off");
      rcvclr = 1; @(negedge clk); rcvclr = 0;
      check(rx_empty && !rx_eop && !ck_done, "receive clear");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (500000) @(posedge clk); failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
