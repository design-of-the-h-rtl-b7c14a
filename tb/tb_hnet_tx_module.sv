// tb_hnet_tx_module: one transmit section on its own bus. The testbench
// resolves the station's drives onto the bus lines and adds what other
// stations would do: a rival that also drives its ID, receivers that assert
// HBUS-COLLIS after DEST, and receivers that hold HBUS-DECIS low.
// Checks: each packet goes out word for word followed by the checksum word
// with EOP, the first word is on the bus while DEST is asserted, an ID
// clash or a receiver collision makes the station retry and the packet
// survives the retry, DCLK stays off while DECIS is low, and TX EMPTY
// comes back after the transfer.
module tb_hnet_tx_module;
  import hnet_pkg::*;
  logic clk = 0, rst = 1, host_si = 0, send = 0;
  logic [7:0] node_id = 8'd6;
  logic [15:0] host_d = '0;
  logic tx_empty, eot, actv_drv, collis_drv, dest_drv, xmt_en, eop_drv, dclk_drv;
  logic [15:0] data_drv, id_drv, bus_data;
  logic [4:0] uc_state;
  hbus_ctl_t bus;
  logic rival_id = 0, rcv_collis = 0, rcv_hold = 0;
  always #5 clk = ~clk;

  hnet_tx_module dut (.clk, .rst, .uc_tick(1'b1), .node_id, .host_si, .host_d, .send,
                      .tx_empty, .eot, .bus, .bus_data, .actv_drv, .collis_drv, .dest_drv,
                      .xmt_en, .data_drv, .eop_drv, .dclk_drv, .id_drv, .uc_state);

  // a rival that drives its ID whenever ours is on the bus; receivers that
  // answer DEST with a collision when told to
  logic dest_q = 0, late_coll = 0;
  always @(posedge clk) begin
    dest_q <= bus.dest;
    if (!bus.actv) late_coll <= 0;
    else if (bus.dest && rcv_collis) late_coll <= 1;
  end
  always_comb begin
    bus.actv   = actv_drv;
    bus.dest   = dest_drv;
    bus.collis = collis_drv || late_coll;
    bus.decis  = !rcv_hold && !bus.dest && !dest_q && !late_coll && bus.actv;
    bus_data   = id_drv | ((rival_id && id_drv != 0) ? 16'h0040 : 16'h0) | (xmt_en ? data_drv : '0);
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  // word capture on DCLK rising edges
  logic [16:0] got[$];
  logic dclk_q = 0;
  int dest_seen = 0, idcoll = 0, latecoll = 0, dclk_when_held = 0;
  logic [15:0] dest_word;
  always @(posedge clk) begin
    dclk_q <= dclk_drv;
    if (dclk_drv && !dclk_q) got.push_back({eop_drv, bus_data});
    if (dest_drv) begin dest_seen++; dest_word = bus_data; end
    if (uc_state == 5'h0C && $past(uc_state) != 5'h0C) idcoll++;
    if (uc_state == 5'h1B && $past(uc_state) != 5'h1B) latecoll++;
    if (rcv_hold && dclk_drv) dclk_when_held++;
  end

  task automatic send_packet(input int len, input bit clash, input bit coll, input bit hold);
    logic [15:0] w[$];
    logic [15:0] s;
    int ic0, lc0;
    while (!tx_empty) @(negedge clk);
    w.push_back({node_id, 8'd3});
    for (int k = 0; k < len; k++) w.push_back(16'($urandom));
    foreach (w[k]) begin host_si = 1; host_d = w[k]; @(negedge clk); end
    host_si = 0;
    got.delete(); dest_seen = 0; ic0 = idcoll; lc0 = latecoll;
    rival_id = clash; rcv_collis = coll; rcv_hold = hold;
    send = 1; @(negedge clk); send = 0;
    // let the disturbance act once, then withdraw it
    if (clash) begin while (idcoll == ic0) @(negedge clk); rival_id = 0; end
    if (coll) begin while (latecoll == lc0) @(negedge clk); rcv_collis = 0; end
    if (hold) begin
      while (dest_seen == 0) @(negedge clk);
      repeat (30) @(negedge clk);
      check(got.size() == 0, "no DCLK while DECIS is held low");
      rcv_hold = 0;
    end
    while (!(uc_state == 5'h00 || uc_state == 5'h01) || !tx_empty) @(negedge clk);
    s = 0; foreach (w[k]) s += w[k];
    check(dest_word == w[0], "first word on the bus during DEST");
    check(got.size() == w.size() + 1, $sformatf("%0d words sent, expected %0d", got.size(), w.size() + 1));
    foreach (w[k]) if (k < got.size()) check(got[k] == {1'b0, w[k]}, $sformatf("word %0d", k));
    if (got.size() == w.size() + 1)
      check(got[w.size()] == {1'b1, 16'(-s)}, "checksum word with EOP");
    if (clash) check(idcoll > ic0, "ID collision handled");
    if (coll)  check(latecoll > lc0, "receiver collision handled");
  endtask

  initial begin
    repeat (3) @(negedge clk); rst = 0;
    repeat (3) @(negedge clk);
    check(tx_empty && !actv_drv && !xmt_en, "idle after reset");
    send_packet(4, 0, 0, 0);
    send_packet(10, 1, 0, 0);
    send_packet(3, 0, 1, 0);
    send_packet(5, 0, 0, 1);
    send_packet(HNET_FIFO_DEPTH - 2, 0, 0, 0);
    for (int t = 0; t < 10; t++)
      send_packet($urandom_range(0, 30), $urandom_range(0, 1), $urandom_range(0, 1), 0);
    check(dclk_when_held == 0, "DCLK never ran while DECIS held");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (500000) @(posedge clk); failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
