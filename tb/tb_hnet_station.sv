// tb_hnet_station: one complete H-Station alone on the bus, sending packets
// to itself (its own number and broadcast). Checks the full path host ->
// output FIFO -> bus -> input FIFO -> host, the checksum verdict, and that
// a packet sent while the station's own input FIFO is still full is
// refused with a collision and goes through after the host empties it.
module tb_hnet_station;
  import hnet_pkg::*;
  logic clk = 0, rst = 1;
  logic [7:0] node_id = 8'd12;
  logic tx_reset = 0, host_si = 0, send = 0, rcvclr = 0, host_so = 0, rcvdata_n = 1;
  logic [15:0] host_d = '0, rx_data;
  logic tx_empty, eot, rx_empty, rx_avail, rx_eop, ck_done, ck_err;
  logic [4:0] uc_state;
  hbus_ctl_t bus;
  logic [15:0] bus_data, data_drv, id_drv;
  logic bus_eop, bus_dclk, actv_drv, collis_drv, dest_drv, decis_hold, xmt_en, eop_drv, dclk_drv;
  always #5 clk = ~clk;

  hnet_station dut (.clk, .rst, .node_id, .tx_reset, .uc_tick(1'b1), .host_si, .host_d, .send,
                    .tx_empty, .eot, .uc_state, .rcvclr, .grp_we(1'b0), .grp_addr(8'h0), .grp_set(1'b0), .host_so, .rcvdata_n, .rx_data,
                    .rx_empty, .rx_avail, .rx_eop, .ck_done, .ck_err, .bus, .bus_data,
                    .bus_eop, .bus_dclk, .actv_drv, .collis_drv, .dest_drv, .decis_hold,
                    .xmt_en, .data_drv, .eop_drv, .dclk_drv, .id_drv);

  always_comb begin
    bus.actv   = actv_drv;
    bus.collis = collis_drv;
    bus.dest   = dest_drv;
    bus.decis  = !decis_hold;
    bus_data   = id_drv | (xmt_en ? data_drv : '0);
    bus_eop    = xmt_en && eop_drv;
    bus_dclk   = xmt_en && dclk_drv;
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  int aborts = 0;
  always @(posedge clk) if (uc_state == 5'h1B && $past(uc_state) != 5'h1B) aborts++;

  logic [15:0] last[$];

  task automatic load_and_send(input logic [7:0] dest, input int len);
    last.delete();
    last.push_back({node_id, dest});
    for (int k = 0; k < len; k++) last.push_back(16'($urandom));
    while (!tx_empty) @(negedge clk);
    foreach (last[k]) begin host_si = 1; host_d = last[k]; @(negedge clk); end
    host_si = 0;
    send = 1; @(negedge clk); send = 0;
  endtask

  task automatic read_back(input logic [15:0] w[$]);
    logic [15:0] s;
    s = 0; foreach (w[k]) s += w[k];
    check(!rx_empty && ck_done && !ck_err, "packet received with good checksum");
    rcvdata_n = 0;
    foreach (w[k]) begin
      #1 check(rx_data == w[k], $sformatf("word %0d = %h, expected %h", k, rx_data, w[k]));
      host_so = 1; @(negedge clk); host_so = 0;
    end
    #1 check(rx_data == 16'(-s), "checksum word");
    host_so = 1; @(negedge clk); host_so = 0; rcvdata_n = 1;
    #1 check(rx_eop && !rx_avail, "RCVEOP at end");
    rcvclr = 1; @(negedge clk); rcvclr = 0;
  endtask

  initial begin
    logic [15:0] first[$];
    int a0;
    repeat (3) @(negedge clk); rst = 0;
    rcvclr = 1; @(negedge clk); rcvclr = 0;
    for (int t = 0; t < 8; t++) begin
      load_and_send((t % 2) ? node_id : 8'd0, $urandom_range(0, 40));
      while (rx_empty || !tx_empty || uc_state > 1) @(negedge clk);
      read_back(last);
    end
    // second packet while the first is still unread
    load_and_send(8'd0, 5);
    while (rx_empty || !tx_empty || uc_state > 1) @(negedge clk);
    first = last;
    a0 = aborts;
    load_and_send(node_id, 7);
    repeat (300) @(negedge clk);
    check(aborts > a0, "own full input FIFO forces a collision");
    check(!tx_empty, "refused packet kept for retry");
    read_back(first);
    while (rx_empty || !tx_empty || uc_state > 1) @(negedge clk);
    read_back(last);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (500000) @(posedge clk); failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
