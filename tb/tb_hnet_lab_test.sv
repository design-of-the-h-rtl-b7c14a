// tb_hnet_lab_test: the bench set-up used to prove the station design, one
// transmitting station and one receiving station with the transmit
// microcontroller free-running at 2.17 MHz, run on the full network at its
// default sizes.
//
// The system clock is taken as 50 MHz (the 20 ns controller cycle of the
// design), so the controllers get a clock enable every 23rd cycle
// (50 / 23 = 2.17 MHz), while the HBUS data clock keeps its default rate.
// Station 0 sends packets of random length, up to the full 127 words, to
// station 1; stations 2 and 3 stay idle but take part in every decision.
// Checks: every packet arrives once, word for word, with a good checksum
// and RCVEOP on its last word; the idle stations receive nothing; SEND to
// DEST takes 9 controller clocks, i.e. 9 * 23 system clocks, counted from
// the controller's SEND state. The data rate is measured on the first,
// 127-word packet: the data phase (first HBUS-DCLK rising edge to EOT) and
// the whole transfer (SEND state to EOT) must each move more than
// 7 Mbytes per second at the 20 ns clock, the rate the design claims, and
// the packet must take exactly one HBUS-DCLK pulse per word.
module tb_hnet_lab_test;
  import hnet_pkg::*;
  localparam int N = 4, DW = 16, DIV = 23, PACKETS = 12;

  logic clk = 0, rst = 1;
  always #10 clk = ~clk;            // 50 MHz

  logic [N-1:0][7:0]    node_id;
  logic [N-1:0]         tx_reset, uc_tick, host_si, send, rcvclr, host_so, rcvdata_n;
  logic [N-1:0]         grp_we, grp_set;
  logic [N-1:0][7:0]    grp_addr;
  logic [N-1:0][DW-1:0] host_d;
  logic [N-1:0]         tx_empty, eot, rx_empty, rx_avail, rx_eop, ck_done, ck_err;
  logic [N-1:0][4:0]    uc_state;
  logic [N-1:0][DW-1:0] rx_data;
  hbus_ctl_t            bus;
  logic [DW-1:0]        bus_data;
  logic                 bus_eop, bus_dclk;

  hnet_system dut (
    .clk, .rst, .node_id, .tx_reset, .uc_tick, .host_si, .host_d, .send,
    .tx_empty, .eot, .uc_state, .rcvclr, .grp_we, .grp_addr, .grp_set, .host_so, .rcvdata_n, .rx_data,
    .rx_empty, .rx_avail, .rx_eop, .ck_done, .ck_err, .bus, .bus_data,
    .bus_eop, .bus_dclk
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  // 2.17 MHz controller clock enable for every station
  int div = 0;
  always @(posedge clk) div <= (div == DIV - 1) ? 0 : div + 1;
  assign uc_tick = {N{div == 0}};

  // latency from the controller's first SEND state (02, checksum word
  // appended) to DEST, in system clocks
  int t_send = -1, lat = -1;
  logic dest_q = 0;
  logic [4:0] st_q = 0;
  always @(posedge clk) begin
    dest_q <= bus.dest;
    st_q <= uc_state[0];
    if (uc_state[0] == 5'h02 && st_q != 5'h02) t_send = 0; else if (t_send >= 0) t_send++;
    if (bus.dest && !dest_q && t_send >= 0) begin lat = t_send; t_send = -1; end
  end

  // data rate of one packet: clocks and HBUS-DCLK pulses up to EOT
  int t_pkt = -1, t_data = -1, n_dclk = 0;
  int pkt_clocks = -1, data_clocks = -1, data_words = -1;
  logic dclk_q = 0, eot_q = 0;
  always @(posedge clk) begin
    dclk_q <= bus_dclk;
    eot_q <= eot[0];
    if (uc_state[0] == 5'h02 && st_q != 5'h02) begin t_pkt = 0; t_data = -1; n_dclk = 0; end
    else if (t_pkt >= 0) t_pkt++;
    if (t_data >= 0) t_data++;
    if (bus_dclk && !dclk_q && t_pkt >= 0) begin if (t_data < 0) t_data = 0; n_dclk++; end
    if (eot[0] && !eot_q && t_pkt >= 0) begin
      pkt_clocks = t_pkt; data_clocks = t_data; data_words = n_dclk; t_pkt = -1;
    end
  end

  // bytes per second at 20 ns per clock, in Mbytes per second
  function automatic real mbytes(input int words, input int clocks);
    return (2.0 * words) / (clocks * 20.0e-9) / 1.0e6;
  endfunction

  logic [15:0] pkt[$];
  int received = 0;

  task automatic host_receive(input logic [15:0] w[$]);
    logic [15:0] s;
    s = 0; foreach (w[k]) s += w[k];
    check(ck_done[1] && !ck_err[1], "station 1: checksum good");
    rcvdata_n[1] = 0;
    for (int k = 0; k <= w.size(); k++) begin
      #1;
      check(rx_avail[1], "station 1: word available");
      check(rx_data[1] == (k < w.size() ? w[k] : 16'(-s)), $sformatf("station 1: word %0d", k));
      check(rx_eop[1] == 0, "station 1: RCVEOP not early");
      host_so[1] = 1; @(negedge clk); host_so[1] = 0;
    end
    rcvdata_n[1] = 1; #1;
    check(rx_eop[1] && !rx_avail[1], "station 1: RCVEOP after the checksum word");
    rcvclr[1] = 1; @(negedge clk); rcvclr[1] = 0;
    received++;
  endtask

  initial begin
    node_id = {8'd4, 8'd3, 8'd2, 8'd1};
    tx_reset = '0; host_si = '0; send = '0; rcvclr = '0; host_so = '0; rcvdata_n = '1;
    host_d = '0; grp_we = '0; grp_addr = '0; grp_set = '0;
    repeat (4) @(negedge clk); rst = 0;
    rcvclr = '1; @(negedge clk); rcvclr = '0;
    for (int p = 0; p < PACKETS; p++) begin
      int len;
      len = (p == 0) ? 126 : $urandom_range(0, 40);
      pkt.delete();
      pkt.push_back({node_id[0], node_id[1]});
      for (int k = 0; k < len; k++) pkt.push_back(16'($urandom));
      while (!tx_empty[0]) @(negedge clk);
      foreach (pkt[k]) begin host_si[0] = 1; host_d[0] = pkt[k]; @(negedge clk); end
      host_si[0] = 0;
      // SEND is held until the slow controller has seen it
      send[0] = 1;
      while (uc_state[0] != 5'h02) @(negedge clk);
      send[0] = 0;
      while (rx_empty[1] || !ck_done[1]) @(negedge clk);
      check(lat == 9 * DIV, $sformatf("SEND to DEST %0d clocks", lat));
      host_receive(pkt);
      if (p == 0) begin
        check(data_words == pkt.size() + 1,
              $sformatf("%0d HBUS-DCLK pulses for %0d words", data_words, pkt.size() + 1));
        $display("data phase %0d clocks, %0.1f Mbyte/s; SEND to EOT %0d clocks, %0.1f Mbyte/s",
                 data_clocks, mbytes(data_words, data_clocks),
                 pkt_clocks, mbytes(data_words, pkt_clocks));
        check(data_clocks > 0 && mbytes(data_words, data_clocks) > 7.0, "data phase above 7 Mbyte/s");
        check(pkt_clocks > 0 && mbytes(data_words, pkt_clocks) > 7.0, "SEND to EOT above 7 Mbyte/s");
      end
      check(rx_empty[2] && rx_empty[3] && rx_empty[0], "idle stations received nothing");
    end
    while (!tx_empty[0] || uc_state[0] > 1) @(negedge clk);
    check(received == PACKETS, $sformatf("%0d of %0d packets received", received, PACKETS));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000000) @(posedge clk); failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
