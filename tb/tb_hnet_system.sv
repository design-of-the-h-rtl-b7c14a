// tb_hnet_system: end-to-end test of an H-Network of four stations at the
// default sizes (16-bit words, 128-word FIFOs).
//
// Every station gets a host model: a transmit process that loads packets
// (destination word first, then a sequence/length word, then body), raises
// SEND and waits for EOT, and a receive process that reads each packet out,
// checks every word against the expected contents, the EOP marker and the
// checksum result, then issues receive clear. Packet contents are a function
// of (source, sequence, word index), so the checker needs no copy of what
// was sent. Every delivery expected from the destination rule (own ID or
// broadcast 0) must happen exactly once.
//
// Phases: a single transfer with its timing checked (controller states from
// SEND to DEST, one word per DCLK period, words on the bus equal packet
// length plus checksum); two stations sending in the same cycle (double
// master, resolved by the ID check); a packet to a station whose receive
// FIFO is still full (receiver forces a collision, sender retries); a
// full-length broadcast; a host transmit reset flushing a loaded FIFO; a
// group address entered by two hosts and packets sent to it; random
// traffic. Each mechanism is counted and must occur at least once.
//
// The controllers of all stations tick every cycle. When the network goes
// idle while a collision is still asserted, one randomly chosen station's
// controller misses a single tick: this stands for the propagation delays
// and clock skew that, on real cables, keep two masters that collided in
// lockstep from winning the next test and set together again.
module tb_hnet_system;
  import hnet_pkg::*;

  localparam int N = 4;
  localparam int DW = 16;
  localparam int HALF = 2;          // default DCLK_HALF of the top
  localparam int MAXLEN = 127;      // host words per packet (FIFO depth - 1)
  localparam int GRP = 8'h80;     // group address used by stations 1 and 3

  logic clk = 0, rst = 1;
  always #5 clk = ~clk;

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
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  // ---------------- packet model ----------------
  typedef struct { int src; int dest; int seq; int len; } pkt_t;
  function automatic logic [15:0] body_word(int src, int seq, int k);
    return 16'((src * 16'h9d31) ^ (seq * 16'h3c1) ^ (k * 16'h1357) ^ (k << 9));
  endfunction
  function automatic logic [15:0] pkt_word(pkt_t p, int k);
    if (k == 0) return {node_id[p.src], 8'(p.dest)};
    if (k == 1) return {8'(p.seq), 8'(p.len)};
    return body_word(p.src, p.seq, k);
  endfunction

  pkt_t tx_q [N][$];
  int   expected_deliv = 0, delivered = 0, sent = 0;
  int   seen [string];
  int   rx_delay [N];          // extra cycles a receive host waits before clearing

  // mechanism counters
  int n_ts_lost = 0, n_id_coll = 0, n_late_coll = 0, n_rx_block = 0;
  int n_done = 0, n_bcast = 0, n_group = 0, n_fulllen = 0, n_xtclr = 0, n_dclk_words = 0;

  // group addresses the hosts have entered, as the checker sees them
  bit grp_model [N][256];
  function automatic bit is_dest(int j, int dest);
    return dest == 0 || dest == int'(node_id[j]) || grp_model[j][dest];
  endfunction

  task automatic queue_pkt(int src, int dest, int len);
    static int seqc = 0;
    pkt_t p;
    p.src = src; p.dest = dest; p.seq = (seqc++) & 8'hff; p.len = len;
    tx_q[src].push_back(p);
    for (int j = 0; j < N; j++) if (is_dest(j, dest)) expected_deliv++;
  endtask

  // ---------------- transmit hosts ----------------
  for (genvar i = 0; i < N; i++) begin : g_txh
    initial begin
      host_si[i] = 0; send[i] = 0; host_d[i] = '0;
      @(negedge rst);
      forever begin
        pkt_t p;
        wait (tx_q[i].size() > 0);
        p = tx_q[i][0];
        @(negedge clk);
        while (!tx_empty[i]) @(negedge clk);
        for (int k = 0; k < p.len; k++) begin
          host_si[i] = 1; host_d[i] = pkt_word(p, k);
          @(negedge clk);
        end
        host_si[i] = 0;
        send[i] = 1;
        while (!eot[i]) @(negedge clk);
        send[i] = 0;
        void'(tx_q[i].pop_front());
        sent++;
        @(negedge clk);
      end
    end
  end

  // ---------------- receive hosts ----------------
  for (genvar j = 0; j < N; j++) begin : g_rxh
    initial begin
      logic [15:0] w [$];
      rcvclr[j] = 0; host_so[j] = 0; rcvdata_n[j] = 0;
      @(negedge rst);
      forever begin
        w.delete();
        @(negedge clk);
        while (rx_empty[j]) @(negedge clk);
        // read words until the EOP word has been read out
        forever begin
          while (!rx_avail[j]) @(negedge clk);
          w.push_back(rx_data[j]);
          host_so[j] = 1;
          @(negedge clk);
          host_so[j] = 0;
          if (rx_eop[j]) break;
        end
        while (!ck_done[j]) @(negedge clk);
        begin
          int src, seq, len; string key; bit ok;
          pkt_t p;
          src = -1;
          for (int s = 0; s < N; s++) if (node_id[s] == w[0][15:8]) src = s;
          seq = w[1][15:8]; len = w[1][7:0];
          p.src = src; p.dest = w[0][7:0]; p.seq = seq; p.len = len;
          if (src < 0) foreach (w[k]) $display("  st%0d word %0d = %h", j, k, w[k]);
          check(src >= 0, $sformatf("st%0d: unknown source %h", j, w[0]));
          check(is_dest(j, p.dest), $sformatf("st%0d: received packet for %0d", j, p.dest));
          check(w.size() == len + 1, $sformatf("st%0d: %0d words, expected %0d", j, w.size(), len + 1));
          ok = 1;
          if (src >= 0) for (int k = 0; k < len && k < w.size(); k++)
            if (w[k] !== pkt_word(p, k)) ok = 0;
          check(ok, $sformatf("st%0d: packet from %0d seq %0d data mismatch", j, src, seq));
          check(!ck_err[j], $sformatf("st%0d: checksum error", j));
          key = $sformatf("%0d_%0d_%0d", src, seq, j);
          check(!seen.exists(key), $sformatf("duplicate delivery %s", key));
          seen[key] = 1;
          delivered++;
          if (p.dest == 0) n_bcast++;
          if (p.dest == GRP) n_group++;
          if (len == MAXLEN) n_fulllen++;
        end
        repeat (rx_delay[j]) @(negedge clk);
        rcvclr[j] = 1; @(negedge clk); rcvclr[j] = 0;
      end
    end
  end

  // ---------------- controller clocks and mechanism monitors ----------------
  // When the network goes idle at the end of a collision, one station
  // (chosen at random) sees it one controller clock late.
  logic actv_q = 0;
  int   lag_st = 0;
  always @(posedge clk) begin
    actv_q <= bus.actv;
    lag_st <= $urandom_range(N - 1);
  end
  always_comb begin
    uc_tick = '1;
    if (actv_q && !bus.actv && bus.collis) uc_tick[lag_st] = 1'b0;
  end

  logic [N-1:0][4:0] st_q;
  logic dclk_q;
  always @(posedge clk) if (!rst) begin
    for (int i = 0; i < N; i++) if (uc_state[i] != st_q[i]) begin
      case (uc_state[i])
        5'h09: n_ts_lost++;
        5'h0C: n_id_coll++;
        5'h15: n_late_coll++;
        5'h1B: n_rx_block++;
        5'h1D: n_done++;
        default: ;
      endcase
    end
    st_q <= uc_state;
    dclk_q <= bus_dclk;
    if (bus_dclk && !dclk_q) n_dclk_words++;
  end

  task automatic wait_idle(int limit);
    int t = 0;
    while ((delivered < expected_deliv || sent < expected_sent()) && t < limit) begin
      @(negedge clk); t++;
    end
    check(t < limit, $sformatf("traffic did not finish: delivered %0d/%0d", delivered, expected_deliv));
    repeat (20) @(negedge clk);
  endtask
  int queued_total = 0;
  function automatic int expected_sent(); return queued_total; endfunction
  task automatic q(int src, int dest, int len);
    queue_pkt(src, dest, len); queued_total++;
  endtask

  // ---------------- phases ----------------
  initial begin
    int t_send, t_s2, t_dest, t_first, t_last, words0;
    node_id[0] = 8'h03; node_id[1] = 8'h07; node_id[2] = 8'h05; node_id[3] = 8'h0C;
    tx_reset = '0; grp_we = '0; grp_addr = '0; grp_set = '0;
    foreach (rx_delay[j]) rx_delay[j] = 0;
    repeat (4) @(negedge clk);
    rst = 0;
    repeat (5) @(negedge clk);

    // Phase A: one transfer, timing checked
    q(0, 8'h07, 6);
    t_s2 = -1; t_dest = -1; t_first = -1; t_last = -1; words0 = n_dclk_words;
    fork
      begin
        int c = 0;
        while (t_dest < 0 || !eot[0]) begin
          @(posedge clk); #1; c++;
          if (t_s2 < 0 && uc_state[0] == 5'h02) t_s2 = c;
          if (t_dest < 0 && bus.dest) t_dest = c;
          if (bus_dclk && t_first < 0) t_first = c;
          if (bus_dclk) t_last = c;
        end
      end
    join
    wait_idle(5000);
    check(t_dest - t_s2 == 9, $sformatf("SEND-to-DEST: %0d controller cycles, expected 9", t_dest - t_s2));
    check(n_dclk_words - words0 == 7, $sformatf("DCLK pulses %0d, expected 7", n_dclk_words - words0));
    check(t_last - t_first == (7 - 1) * 2 * HALF + HALF - 1,
          $sformatf("transfer took %0d cycles, expected %0d", t_last - t_first, (7 - 1) * 2 * HALF + HALF - 1));

    // Phase B: two stations send in the same cycle
    q(0, 8'h05, 10);
    q(1, 8'h0C, 10);
    wait_idle(20000);

    // Phase C: receiver FIFO not free -> collision forced by the receiver
    rx_delay[3] = 600;
    q(1, 8'h0C, 20);
    q(2, 8'h0C, 20);
    wait_idle(40000);
    rx_delay[3] = 0;

    // Phase D: full-length broadcast
    q(2, 0, MAXLEN);
    wait_idle(40000);

    // Phase E: host transmit reset flushes a loaded FIFO
    @(negedge clk);
    host_si[3] = 1; host_d[3] = 16'hdead; @(negedge clk);
    host_si[3] = 0; @(negedge clk);
    check(!tx_empty[3], "FIFO holds host word before transmit reset");
    tx_reset[3] = 1; repeat (2) @(negedge clk); tx_reset[3] = 0;
    repeat (2) @(negedge clk);
    check(tx_empty[3], "transmit reset empties the output FIFO");
    if (tx_empty[3]) n_xtclr++;

    // Phase G: group address entered by the hosts of stations 1 and 3
    for (int j = 0; j < N; j++) begin
      grp_we[j] = (j == 1 || j == 3); grp_addr[j] = GRP; grp_set[j] = 1;
      grp_model[j][GRP] = (j == 1 || j == 3);
    end
    @(negedge clk); grp_we = '0;
    q(0, GRP, 12);
    q(2, GRP, 30);
    wait_idle(40000);

    // Phase F: random traffic (also to the group address)
    for (int r = 0; r < 24; r++) begin
      int s, d, len;
      s = $urandom_range(N - 1);
      d = $urandom_range(N + 1);      // N means broadcast, N+1 the group
      len = $urandom_range(MAXLEN, 2);
      q(s, (d == N) ? 0 : (d == N + 1) ? GRP : int'(node_id[d]), len);
    end
    wait_idle(400000);

    check(delivered == expected_deliv, $sformatf("delivered %0d of %0d", delivered, expected_deliv));
    $display("mechanisms: ts_lost=%0d id_collision=%0d late_collision=%0d rx_block=%0d done=%0d bcast=%0d group=%0d fulllen=%0d xtclr=%0d",
             n_ts_lost, n_id_coll, n_late_coll, n_rx_block, n_done, n_bcast, n_group, n_fulllen, n_xtclr);
    check(n_ts_lost > 0, "test-and-set found the network busy at least once");
    check(n_id_coll > 0, "ID read-back detected several masters at least once");
    check(n_late_coll > 0, "a master saw another's ID collision at least once");
    check(n_rx_block > 0, "a receiver blocked a packet at least once");
    check(n_done == queued_total, $sformatf("completed transmissions %0d of %0d", n_done, queued_total));
    check(n_bcast > 0, "broadcast delivered");
    check(n_group > 0, "group-addressed packet delivered");
    check(n_fulllen > 0, "full-length packet delivered");
    check(n_xtclr > 0, "transmit reset exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
