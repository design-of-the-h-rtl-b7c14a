// hnet_tx_module: transmit section of an H-Station.
//
// Holds the output FIFO, the shift-in glue with checksum generator, the
// microcoded transmit controller, the test-and-set semaphore, the transmit ID
// compare and the HBUS clock. The host writes a packet (destination word
// first) with `host_si`, then raises `send`. The controller appends the
// checksum/EOP word, wins the network with test and set, confirms it is the
// only master by reading back its node ID, puts the destination word on the
// bus with a DEST pulse, and, unless a receiver forces a collision, lets the
// HBUS clock shift the packet out. EOT tells the host the packet has gone;
// the controller then clears the FIFO and releases the network. Any
// collision makes it release the network and try again at once; the packet
// stays in the FIFO.
//
// Bus side: inputs are the resolved bus lines (positive logic); outputs are
// what this station drives: the wired-OR lines (`*_drv`), its FIFO word,
// EOP and DCLK (valid only while `xmt_en` is high, as tri-state drivers) and
// its node ID (ORed into the data bus through `id_drv`).
//
// Host side: `tx_empty` is high when the FIFO is empty, EOT is low and
// /XTCLR is high, i.e. the controller has finished its transmit clear and a
// new packet may be loaded (host writes are ignored while /XTCLR is low).
// `eot` is the End Of Transmission flag. `rst` is the host transmit reset:
// it clears the controller register, whose /XTCLR then holds the FIFO and
// EOT clear until the controller's first clock. `uc_tick` is the controller
// clock enable.
module hnet_tx_module
  import hnet_pkg::*;
#(
  parameter int unsigned DATA_W     = HNET_DATA_W,
  parameter int unsigned FIFO_DEPTH = HNET_FIFO_DEPTH,
  parameter int unsigned ID_W       = HNET_ID_W,
  parameter int unsigned DCLK_HALF  = 2
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              uc_tick,
  input  logic [ID_W-1:0]   node_id,
  // host
  input  logic              host_si,
  input  logic [DATA_W-1:0] host_d,
  input  logic              send,
  output logic              tx_empty,
  output logic              eot,
  // resolved bus
  input  hbus_ctl_t         bus,
  input  logic [DATA_W-1:0] bus_data,
  // drives
  output logic              actv_drv,
  output logic              collis_drv,
  output logic              dest_drv,
  output logic              xmt_en,
  output logic [DATA_W-1:0] data_drv,
  output logic              eop_drv,
  output logic              dclk_drv,
  output logic [DATA_W-1:0] id_drv,
  output logic [UPC_W-1:0]  uc_state
);
  csd_t              csd;
  uc_in_t            uin;
  logic              fifo_si, fifo_so, fifo_empty, fifo_full;
  logic [DATA_W:0]   fifo_d, fifo_q;
  logic              master_n, idok;
  logic [UPC_W-1:0]  upc;
  logic [$clog2(FIFO_DEPTH+1)-1:0] fifo_count;

  hnet_tx_glue #(.DATA_W(DATA_W)) u_glue (
    .clk, .rst, .xtclr_n(csd.xtclr_n), .host_si, .host_d,
    .chclk(csd.chclk), .fifo_si, .fifo_d
  );

  hnet_fifo #(.WIDTH(DATA_W+1), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst, .clr(!csd.xtclr_n), .si(fifo_si), .d(fifo_d),
    .so(fifo_so), .q(fifo_q), .empty(fifo_empty), .full(fifo_full),
    .count(fifo_count)
  );

  hnet_hbus_clock #(.HALF(DCLK_HALF)) u_clk (
    .clk, .rst, .xmt_n(csd.xmt_n), .xtclr_n(csd.xtclr_n), .decis(bus.decis),
    .eop_bit(fifo_q[DATA_W]), .dclk(dclk_drv), .so(fifo_so), .eot
  );

  hnet_test_set u_ts (
    .clk, .rst, .tst_set(csd.tst_set), .release_n(csd.release_n),
    .hactv(bus.actv), .actv_drv, .master_n
  );

  hnet_tx_idcmp #(.DATA_W(DATA_W), .ID_W(ID_W)) u_id (
    .node_id, .iden(csd.iden), .bus_data, .id_drv, .idok
  );

  always_comb begin
    uin.senda_n  = !send;
    uin.empty_n  = !fifo_empty;
    uin.eot      = eot;
    uin.master_n = master_n;
    uin.hactv    = bus.actv;
    uin.hcollis  = bus.collis;
    uin.idok     = idok;
  end

  hnet_tx_uc u_uc (
    .clk, .rst, .tick(uc_tick), .in(uin), .csd, .upc, .state(uc_state)
  );

  // TX EMPTY tells the host it may load the next packet: the FIFO is empty
  // and no EOT is pending, i.e. the controller has passed its transmit clear.
  assign tx_empty   = fifo_empty && !eot && csd.xtclr_n;
  assign collis_drv = csd.collis;
  assign dest_drv   = csd.dest;
  // A controller held in reset has all control lines low, /XMT included;
  // /XTCLR (also low then) keeps its tri-state drivers off the bus.
  assign xmt_en     = !csd.xmt_n && csd.xtclr_n;
  assign data_drv   = fifo_q[DATA_W-1:0];
  assign eop_drv    = fifo_q[DATA_W];

  // Packet size rule: the host writes at most FIFO_DEPTH-1 words, so the
  // checksum word always fits.
  a_tx_no_overflow: assert property (@(posedge clk) disable iff (rst) !(fifo_si && fifo_full))
    else $error("hnet_tx_module: output FIFO overflow, packet longer than %0d words", FIFO_DEPTH - 1);

endmodule
