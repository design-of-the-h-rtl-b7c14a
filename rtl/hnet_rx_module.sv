// hnet_rx_module: receive section of an H-Station.
//
// The input FIFO (same buffer as the output FIFO) takes words straight from
// HBUS-DATA and HBUS-EOP on every HBUS-DCLK rising edge while the receive
// decision logic has enabled reception. The host sees:
//   rx_empty  - no packet has been taken since the last receive clear
//   rx_avail  - a word is waiting at the FIFO head
//   rx_data   - head word, driven only while `rcvdata_n` is low (zero
//               otherwise, standing for the tri-state host buffer)
//   rx_eop    - the word with the End Of Packet bit has been read out
//   ck_done / ck_err - checksum result of the received packet
// The host reads a word with `host_so` and, after each packet, pulses
// `rcvclr`, which empties the FIFO and re-arms the decision logic.
//
// Following the design: the submodules and their connection, host receive
// clear, RCVEOP from the EOP bit as words are read out, the host data
// buffer. The checksum checker stands for the receive-side checksum the
// station is said to compute.
module hnet_rx_module
  import hnet_pkg::*;
#(
  parameter int unsigned DATA_W     = HNET_DATA_W,
  parameter int unsigned FIFO_DEPTH = HNET_FIFO_DEPTH,
  parameter int unsigned ID_W       = HNET_ID_W
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [ID_W-1:0]   node_id,
  // host
  input  logic              rcvclr,
  input  logic              grp_we,
  input  logic [ID_W-1:0]   grp_addr,
  input  logic              grp_set,
  input  logic              host_so,
  input  logic              rcvdata_n,
  output logic [DATA_W-1:0] rx_data,
  output logic              rx_empty,
  output logic              rx_avail,
  output logic              rx_eop,
  output logic              ck_done,
  output logic              ck_err,
  // bus
  input  hbus_ctl_t         bus,
  input  logic [DATA_W-1:0] bus_data,
  input  logic              bus_eop,
  input  logic              bus_dclk,
  output logic              collis_drv,
  output logic              decis_hold
);
  logic            shift_in, used, rx_en, fifo_empty, fifo_full, rd;
  logic [DATA_W:0] fifo_q, word_in;
  logic [$clog2(FIFO_DEPTH+1)-1:0] fifo_count;

  assign word_in = {bus_eop, bus_data};
  assign rd      = host_so && !fifo_empty;

  hnet_rx_decision #(.DATA_W(DATA_W), .ID_W(ID_W)) u_dec (
    .clk, .rst, .rcvclr, .node_id, .bus, .bus_data, .bus_dclk,
    .grp_we, .grp_addr, .grp_set,
    .collis_drv, .decis_hold, .rx_en, .shift_in, .used
  );

  hnet_fifo #(.WIDTH(DATA_W+1), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst, .clr(rcvclr), .si(shift_in), .d(word_in), .so(host_so),
    .q(fifo_q), .empty(fifo_empty), .full(fifo_full), .count(fifo_count)
  );

  hnet_rx_checksum #(.DATA_W(DATA_W)) u_ck (
    .clk, .rst, .clr(rcvclr), .shift_in, .word(word_in),
    .done(ck_done), .err(ck_err)
  );

  always_ff @(posedge clk) begin
    if (rst || rcvclr)             rx_eop <= 1'b0;
    else if (rd && fifo_q[DATA_W]) rx_eop <= 1'b1;
  end

  assign rx_data  = rcvdata_n ? '0 : fifo_q[DATA_W-1:0];
  assign rx_empty = !used;
  assign rx_avail = !fifo_empty;

  // The input FIFO is as deep as every output FIFO, so a packet always fits.
  a_rx_no_overflow: assert property (@(posedge clk) disable iff (rst) !(shift_in && fifo_full))
    else $error("hnet_rx_module: input FIFO overflow");

endmodule
