// hnet_fifo: first-in first-out packet buffer of the H-Station.
//
// The same buffer serves as the transmit (output) FIFO and the receive
// (input) FIFO. It is one bit wider than the host word; the top bit carries
// End Of Packet. Its depth is one word more than the longest packet the host
// may build, so a full packet plus its checksum word fits.
//
// Behaviour: `si` writes `d` at the rising clock edge (a write to a full FIFO
// is dropped), `so` removes the head word (ignored when empty). The head word
// is always visible on `q`, like the fall-through FIFO parts the design is
// built around; `q` reads as zero while the FIFO is empty, so an idle buffer
// drives nothing onto a wired bus. `clr` empties the FIFO synchronously.
// A word written into an empty FIFO shows on `q` in the next cycle.
//
// Following the design: width n+1, depth 128, reset input, shift in/shift
// out strobes. Synchronous single-clock operation (instead of the
// asynchronous edges of the discrete FIFO parts) and the zero head when empty
// are this implementation's choices.
module hnet_fifo #(
  parameter int unsigned WIDTH = 17,
  parameter int unsigned DEPTH = 128
) (
  input  logic             clk,
  input  logic             rst,     // synchronous, active high
  input  logic             clr,     // synchronous flush
  input  logic             si,      // shift in
  input  logic [WIDTH-1:0] d,
  input  logic             so,      // shift out
  output logic [WIDTH-1:0] q,
  output logic             empty,
  output logic             full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;
  logic             do_wr, do_rd;

  assign empty = (count == '0);
  assign full  = (count == DEPTH[$clog2(DEPTH+1)-1:0]);
  assign do_wr = si && !full;
  assign do_rd = so && !empty;
  assign q     = empty ? '0 : mem[rptr];

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (rst || clr) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_wr) wptr <= inc(wptr);
      if (do_rd) rptr <= inc(rptr);
      case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= d;
  end

endmodule
