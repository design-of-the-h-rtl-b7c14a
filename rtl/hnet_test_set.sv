// hnet_test_set: network semaphore (TEST & SET) of the transmit section.
//
// One flip-flop together with the wired-OR line /HBUS-ACTV forms the
// semaphore. On a rising edge of TST&SET the flip-flop samples the line: if
// the network was idle it sets, and its output then holds /HBUS-ACTV low
// (`actv_drv`) to mark this station as network master. If the network was
// busy it stays clear. /MASTER is the inverted flip-flop output. /RELEASE
// (active low) clears the flip-flop and so frees the network.
//
// Timing: the flip-flop is updated at the first `clk` edge after TST&SET is
// seen high. /MASTER already shows the sampled result during that cycle, which
// stands for the flip-flop capturing at the TST&SET edge itself, so a
// controller sampling /MASTER one controller clock after raising TST&SET
// sees the result. Two stations raising TST&SET in the same cycle both see
// an idle network and both become master; that is the multiple-master case
// the ID check that follows is there to catch.
//
// Following the design: flip-flop, D from the line, clock from TST&SET,
// clear from /RELEASE, open-collector drive. The same-cycle bypass of /MASTER
// is this implementation's timing choice.
module hnet_test_set (
  input  logic clk,
  input  logic rst,
  input  logic tst_set,
  input  logic release_n,
  input  logic hactv,      // network active (bus line, positive logic)
  output logic actv_drv,   // pull /HBUS-ACTV low
  output logic master_n
);
  logic q, tst_q, rise;

  assign rise = tst_set && !tst_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      q     <= 1'b0;
      tst_q <= 1'b0;
    end else begin
      tst_q <= tst_set;
      if (!release_n)  q <= 1'b0;
      else if (rise)   q <= !hactv;
    end
  end

  assign actv_drv = q;
  assign master_n = !(rise && release_n ? !hactv : q);

endmodule
