// hnet_tx_uc: transmit microcontroller of the H-Station.
//
// A horizontally coded sequencer: the 16-bit register latch holds the current
// microinstruction; its 5-bit next-address field addresses the ROM, and on the
// next controller clock the register loads the ROM word. If the conditional
// branch field (CB) of the instruction being replaced is non-zero, bit 0 of
// the newly loaded next-address field is taken from one of seven status
// inputs through an 8:1 multiplexer instead of from the ROM. The eight control
// bits of the register drive the transmit section directly; each instruction
// takes one controller clock.
//
// Interface: `tick` is the controller clock enable (the register loads on a
// rising `clk` edge with `tick` high), so the controller may run slower than
// the rest of the station. `rst` (the host's transmit reset) clears the
// register, so all control lines, CB and the program counter read zero; the
// first load then fetches ROM location 0.
//
// Following the design: register/ROM/multiplexer structure, field layout,
// branch inputs and reset behaviour. The clock enable is this
// implementation's way of modelling the controller's own free-running clock.
module hnet_tx_uc
  import hnet_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  logic    tick,
  input  uc_in_t  in,
  output csd_t    csd,
  output logic [UPC_W-1:0] upc,    // next-address field of the register
  output logic [UPC_W-1:0] state   // ROM address the current word came from
);
  uinstr_t          ir;
  logic [15:0]      rom_word;
  uinstr_t          rom_i;
  logic             sel_bit;

  hnet_ucode_rom u_rom (.addr(ir.pc), .data(rom_word));
  assign rom_i = uinstr_t'(rom_word);

  always_comb begin
    unique case (ir.cb)
      CB_NONE:     sel_bit = rom_i.pc[0];
      CB_SENDA_N:  sel_bit = in.senda_n;
      CB_EMPTY_N:  sel_bit = in.empty_n;
      CB_EOT:      sel_bit = in.eot;
      CB_MASTER_N: sel_bit = in.master_n;
      CB_HACTV:    sel_bit = in.hactv;
      CB_HCOLLIS:  sel_bit = in.hcollis;
      CB_IDOK:     sel_bit = in.idok;
      default:     sel_bit = rom_i.pc[0];
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ir    <= '0;
      state <= '0;
    end else if (tick) begin
      ir    <= {rom_i.csd, rom_i.cb, rom_i.pc[UPC_W-1:1], sel_bit};
      state <= ir.pc;
    end
  end

  assign csd = ir.csd;
  assign upc = ir.pc;

endmodule
