// hnet_pkg: shared types and constants of the H-Network station.
//
// The H-Network is a parallel bus LAN with distributed control. Every station
// has a transmit section, run by a small horizontally coded microcontroller,
// and a receive section built from discrete logic. This package holds the
// layout of the 16-bit microinstruction (8 control bits, a 3-bit
// conditional-branch select and a 5-bit next-address field), the encoding of
// the branch select, and the default sizes of the station: a 16-bit host word,
// FIFOs 17 bits wide (the extra bit is End Of Packet) and 128 words deep.
//
// Bus lines are handled in positive logic inside the RTL: a field called
// `actv` is 1 when the active-low line /HBUS-ACTV is pulled low, and so on.
// The field order of csd_t and the branch codes follow the microinstruction
// layout of the design; the node-address layout of the first packet word
// (destination in the low byte) is this implementation's choice.
package hnet_pkg;

  localparam int unsigned HNET_DATA_W     = 16;   // host word and HBUS-DATA width
  localparam int unsigned HNET_FIFO_DEPTH = 128;  // words per transmit/receive FIFO
  localparam int unsigned HNET_ID_W       = 8;    // node ID / destination field width
  localparam int unsigned UPC_W      = 5;    // microprogram counter width

  // Control Signal Data field, MSB first (microinstruction bits 15..8).
  typedef struct packed {
    logic xtclr_n;   // bit 7: clears output FIFO, EOT flag and checksum (active low)
    logic chclk;     // bit 6: shifts the checksum/EOP word into the output FIFO
    logic xmt_n;     // bit 5: enables FIFO data, EOP and DCLK onto the bus (active low)
    logic tst_set;   // bit 4: clock of the test-and-set flip-flop
    logic release_n; // bit 3: clears the test-and-set flip-flop (active low)
    logic collis;    // bit 2: drives /HBUS-COLLIS
    logic dest;      // bit 1: drives /HBUS-DEST
    logic iden;      // bit 0: drives the node ID onto HBUS-DATA
  } csd_t;

  // Conditional-branch select: which input replaces the next-address LSB.
  typedef enum logic [2:0] {
    CB_NONE     = 3'd0,  // LSB from ROM
    CB_SENDA_N  = 3'd1,
    CB_EMPTY_N  = 3'd2,
    CB_EOT      = 3'd3,
    CB_MASTER_N = 3'd4,
    CB_HACTV    = 3'd5,
    CB_HCOLLIS  = 3'd6,
    CB_IDOK     = 3'd7
  } cb_sel_e;

  typedef struct packed {
    csd_t              csd;
    cb_sel_e           cb;
    logic [UPC_W-1:0]  pc;
  } uinstr_t;

  // The seven status inputs of the transmit microcontroller.
  typedef struct packed {
    logic senda_n;   // host SEND request, active low
    logic empty_n;   // output FIFO holds data, active low "empty"
    logic eot;       // end of transmission flag
    logic master_n;  // test-and-set result, low when mastership was won
    logic hactv;     // network active (/HBUS-ACTV low)
    logic hcollis;   // network collision (/HBUS-COLLIS low)
    logic idok;      // node ID read back intact
  } uc_in_t;

  // Wired-OR control lines of the bus, positive logic ("line asserted").
  typedef struct packed {
    logic actv;      // /HBUS-ACTV low
    logic collis;    // /HBUS-COLLIS low
    logic dest;      // /HBUS-DEST low
    logic decis;     // HBUS-DECIS high: every station permits the transfer
  } hbus_ctl_t;

endpackage
