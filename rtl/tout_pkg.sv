// Shared types and constants of the on-board-bus to fiber-link interface.
//
// A 16-bit word travels between the on-board bus and the fiber link. Bit 15
// marks an address word; an address word carries a remote/local select bit,
// a 4-bit chip address and an 8-bit sub-address whose bits 5 and 4 request a
// soft (FIFO) reset and loopback in a control transaction. Words without bit 15
// set are data words. On the fiber a word is sent as two 8-bit symbols, low
// byte first; the 9th symbol bit flags a command (non-data) symbol and the
// 10th a code violation. The bit layout follows the interface's source; the
// names of the fields are this package's.
package tout_pkg;

  localparam int unsigned WORD_W    = 16;  // on-board bus half / fiber word
  localparam int unsigned BYTE_W    = 8;   // fiber data byte
  localparam int unsigned FIFO_W    = 9;   // external FIFO width: byte + command flag
  localparam int unsigned FR_W      = 12;  // fiber receiver parallel output
  localparam int unsigned FO_W      = 10;  // fiber transmitter parallel input

  typedef logic [WORD_W-1:0] word_t;
  typedef logic [BYTE_W-1:0] byte_t;

  // Layout of an address word (bit 15 set).
  typedef struct packed {
    logic       is_address;  // 15: 1 = address word
    logic [1:0] unused;      // 14:13
    logic       remote;      // 12: must equal the chip's remote/local select
    logic [3:0] chip;        // 11:8: chip (data or control) address
    byte_t      sub;         // 7:0: sub-address / control bits
  } addr_word_t;

  // Control bits inside the sub-address of a control transaction.
  localparam int unsigned CTRL_RESET_BIT    = 5;  // soft reset of the receive FIFO
  localparam int unsigned CTRL_LOOPBACK_BIT = 4;  // loopback request (held off here)

  // Symbol bits on the fiber side.
  localparam int unsigned SC_BIT        = 8;  // command (1) / data (0) symbol
  localparam int unsigned VIOLATION_BIT = 9;  // code violation seen by the receiver

endpackage
