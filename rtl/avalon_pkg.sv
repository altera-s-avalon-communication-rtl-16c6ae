// Shared constants of the two example Avalon-MM slave peripherals.
//
// The 16-bit data path and the 5-bit halfword address (32 halfwords) are
// the sizes of the example slave ports; the LED flasher splits its address
// space in two halves with the top address bit, and reloads its 32-bit
// countdown with the 16-bit linger value placed in the upper half.
package avalon_pkg;

  // Width of readdata / writedata of the example slave ports.
  localparam int unsigned DATA_W  = 16;
  // Halfword address width: 2**5 = 32 halfwords.
  localparam int unsigned ADDR_W  = 5;
  // LED flasher countdown width; linger value sits in bits [31:16].
  localparam int unsigned COUNT_W = 32;

endpackage
