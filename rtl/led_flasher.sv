// led_flasher -- Avalon-MM slave that cycles a row of 16 red LEDs through
// the contents of a small display memory.
//
// Address map (halfword addresses, 16-bit data):
//   0..15   display RAM, 16 entries of 16 bits, readable and writable
//   16..31  all alias one write-only "linger" register that sets the rate
// Reads of 16..31 leave readdata unchanged.
//
// Operation: every cycle in which chipselect is low, the peripheral copies
// RAM[display_address] to the LED register and steps a 32-bit countdown.
// When the countdown is zero it is reloaded with {linger, 16'h0000} and
// display_address advances (wrapping from 15 to 0). One display entry is
// therefore shown for linger*65536 + 1 unselected cycles. While the bus
// accesses the peripheral (chipselect high) both the LEDs and the
// countdown hold, so bus traffic stretches the display period.
//
// Reset (reset_n low, synchronous): readdata, display_address and the
// countdown clear, linger is set to all ones (slowest rate), and the LED
// register clears. The RAM is not reset. Clearing the LED register is this
// design's own choice; the rest follows the published peripheral.
//
// Timing: readdata is registered. It takes RAM[address] on the rising edge
// at which chipselect and read are high, so the bus must insert one read
// wait state: hold read for two cycles and latch readdata on the second
// edge. Writes are captured on the first edge (no write wait state). If
// read and write are both asserted, the read wins and nothing is written.
module led_flasher #(
  parameter int unsigned DATA_W  = avalon_pkg::DATA_W,
  parameter int unsigned ADDR_W  = avalon_pkg::ADDR_W,
  parameter int unsigned COUNT_W = avalon_pkg::COUNT_W
) (
  input  logic              clk,
  input  logic              reset_n,
  input  logic              read,
  input  logic              write,
  input  logic              chipselect,
  input  logic [ADDR_W-1:0] address,
  output logic [DATA_W-1:0] readdata,
  input  logic [DATA_W-1:0] writedata,
  output logic [DATA_W-1:0] leds
);

  // The lower half of the address space is the RAM.
  localparam int unsigned RAM_AW    = ADDR_W - 1;
  localparam int unsigned RAM_DEPTH = 1 << RAM_AW;
  // The linger value fills the upper DATA_W bits of the countdown.
  localparam int unsigned SHIFT     = COUNT_W - DATA_W;

  logic [DATA_W-1:0]  ram [RAM_DEPTH];
  logic [RAM_AW-1:0]  ram_address;
  logic [RAM_AW-1:0]  display_address;
  logic [DATA_W-1:0]  counter_delay;
  logic [COUNT_W-1:0] counter;
  logic               sel_linger;
  logic               ram_we;

  assign ram_address = address[RAM_AW-1:0];
  assign sel_linger  = address[ADDR_W-1];
  assign ram_we      = reset_n & chipselect & ~sel_linger & ~read & write;

  // Display memory: one write port from the bus, two read ports (bus
  // readback and the LED scan), both registered below.
  always_ff @(posedge clk) begin
    if (ram_we) ram[ram_address] <= writedata;
  end

  always_ff @(posedge clk) begin
    if (!reset_n) begin
      readdata        <= '0;
      display_address <= '0;
      counter         <= '0;
      counter_delay   <= '1;
      leds            <= '0;
    end else if (chipselect) begin
      if (!sel_linger) begin
        if (read) readdata <= ram[ram_address];
      end else if (write) begin
        counter_delay <= writedata;
      end
    end else begin
      // Not accessed: refresh the LEDs and run the countdown.
      leds <= ram[display_address];
      if (counter == '0) begin
        counter         <= COUNT_W'(counter_delay) << SHIFT;
        display_address <= display_address + 1'b1;
      end else begin
        counter <= counter - 1'b1;
      end
    end
  end

endmodule
