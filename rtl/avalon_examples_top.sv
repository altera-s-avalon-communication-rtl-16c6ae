// avalon_examples_top -- the two example Avalon-MM slave peripherals side
// by side.
//
// The peripherals are independent: each has its own slave port, brought
// out as plain signals so that a system interconnect fabric (address
// decoding into chipselects, wait-state insertion, arbitration between
// masters) can be attached outside. The fabric itself is not part of this
// design.
//
//   pio_*   avalon_pio_out: write-only 16-bit output register -> pio_out
//   led_*   led_flasher: 32-halfword slave, 16-entry display RAM plus a
//           linger register, drives leds
//
// Both run on one clock. Only the LED flasher has a reset (active low,
// synchronous). Timing per port is that of the instantiated peripheral:
// zero-wait-state writes on both, one read wait state on the LED flasher.
module avalon_examples_top #(
  parameter int unsigned DATA_W  = avalon_pkg::DATA_W,
  parameter int unsigned ADDR_W  = avalon_pkg::ADDR_W,
  parameter int unsigned COUNT_W = avalon_pkg::COUNT_W
) (
  input  logic              clk,
  input  logic              reset_n,
  // simple output-register slave port
  input  logic              pio_chipselect,
  input  logic              pio_write,
  input  logic [DATA_W-1:0] pio_writedata,
  output logic [DATA_W-1:0] pio_out,
  // LED flasher slave port
  input  logic              led_chipselect,
  input  logic              led_read,
  input  logic              led_write,
  input  logic [ADDR_W-1:0] led_address,
  input  logic [DATA_W-1:0] led_writedata,
  output logic [DATA_W-1:0] led_readdata,
  output logic [DATA_W-1:0] leds
);

  avalon_pio_out #(.DATA_W(DATA_W)) u_pio (
    .clk        (clk),
    .chipselect (pio_chipselect),
    .write      (pio_write),
    .writedata  (pio_writedata),
    .pio_out    (pio_out)
  );

  led_flasher #(
    .DATA_W  (DATA_W),
    .ADDR_W  (ADDR_W),
    .COUNT_W (COUNT_W)
  ) u_led (
    .clk        (clk),
    .reset_n    (reset_n),
    .read       (led_read),
    .write      (led_write),
    .chipselect (led_chipselect),
    .address    (led_address),
    .readdata   (led_readdata),
    .writedata  (led_writedata),
    .leds       (leds)
  );

endmodule
