// avalon_pio_out -- the smallest useful Avalon-MM slave: a write-only
// parallel output register.
//
// The register loads writedata on a rising clock edge at which the bus
// asserts both write and chipselect (the AND of the two is the register's
// clock enable); otherwise it holds. Its output, pio_out, leaves the
// peripheral as an application-specific interface (for example LEDs).
//
// Interface: clk, chipselect, write, writedata[DATA_W-1:0] from the bus;
// pio_out[DATA_W-1:0] to the application. There is no read path, no
// address and no reset, exactly as in the classic block diagram of this
// peripheral; pio_out is therefore undefined until the first write.
//
// Timing: a zero-wait-state write. The bus presents write, chipselect and
// writedata after one edge; the register captures them at the next edge,
// and pio_out shows the new value right after that edge.
module avalon_pio_out #(
  parameter int unsigned DATA_W = avalon_pkg::DATA_W
) (
  input  logic              clk,
  input  logic              chipselect,
  input  logic              write,
  input  logic [DATA_W-1:0] writedata,
  output logic [DATA_W-1:0] pio_out
);

  logic clk_en;

  assign clk_en = write & chipselect;

  always_ff @(posedge clk) begin
    if (clk_en) pio_out <= writedata;
  end

endmodule
