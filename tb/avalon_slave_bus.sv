// avalon_slave_bus -- testbench bundle of Avalon-MM slave-port signals with
// a simple bus-master model and protocol checks.
//
// The master tasks follow the basic slave transfer timing: a bus cycle
// starts on a rising clock edge (signals are driven just after it), a
// zero-wait-state transfer ends on the next rising edge, and each wait
// state adds one clock. Read data is taken as it stands just before the
// closing edge, which is the value the fabric would latch on that edge.
//
// Checks: read and write are never both asserted with chipselect, and the
// strobes are only driven while chipselect is high.
interface avalon_slave_bus #(
  parameter int unsigned DATA_W = 16,
  parameter int unsigned ADDR_W = 5
) (
  input logic clk
);

  logic              chipselect;
  logic              read;
  logic              write;
  logic [ADDR_W-1:0] address;
  logic [DATA_W-1:0] writedata;
  logic [DATA_W-1:0] readdata;

  // Number of clock cycles chipselect has been high, for period checks.
  int unsigned busy_cycles;

  always @(posedge clk) if (chipselect) busy_cycles <= busy_cycles + 1;

  a_rw_exclusive : assert property (@(posedge clk) chipselect |-> !(read && write))
    else $error("read and write asserted together");
  a_strobe_needs_cs : assert property (@(posedge clk) (read || write) |-> chipselect)
    else $error("read/write strobe without chipselect");

  task automatic idle();
    chipselect = 1'b0;
    read       = 1'b0;
    write      = 1'b0;
    address    = '0;
    writedata  = '0;
  endtask

  // Write transfer: drive after an edge, slave captures on the edge that
  // follows the wait states.
  task automatic write_xfer(input logic [ADDR_W-1:0] a,
                            input logic [DATA_W-1:0] d,
                            input int unsigned wait_states = 0);
    @(posedge clk); #1;
    chipselect = 1'b1;
    write      = 1'b1;
    address    = a;
    writedata  = d;
    repeat (wait_states + 1) @(posedge clk);
    #1 idle();
  endtask

  // Read transfer: returns readdata as it stands at the closing edge.
  task automatic read_xfer(input  logic [ADDR_W-1:0] a,
                           output logic [DATA_W-1:0] d,
                           input  int unsigned wait_states = 1);
    @(posedge clk); #1;
    chipselect = 1'b1;
    read       = 1'b1;
    address    = a;
    repeat (wait_states) @(posedge clk);
    @(negedge clk);
    d = readdata;
    @(posedge clk); #1;
    idle();
  endtask

endinterface
