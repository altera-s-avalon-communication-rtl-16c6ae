// tb_avalon_pio_out -- self-checking testbench of the output-register slave.
//
// Random cycles drive every combination of write and chipselect with random
// data. A reference register, updated only when both strobes were high at
// an edge, is compared with pio_out after every edge. Transfers through the
// bus-master model check the zero-wait-state write timing: the new value
// appears right after the edge that closes the transfer; a write with one
// wait state leaves the same value.
module tb_avalon_pio_out;

  localparam int unsigned DW = 16;

  logic clk;
  logic [DW-1:0] pio_out;

  initial clk = 1'b0;
  always #5 clk = ~clk;

  avalon_slave_bus #(.DATA_W(DW), .ADDR_W(1)) bus (.clk(clk));

  avalon_pio_out dut (
    .clk        (clk),
    .chipselect (bus.chipselect),
    .write      (bus.write),
    .writedata  (bus.writedata),
    .pio_out    (pio_out)
  );

  assign bus.readdata = pio_out;

  int unsigned checks   = 0;
  int unsigned failures = 0;
  int unsigned n_load = 0, n_hold_cs = 0, n_hold_wr = 0;
  logic [DW-1:0] expected;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic pbus_write_ws1();
    logic [DW-1:0] d;
    d = DW'($urandom);
    bus.write_xfer('0, d, 1);
    expected = d;
    check(pio_out == expected, "write with one wait state loads pio_out");
  endtask

  initial begin
    bus.idle();
    // First load through a zero-wait-state transfer.
    bus.write_xfer('0, 16'h1234, 0);
    check(pio_out == 16'h1234, "write transfer loads pio_out");
    expected = 16'h1234;

    for (int i = 0; i < 2000; i++) begin
      logic cs, wr;
      logic [DW-1:0] d;
      cs = 1'($urandom);
      wr = cs ? 1'($urandom) : 1'b0;
      // The strobe rule forbids write without chipselect; chipselect alone
      // and chipselect with write are exercised.
      d  = DW'($urandom);
      @(negedge clk);
      bus.chipselect = cs;
      bus.write      = wr;
      bus.writedata  = d;
      @(posedge clk);
      if (cs && wr) begin expected = d; n_load++; end
      else if (cs) n_hold_wr++;
      else n_hold_cs++;
      @(negedge clk);
      check(pio_out == expected, $sformatf("cycle %0d cs=%0b wr=%0b: %h vs %h",
                                           i, cs, wr, pio_out, expected));
    end
    bus.idle();

    // Timing: value changes only at the edge that closes the transfer.
    @(posedge clk); #1;
    bus.chipselect = 1'b1; bus.write = 1'b1; bus.writedata = ~expected;
    #2;
    check(pio_out == expected, "pio_out unchanged before the closing edge");
    @(posedge clk); #1;
    check(pio_out == ~expected, "pio_out updated right after the closing edge");
    bus.idle();

    // A write with one wait state (strobes held for two edges) leaves the
    // same value as a zero-wait write.
    pbus_write_ws1();

    check(n_load > 0 && n_hold_wr > 0 && n_hold_cs > 0, "all strobe combinations exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
