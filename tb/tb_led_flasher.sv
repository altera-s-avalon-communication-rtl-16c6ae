// tb_led_flasher -- self-checking testbench of the LED flasher peripheral.
//
// It writes the 16-entry display RAM through the slave port, reads it back
// with one read wait state, shows that a zero-wait-state read still returns
// the previous data (the registered read port), checks that reads of the
// linger half leave readdata alone, and then checks the LED scan: the
// sequence of displayed entries, the period linger*65536 + 1 for linger 0
// and 1, the wrap from entry 15 to 0, the hold of LEDs and countdown while
// the bus accesses the peripheral, and the slow rate set by reset.
module tb_led_flasher;

  localparam int unsigned DW = 16;
  localparam int unsigned AW = 5;

  logic clk;
  logic reset_n;
  logic [DW-1:0] leds;

  initial clk = 1'b0;
  always #5 clk = ~clk;

  avalon_slave_bus #(.DATA_W(DW), .ADDR_W(AW)) bus (.clk(clk));

  led_flasher dut (
    .clk        (clk),
    .reset_n    (reset_n),
    .read       (bus.read),
    .write      (bus.write),
    .chipselect (bus.chipselect),
    .address    (bus.address),
    .readdata   (bus.readdata),
    .writedata  (bus.writedata),
    .leds       (leds)
  );

  int unsigned checks   = 0;
  int unsigned failures = 0;
  logic [DW-1:0] model [16];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Index of a displayed value in the RAM model, -1 if absent.
  function automatic int find_entry(input logic [DW-1:0] v);
    for (int i = 0; i < 16; i++) if (model[i] == v) return i;
    return -1;
  endfunction

  // Let the peripheral run unselected and check n_changes LED changes:
  // each must show the next RAM entry after exactly 'period' cycles. The
  // first two changes only synchronise: the LED register lags the display
  // address by one cycle, so the step that takes a new linger value is
  // followed one cycle later by a second change.
  task automatic check_scan(input int unsigned n_changes, input longint unsigned period,
                            input string tag);
    logic [DW-1:0] prev;
    longint unsigned since;
    int idx, nidx, seen, wraps;
    bit synced;
    @(negedge clk);
    prev = leds; since = 0; seen = 0; synced = 0; wraps = 0; idx = find_entry(leds);
    while (seen < n_changes) begin
      @(negedge clk);
      since++;
      if (leds != prev) begin
        nidx = find_entry(leds);
        if (synced) begin
          check(since == period, $sformatf("%s: step after %0d cycles, expected %0d",
                                           tag, since, period));
          check(nidx == ((idx + 1) % 16), $sformatf("%s: entry %0d follows %0d",
                                                    tag, nidx, idx));
          if (nidx == 0) wraps++;
        end
        synced = (seen >= 1); seen++; idx = nidx; prev = leds; since = 0;
      end
      if (since > period + 10) begin
        check(0, $sformatf("%s: no LED change within %0d cycles", tag, since));
        return;
      end
    end
    if (n_changes > 18) check(wraps > 0, {tag, ": display address wrapped"});
  endtask

  logic [DW-1:0] rd, prev_rd;
  logic [DW-1:0] held;
  longint unsigned cyc;

  initial cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  longint unsigned t0, t1;
  int unsigned pause;

  initial begin
    bus.idle();
    bus.busy_cycles = 0;
    reset_n = 1'b0;
    repeat (3) @(posedge clk);
    #1 reset_n = 1'b1;
    @(negedge clk);
    check(bus.readdata == '0, "readdata cleared by reset");

    // After reset the counter is zero: the first idle cycle shows entry 0
    // and steps to entry 1, which is then held for 0xFFFF0001 cycles.
    // Load the RAM first, then reset again to observe that.
    for (int i = 0; i < 16; i++) begin
      model[i] = DW'({$urandom_range(0, 4095), i[3:0]});
      bus.write_xfer(AW'(i), model[i]);
    end
    reset_n = 1'b0;
    @(posedge clk); #1 reset_n = 1'b1;
    @(negedge clk);
    @(negedge clk);
    check(leds == model[0], "first idle cycle after reset shows entry 0");
    @(negedge clk);
    check(leds == model[1], "second idle cycle after reset shows entry 1");
    repeat (5000) @(negedge clk);
    check(leds == model[1], "reset linger value holds entry 1 for a long time");

    // Read back every entry with one wait state.
    for (int i = 0; i < 16; i++) begin
      bus.read_xfer(AW'(i), rd, 1);
      check(rd == model[i], $sformatf("readback entry %0d: %h vs %h", i, rd, model[i]));
    end

    // A write with one wait state stores the same value.
    model[12] = DW'({12'h5C3, 4'd12});
    bus.write_xfer(AW'(12), model[12], 1);
    bus.read_xfer(AW'(12), rd, 1);
    check(rd == model[12], "write with one wait state");

    // Registered read port: without a wait state the value at the first
    // closing edge is still the previous read's data.
    bus.read_xfer(AW'(3), prev_rd, 1);
    check(prev_rd == model[3], "readback entry 3 again");
    bus.read_xfer(AW'(9), rd, 0);
    check(rd == model[3], "zero-wait read returns stale data (one cycle read latency)");
    @(negedge clk);
    check(bus.readdata == model[9], "read data valid one cycle after read is sampled");

    // Reads in the linger half leave readdata alone.
    bus.read_xfer(AW'(5'd21), rd, 1);
    check(rd == model[9], "read of linger alias leaves readdata unchanged");

    // A new linger value only takes effect at the next reload of the
    // countdown, which after reset is the first unselected cycle. Write
    // linger 0, through a random alias, on the first edge after reset, so
    // that the countdown is still zero when it is taken: one entry per cycle.
    reset_n = 1'b0;
    @(posedge clk); #1;
    reset_n = 1'b1;
    bus.chipselect = 1'b1;
    bus.write      = 1'b1;
    bus.address    = AW'(16 + $urandom_range(0, 15));
    bus.writedata  = 16'h0000;
    @(posedge clk); #1;
    bus.idle();
    check_scan(40, 1, "linger0");

    // Overwrite an entry while scanning: new value must appear.
    model[7] = 16'hA5A7;
    bus.write_xfer(AW'(7), model[7]);
    check_scan(20, 1, "linger0-after-write");

    // Linger 1: one entry per 65537 cycles, through the wrap.
    bus.write_xfer(AW'(5'd31), 16'h0001);
    check_scan(20, 65537, "linger1");

    // Access in the middle of a step: LEDs and countdown hold, so the
    // step is stretched by the number of selected cycles.
    @(negedge clk);
    held = leds;
    while (leds == held) @(negedge clk);
    t0 = cyc;
    held = leds;
    repeat (1000) @(negedge clk);
    pause = bus.busy_cycles;
    for (int k = 0; k < 6; k++) begin
      bus.read_xfer(AW'(5'd16), rd, 1);
      check(leds == held, "LEDs hold during bus access");
    end
    pause = bus.busy_cycles - pause;
    while (leds == held) @(negedge clk);
    t1 = cyc;
    check(pause > 0, "bus access happened during the step");
    check(t1 - t0 == 65537 + longint'(pause),
          $sformatf("step stretched by %0d access cycles: %0d vs %0d", pause, t1 - t0,
                    65537 + pause));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
