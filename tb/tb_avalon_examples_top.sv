// tb_avalon_examples_top -- end-to-end test of both example peripherals at
// their default sizes.
//
// Two bus-master models drive the two slave ports concurrently. The output
// register port receives random writes and chipselect-only cycles; the LED
// flasher port loads its display RAM, reads it back with one wait state,
// sets the scan rate through an alias of the linger register right after
// reset, and is then left to scan with occasional bus accesses in between.
// A scoreboard follows the LEDs: every change must show the next RAM entry,
// and the time between changes must be linger*65536 + 1 plus the cycles the
// port spent selected. Each mechanism is counted, and one that never
// happened counts as a failure.
module tb_avalon_examples_top;

  localparam int unsigned DW = avalon_pkg::DATA_W;
  localparam int unsigned AW = avalon_pkg::ADDR_W;

  logic clk;
  logic reset_n;
  logic [DW-1:0] pio_out, leds;

  initial clk = 1'b0;
  always #5 clk = ~clk;

  avalon_slave_bus #(.DATA_W(DW), .ADDR_W(1))  pbus (.clk(clk));
  avalon_slave_bus #(.DATA_W(DW), .ADDR_W(AW)) lbus (.clk(clk));

  assign pbus.readdata = pio_out;

  avalon_examples_top dut (
    .clk            (clk),
    .reset_n        (reset_n),
    .pio_chipselect (pbus.chipselect),
    .pio_write      (pbus.write),
    .pio_writedata  (pbus.writedata),
    .pio_out        (pio_out),
    .led_chipselect (lbus.chipselect),
    .led_read       (lbus.read),
    .led_write      (lbus.write),
    .led_address    (lbus.address),
    .led_writedata  (lbus.writedata),
    .led_readdata   (lbus.readdata),
    .leds           (leds)
  );

  int unsigned checks   = 0;
  int unsigned failures = 0;

  // mechanism counters
  int unsigned n_pio_load, n_pio_hold, n_ram_write, n_ram_read, n_stale_read;
  int unsigned n_linger_write, n_step, n_wrap, n_access_pause;

  logic [DW-1:0] model [16];
  logic [DW-1:0] pio_expected;
  bit            pio_done;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic int find_entry(input logic [DW-1:0] v);
    for (int i = 0; i < 16; i++) if (model[i] == v) return i;
    return -1;
  endfunction

  // ---------------- output-register port ----------------
  initial begin : pio_master
    n_pio_load = 0; n_pio_hold = 0; pio_done = 0;
    pbus.idle();
    pbus.write_xfer('0, 16'hBEEF, 0);
    pio_expected = 16'hBEEF;
    check(pio_out == pio_expected, "pio: first write");
    for (int i = 0; i < 500; i++) begin
      logic [DW-1:0] d;
      d = DW'($urandom);
      if ($urandom_range(0, 2) != 0) begin
        pbus.write_xfer('0, d, 0);
        pio_expected = d;
        n_pio_load++;
      end else begin
        @(posedge clk); #1;
        pbus.chipselect = 1'b1;
        pbus.writedata  = d;
        @(posedge clk); #1;
        pbus.idle();
        n_pio_hold++;
      end
      check(pio_out == pio_expected, $sformatf("pio: %h vs %h", pio_out, pio_expected));
    end
    pio_done = 1;
  end

  // ---------------- LED flasher port ----------------
  localparam logic [DW-1:0] LINGER = 16'h0001;
  localparam longint unsigned PERIOD = longint'(LINGER) * 65536 + 1;

  bit scoreboard_on;
  longint unsigned cyc, last_change;
  longint unsigned busy_at_change;
  int last_idx;
  int changes;
  logic [DW-1:0] last_leds;

  initial cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // Scoreboard on the LED output, sampled between edges.
  always @(negedge clk) begin
    if (scoreboard_on && leds != last_leds) begin
      automatic int idx = find_entry(leds);
      automatic longint unsigned busy = longint'(lbus.busy_cycles) - busy_at_change;
      changes <= changes + 1;
      if (changes >= 2) begin
        check(idx == (last_idx + 1) % 16,
              $sformatf("leds: entry %0d after %0d", idx, last_idx));
        check(cyc - last_change == PERIOD + busy,
              $sformatf("leds: step after %0d cycles, expected %0d + %0d selected",
                        cyc - last_change, PERIOD, busy));
        n_step <= n_step + 1;
        if (idx == 0) n_wrap <= n_wrap + 1;
        if (busy > 0) n_access_pause <= n_access_pause + 1;
      end
      last_idx <= idx;
      last_change <= cyc;
      busy_at_change <= longint'(lbus.busy_cycles);
      last_leds <= leds;
    end
  end

  logic [DW-1:0] rd;
  logic [DW-1:0] held;

  initial begin : led_master
    n_ram_write = 0; n_ram_read = 0; n_stale_read = 0; n_linger_write = 0;
    n_step = 0; n_wrap = 0; n_access_pause = 0;
    scoreboard_on = 0; changes = 0; last_idx = -1; last_leds = '0;
    lbus.idle();
    lbus.busy_cycles = 0;
    busy_at_change = 0;
    reset_n = 1'b0;
    repeat (4) @(posedge clk);
    #1 reset_n = 1'b1;

    for (int i = 0; i < 16; i++) begin
      model[i] = DW'({$urandom_range(0, 4095), i[3:0]});
      lbus.write_xfer(AW'(i), model[i]);
      n_ram_write++;
    end
    for (int i = 15; i >= 0; i--) begin
      lbus.read_xfer(AW'(i), rd, 1);
      check(rd == model[i], $sformatf("ram readback %0d", i));
      n_ram_read++;
    end
    lbus.read_xfer(AW'(2), rd, 0);
    check(rd == model[0], "zero-wait read returns the previous data");
    n_stale_read++;

    // Reset, and set the rate on the first edge after it so that the
    // countdown (zero after reset) picks the new linger value up.
    reset_n = 1'b0;
    @(posedge clk); #1;
    reset_n = 1'b1;
    lbus.chipselect = 1'b1;
    lbus.write      = 1'b1;
    lbus.address    = AW'(16 + $urandom_range(0, 15));
    lbus.writedata  = LINGER;
    @(posedge clk); #1;
    lbus.idle();
    n_linger_write++;
    scoreboard_on = 1;

    // Scan until 20 steps (more than one pass over the RAM) were checked,
    // with a few accesses in between.
    for (int k = 0; n_step < 20; k++) begin
      repeat (int'($urandom_range(20000, 50000))) @(posedge clk);
      if (k % 3 == 1) begin
        held = leds;
        repeat ($urandom_range(1, 4)) begin
          lbus.read_xfer(AW'($urandom_range(0, 15)), rd, 1);
          n_ram_read++;
        end
        check(leds == held, "leds hold during access");
      end
      if (k == 10) begin
        automatic logic [3:0] e = 4'($urandom_range(0, 15));
        // Rewrite an entry with its own index kept, so the scoreboard
        // still recognises it.
        model[e] = DW'({$urandom_range(0, 4095), e});
        lbus.write_xfer(AW'(e), model[e]);
        n_ram_write++;
      end
    end
    wait (pio_done);

    check(n_pio_load > 0,      "mechanism: output register load");
    check(n_pio_hold > 0,      "mechanism: output register hold without write");
    check(n_ram_write > 0,     "mechanism: display RAM write");
    check(n_ram_read > 0,      "mechanism: display RAM read with one wait state");
    check(n_stale_read > 0,    "mechanism: registered read latency");
    check(n_linger_write > 0,  "mechanism: linger register write");
    check(n_step >= 16,        "mechanism: display step");
    check(n_wrap > 0,          "mechanism: display address wrap");
    check(n_access_pause > 0,  "mechanism: scan paused by bus access");
    $display("pio loads %0d holds %0d; ram writes %0d reads %0d; steps %0d wraps %0d paused %0d",
             n_pio_load, n_pio_hold, n_ram_write, n_ram_read, n_step, n_wrap, n_access_pause);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
