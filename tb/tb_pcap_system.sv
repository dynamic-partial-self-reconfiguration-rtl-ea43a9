// tb_pcap_system: end-to-end run of the self-reconfiguring system at its
// default sizes (six 2 KB block RAMs, two 5120-byte partial bitstreams, 50 MHz
// configuration clock).
//
// The board loop-back is modelled by connecting the smap_* pins to a
// SelectMAP slave model. A small stand-in for the configuration logic and the
// reconfigured DCM interprets each received bitstream: it must start with the
// sync word 0xAA995566, and byte 4 gives the divider applied to a 50 MHz
// reference for the counter clock cnt_clk (1 -> 50 MHz, 10 -> 5 MHz). The
// image format is this testbench's own stand-in for a real partial bitstream.
//
// Steps: load both images through the load port; count at 50 MHz; reconfigure
// to the 5 MHz image (a second start during the run must be ignored), count
// down; reconfigure back to 50 MHz. Checked: every byte received against the
// image plus the trailing NOOP bytes, 5120 bytes in 5120 consecutive clocks
// (50 MB/s), start-to-done time close to 0.1 ms, no SelectMAP protocol errors,
// the counter rate before and after each switch, and that the counter keeps
// its count across the switch. Each mechanism (both images sent, frequency
// switch each way, ignored start, null operations, counting up and down) must
// occur at least once.
module tb_pcap_system;
  import pcap_pkg::*;

  localparam int unsigned SLOT_BYTES = 6144, BS = 5120, NC = 8;
  localparam realtime     TCLK = 20ns;   // 50 MHz configuration clock

  logic        clk = 0, rst, start, busy, done;
  logic [0:0]  slot;
  logic        ld_we;
  logic [13:0] ld_addr;
  logic [7:0]  ld_data;
  logic [0:7]  smap_d;
  logic        smap_cs_b, smap_rdwr_b, smap_cclk;
  logic        cnt_clk = 0, cnt_rst, cnt_up;
  logic [3:0]  cnt_q;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_slot[2]   = '{0, 0};
  int n_to_slow   = 0, n_to_fast = 0, n_ignored = 0, n_noop = 0;
  int n_up = 0, n_down = 0;

  pcap_system dut (
    .clk(clk), .rst(rst), .start(start), .slot(slot), .busy(busy), .done(done),
    .ld_we(ld_we), .ld_addr(ld_addr), .ld_data(ld_data),
    .smap_d(smap_d), .smap_cs_b(smap_cs_b), .smap_rdwr_b(smap_rdwr_b), .smap_cclk(smap_cclk),
    .cnt_clk(cnt_clk), .cnt_rst(cnt_rst), .cnt_up(cnt_up), .cnt_q(cnt_q));

  // Board loop-back into the device's own SelectMAP port.
  selectmap_model u_port (.cclk(smap_cclk), .d(smap_d), .cs_b(smap_cs_b), .rdwr_b(smap_rdwr_b));

  always #(TCLK / 2) clk = ~clk;

  // Reconfigured DCM: cnt_clk = 50 MHz / div.
  int unsigned div = 1;
  always #(TCLK / 2 * div) cnt_clk = ~cnt_clk;

  // Reference count of the counter, advanced on every cnt_clk edge.
  int unsigned ref_cnt;
  int unsigned edges = 0;
  always @(posedge cnt_clk) begin
    edges++;
    if (cnt_rst) ref_cnt = 0;
    else if (cnt_up) begin ref_cnt = (ref_cnt + 1) % 16; n_up++; end
    else begin ref_cnt = (ref_cnt + 15) % 16; n_down++; end
  end

  initial begin
    #2ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Test image of slot s: sync word, divider byte, pseudo-random frame data.
  function automatic logic [7:0] image(input int unsigned s, input int unsigned i);
    logic [31:0] sync = 32'hAA99_5566;
    if (i < 4)  return sync[31 - 8 * i -: 8];
    if (i == 4) return (s == 0) ? 8'd1 : 8'd10;
    return 8'(((i * 2654435761) >> 13) ^ (s * 77) ^ i);
  endfunction

  task automatic expect_true(input bit c, input string what);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Configuration-logic stand-in: apply the divider of a finished session.
  int unsigned seen_sessions = 0;
  always @(posedge smap_cclk) begin
    if (u_port.sessions != seen_sessions && u_port.rx.size() >= BS + NC) begin
      int unsigned b;
      logic ok;
      seen_sessions = u_port.sessions;
      b  = u_port.rx.size() - (BS + NC);
      ok = {u_port.rx[b], u_port.rx[b+1], u_port.rx[b+2], u_port.rx[b+3]} == 32'hAA99_5566;
      if (ok && u_port.rx[b+4] != 0) begin
        int unsigned new_div;
        new_div = 32'(u_port.rx[b+4]);
        if (new_div > div) n_to_slow++;
        else if (new_div < div) n_to_fast++;
        div = new_div;
      end
    end
  end

  // Counter rate over a window, and continuity of the count.
  task automatic measure(input int unsigned want_div, input string tag);
    int unsigned e0, e1;
    @(posedge cnt_clk);
    e0 = edges;
    #4us;
    e1 = edges;
    // 4 us at 50 MHz/div
    expect_true((e1 - e0) >= 200 / want_div - 1 && (e1 - e0) <= 200 / want_div + 1,
                $sformatf("%s: %0d counter clocks in 4 us, expected %0d", tag, e1 - e0, 200 / want_div));
    @(negedge cnt_clk);
    expect_true(cnt_q == 4'(ref_cnt), $sformatf("%s: count %0d, expected %0d", tag, cnt_q, ref_cnt));
  endtask

  task automatic reconfigure(input int unsigned s, input bit poke);
    int unsigned q0, cycles;
    realtime t0, t1;
    q0 = u_port.rx.size();
    @(negedge clk);
    start = 1; slot = 1'(s);
    @(posedge clk); t0 = $realtime;
    @(negedge clk); start = 0;
    cycles = 1;
    while (!done && cycles < 10000) begin
      if (poke && cycles == 100) begin start = 1; slot = 1'(1 - s); end
      else start = 0;
      @(posedge clk);
      if (poke && cycles == 100) begin
        checks++;
        if (!busy) failures++; else n_ignored++;
      end
      @(negedge clk);
      cycles++;
    end
    t1 = $realtime;
    start = 0;
    n_slot[s]++;
    expect_true(cycles == 1 + 1 + BS + NC + 1,
                $sformatf("slot %0d: %0d clocks start to done, expected %0d", s, cycles, 1 + 1 + BS + NC + 1));
    // 5120 bytes at 50 MB/s = 102.4 us, i.e. about 0.1 ms.
    expect_true(t1 - t0 >= 100us && t1 - t0 <= 110us,
                $sformatf("slot %0d: reconfiguration took %0t", s, t1 - t0));
    // let the port see the end of the session and the stand-in act on it
    repeat (4) @(posedge clk);
    expect_true(u_port.rx.size() - q0 == BS + NC, $sformatf("slot %0d: %0d bytes", s, u_port.rx.size() - q0));
    expect_true(u_port.last_bytes == BS + NC, "bytes not sent on consecutive clocks (rate below 1 byte/clock)");
    for (int i = 0; i < BS + NC && q0 + i < u_port.rx.size(); i++) begin
      logic [7:0] want;
      want = (i < BS) ? image(s, i) : NOOP_WORD[31 - 8 * ((i - BS) % 4) -: 8];
      checks++;
      if (u_port.rx[q0 + i] !== want) begin
        failures++;
        if (failures < 10) $display("slot %0d byte %0d: got %02h want %02h", s, i, u_port.rx[q0 + i], want);
      end else if (i >= BS) n_noop++;
    end
  endtask

  initial begin
    rst = 1; start = 0; slot = 0; ld_we = 0; ld_addr = '0; ld_data = '0;
    cnt_rst = 1; cnt_up = 1;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 0;
    u_port.clear();
    // Fill the two slots (the initial configuration would do this).
    for (int s = 0; s < 2; s++)
      for (int i = 0; i < BS; i++) begin
        ld_we = 1; ld_addr = 14'(s * SLOT_BYTES + i); ld_data = image(s, i);
        @(negedge clk);
      end
    ld_we = 0;
    @(negedge cnt_clk); cnt_rst = 0;
    expect_true(!busy && smap_cs_b && smap_rdwr_b, "idle after reset");

    measure(1, "initial 50 MHz");
    reconfigure(1, 1);
    expect_true(div == 10, $sformatf("after slot 1: divider %0d, expected 10", div));
    @(negedge cnt_clk); cnt_up = 0;
    measure(10, "after switch to 5 MHz");
    reconfigure(0, 0);
    expect_true(div == 1, $sformatf("after slot 0: divider %0d, expected 1", div));
    measure(1, "after switch back to 50 MHz");

    expect_true(u_port.errors == 0, $sformatf("%0d SelectMAP protocol errors", u_port.errors));
    expect_true(u_port.sessions == 2, $sformatf("%0d write sessions, expected 2", u_port.sessions));
    // Every mechanism happened.
    expect_true(n_slot[0] > 0 && n_slot[1] > 0, "not both bitstreams sent");
    expect_true(n_to_slow > 0, "no switch 50 -> 5 MHz");
    expect_true(n_to_fast > 0, "no switch 5 -> 50 MHz");
    expect_true(n_ignored > 0, "no start while busy");
    expect_true(n_noop > 0, "no null operations");
    expect_true(n_up > 0 && n_down > 0, "counter did not count both ways");
    $display("mechanisms: slot0=%0d slot1=%0d to5MHz=%0d to50MHz=%0d ignored_start=%0d noop_bytes=%0d up=%0d down=%0d",
             n_slot[0], n_slot[1], n_to_slow, n_to_fast, n_ignored, n_noop, n_up, n_down);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
