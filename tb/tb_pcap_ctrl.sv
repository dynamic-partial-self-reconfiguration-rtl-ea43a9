// tb_pcap_ctrl: checks the PCAP core's SelectMAP write sequence.
//
// A behavioural one-clock-latency memory with a known pattern feeds the core;
// a SelectMAP slave model records what the port would accept. For each
// reconfiguration the testbench checks: the byte stream equals the selected
// slot's bytes followed by NULL_CYCLES NOOP bytes (0x20 00 00 00 ...), one
// byte per clock with no gaps, RDWR_B low exactly one clock before CSI_B falls
// and one clock after it rises, busy over the whole sequence, a single done
// pulse, and the total latency 1 + SETUP + BYTES + NULL + HOLD clocks. A start
// while busy must be ignored. Reduced slot sizes and three slots keep it short.
module tb_pcap_ctrl;
  import pcap_pkg::*;

  localparam int unsigned AW = 8, NS = 3, SB = 70, BL = 61, NC = 8;
  localparam int unsigned LATENCY = 1 + 1 + BL + NC + 1;

  logic          clk = 0, rst, start, busy, done;
  logic [1:0]    slot;
  logic [AW-1:0] mem_addr;
  logic [7:0]    mem_data;
  logic [0:7]    smap_d;
  logic          smap_cs_b, smap_rdwr_b;
  int            checks = 0, failures = 0;
  int            busy_starts = 0;

  pcap_ctrl #(.ADDR_W(AW), .NUM_SLOTS(NS), .SLOT_BYTES(SB), .BITSTREAM_BYTES(BL),
              .NULL_CYCLES(NC)) dut (
    .clk(clk), .rst(rst), .start(start), .slot(slot), .busy(busy), .done(done),
    .mem_addr(mem_addr), .mem_data(mem_data), .smap_d(smap_d),
    .smap_cs_b(smap_cs_b), .smap_rdwr_b(smap_rdwr_b));

  selectmap_model u_port (.cclk(clk), .d(smap_d), .cs_b(smap_cs_b), .rdwr_b(smap_rdwr_b));

  function automatic logic [7:0] img(input int unsigned a);
    return 8'((a * 29 + 7) ^ (a >> 2));
  endfunction

  always_ff @(posedge clk) mem_data <= img(32'(mem_addr));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(input bit c, input string what);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic reconfigure(input int unsigned s, input bit poke_while_busy);
    int cycles, dones, not_busy;
    int unsigned base_q;
    base_q = u_port.rx.size();
    start = 1; slot = 2'(s);
    @(posedge clk); #1;
    start = 0;
    cycles = 1; dones = 0; not_busy = 0;
    while (!done && cycles < 1000) begin
      if (!busy) not_busy++;
      if (poke_while_busy && cycles == 20) begin
        start = 1; slot = 2'((s + 1) % NS); busy_starts++;
      end else start = 0;
      @(posedge clk); #1;
      cycles++;
    end
    start = 0;
    expect_true(cycles == LATENCY, $sformatf("slot %0d latency %0d, expected %0d", s, cycles, LATENCY));
    expect_true(not_busy == 0, "busy dropped during the sequence");
    // done lasts one clock and the core is idle afterwards.
    @(posedge clk); #1;
    expect_true(!done && !busy, "done not a single pulse / still busy");
    repeat (3) @(posedge clk);
    #1;
    expect_true(!busy && smap_cs_b && smap_rdwr_b, "core not idle after sequence");
    // Stream contents.
    expect_true(u_port.rx.size() - base_q == BL + NC,
                $sformatf("slot %0d: %0d bytes written, expected %0d", s, u_port.rx.size() - base_q, BL + NC));
    for (int i = 0; i < BL + NC && base_q + i < u_port.rx.size(); i++) begin
      logic [7:0] want;
      want = (i < BL) ? img(s * SB + i) : NOOP_WORD[31 - 8 * ((i - BL) % 4) -: 8];
      checks++;
      if (u_port.rx[base_q + i] !== want) begin
        failures++;
        if (failures < 10) $display("slot %0d byte %0d: got %02h want %02h", s, i, u_port.rx[base_q + i], want);
      end
    end
    expect_true(u_port.last_bytes == BL + NC, "bytes not on consecutive clocks");
    expect_true(u_port.setup_clks == 1, $sformatf("RDWR_B-to-CSI_B setup %0d clocks", u_port.setup_clks));
    expect_true(u_port.hold_clks == 1, $sformatf("CSI_B-to-RDWR_B hold %0d clocks", u_port.hold_clks));
  endtask

  initial begin
    rst = 1; start = 0; slot = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    u_port.clear();
    @(posedge clk); #1;
    expect_true(!busy && smap_cs_b && smap_rdwr_b && !done, "reset state");
    reconfigure(0, 0);
    reconfigure(1, 1);
    reconfigure(2, 0);
    reconfigure(0, 0);
    expect_true(u_port.sessions == 4, $sformatf("%0d write sessions, expected 4", u_port.sessions));
    expect_true(u_port.errors == 0, $sformatf("%0d SelectMAP protocol errors", u_port.errors));
    expect_true(busy_starts > 0, "start-while-busy never exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
