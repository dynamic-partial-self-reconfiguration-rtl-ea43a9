// tb_pcap_system_4slot: the system with all twelve 2 KB block RAMs of the
// reference device in use, holding four 5120-byte partial bitstreams (one per
// reconfigurable column), NUM_BRAMS=12, NUM_SLOTS=4, ADDR_W=15.
//
// The four images are loaded through the load port and each is sent once, in
// the order 3, 0, 2, 1. A SelectMAP slave model records the port traffic. For
// every slot the testbench checks each byte and the NOOP tail, that the
// bytes go out on consecutive clocks, and the start-to-done latency
// (5120 + 11 clocks). It also checks for protocol errors.
module tb_pcap_system_4slot;
  import pcap_pkg::*;

  localparam int unsigned NS = 4, SLOT_BYTES = 6144, BS = 5120, NC = 8, AW = 15;

  logic          clk = 0, rst, start, busy, done;
  logic [1:0]    slot;
  logic          ld_we;
  logic [AW-1:0] ld_addr;
  logic [7:0]    ld_data;
  logic [0:7]    smap_d;
  logic          smap_cs_b, smap_rdwr_b, smap_cclk;
  logic          cnt_clk = 0, cnt_rst = 1, cnt_up = 1;
  logic [3:0]    cnt_q;
  int            checks = 0, failures = 0;
  int            sent [NS];

  pcap_system #(.NUM_BRAMS(12), .ADDR_W(AW), .NUM_SLOTS(NS)) dut (
    .clk(clk), .rst(rst), .start(start), .slot(slot), .busy(busy), .done(done),
    .ld_we(ld_we), .ld_addr(ld_addr), .ld_data(ld_data),
    .smap_d(smap_d), .smap_cs_b(smap_cs_b), .smap_rdwr_b(smap_rdwr_b), .smap_cclk(smap_cclk),
    .cnt_clk(cnt_clk), .cnt_rst(cnt_rst), .cnt_up(cnt_up), .cnt_q(cnt_q));

  selectmap_model u_port (.cclk(smap_cclk), .d(smap_d), .cs_b(smap_cs_b), .rdwr_b(smap_rdwr_b));

  always #10ns clk = ~clk;
  always #10ns cnt_clk = ~cnt_clk;

  initial begin
    #3ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] image(input int unsigned s, input int unsigned i);
    return 8'(((i * 40503) >> 5) ^ (s * 53 + 1) ^ (i >> 9));
  endfunction

  task automatic expect_true(input bit c, input string what);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic reconfigure(input int unsigned s);
    int unsigned q0, cycles;
    q0 = u_port.rx.size();
    @(negedge clk);
    start = 1; slot = 2'(s);
    @(negedge clk);
    start = 0;
    cycles = 1;
    while (!done && cycles < 10000) begin
      @(negedge clk);
      cycles++;
    end
    expect_true(cycles == BS + 11, $sformatf("slot %0d: %0d clocks, expected %0d", s, cycles, BS + 11));
    repeat (4) @(posedge clk);
    expect_true(u_port.rx.size() - q0 == BS + NC, $sformatf("slot %0d: %0d bytes", s, u_port.rx.size() - q0));
    expect_true(u_port.last_bytes == BS + NC, "bytes not on consecutive clocks");
    for (int i = 0; i < BS + NC && q0 + i < u_port.rx.size(); i++) begin
      logic [7:0] want;
      want = (i < BS) ? image(s, i) : NOOP_WORD[31 - 8 * ((i - BS) % 4) -: 8];
      checks++;
      if (u_port.rx[q0 + i] !== want) begin
        failures++;
        if (failures < 10) $display("slot %0d byte %0d: got %02h want %02h", s, i, u_port.rx[q0 + i], want);
      end
    end
    sent[s]++;
  endtask

  initial begin
    rst = 1; start = 0; slot = 0; ld_we = 0; ld_addr = '0; ld_data = '0;
    for (int s = 0; s < NS; s++) sent[s] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 0;
    u_port.clear();
    for (int s = 0; s < NS; s++)
      for (int i = 0; i < BS; i++) begin
        ld_we = 1; ld_addr = AW'(s * SLOT_BYTES + i); ld_data = image(s, i);
        @(negedge clk);
      end
    ld_we = 0;
    reconfigure(3);
    reconfigure(0);
    reconfigure(2);
    reconfigure(1);
    expect_true(u_port.sessions == NS, $sformatf("%0d sessions", u_port.sessions));
    expect_true(u_port.errors == 0, $sformatf("%0d protocol errors", u_port.errors));
    for (int s = 0; s < NS; s++) expect_true(sent[s] == 1, $sformatf("slot %0d not sent", s));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
