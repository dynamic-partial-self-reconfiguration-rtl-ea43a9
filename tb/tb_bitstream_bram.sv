// tb_bitstream_bram: fills the whole partial-bitstream store (default size,
// 6 x 2048 bytes) through the write port with a pattern, reads every byte back
// checking the one-clock read latency, then checks random reads against a
// shadow copy while random writes go on, including same-address collisions
// (read-first).
module tb_bitstream_bram;

  localparam int unsigned NB = 6, BB = 2048, AW = 14, DEPTH = NB * BB;

  logic          clk = 0;
  logic [AW-1:0] rd_addr, wr_addr;
  logic [7:0]    rd_data, wr_data;
  logic          wr_en;
  logic [7:0]    shadow [DEPTH];
  int            checks = 0, failures = 0, collisions = 0;

  bitstream_bram #(.NUM_BRAMS(NB), .BRAM_BYTES(BB), .ADDR_W(AW)) dut (
    .clk(clk), .rd_addr(rd_addr), .rd_data(rd_data),
    .wr_en(wr_en), .wr_addr(wr_addr), .wr_data(wr_data));

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] pattern(input int unsigned a);
    return 8'((a * 131) ^ (a >> 7) ^ 8'h5A);
  endfunction

  initial begin
    wr_en = 0; wr_addr = '0; wr_data = '0; rd_addr = '0;
    // Fill.
    for (int a = 0; a < DEPTH; a++) begin
      wr_en = 1; wr_addr = AW'(a); wr_data = pattern(a);
      shadow[a] = pattern(a);
      @(posedge clk); #1;
    end
    wr_en = 0;
    // Sequential read-back, one byte per clock.
    rd_addr = '0;
    @(posedge clk); #1;
    for (int a = 1; a <= DEPTH; a++) begin
      checks++;
      if (rd_data !== pattern(a - 1)) begin
        failures++;
        if (failures < 10) $display("addr %0d: got %02h want %02h", a - 1, rd_data, pattern(a - 1));
      end
      rd_addr = AW'(a % DEPTH);
      @(posedge clk); #1;
    end
    // Random reads and writes.
    for (int i = 0; i < 20000; i++) begin
      int unsigned ra, wa;
      logic [7:0]  expect_d;
      ra = $urandom_range(0, DEPTH - 1);
      wa = ($urandom_range(0, 7) == 0) ? ra : $urandom_range(0, DEPTH - 1);
      rd_addr = AW'(ra);
      wr_en   = 1'($urandom_range(0, 1));
      wr_addr = AW'(wa);
      wr_data = 8'($urandom);
      expect_d = shadow[ra];
      if (wr_en && wa == ra) collisions++;
      if (wr_en) shadow[wa] = wr_data;
      @(posedge clk); #1;
      checks++;
      if (rd_data !== expect_d) begin
        failures++;
        if (failures < 10) $display("random read %0d: got %02h want %02h", ra, rd_data, expect_d);
      end
    end
    checks++;
    if (collisions == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
