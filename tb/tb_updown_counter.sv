// tb_updown_counter: checks the 4-bit up/down counter against a reference
// count for random direction and reset sequences, including wrap-around in
// both directions.
module tb_updown_counter;

  localparam int unsigned W = 4;

  logic         clk = 0;
  logic         rst;
  logic         up;
  logic [W-1:0] q;
  int           checks = 0, failures = 0;
  int unsigned  ref_q;
  int           wraps_up = 0, wraps_dn = 0;

  updown_counter #(.WIDTH(W)) dut (.clk(clk), .rst(rst), .up(up), .q(q));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int unsigned expect_q);
    checks++;
    if (q !== W'(expect_q)) begin
      failures++;
      $display("mismatch: q=%0d expected %0d", q, expect_q);
    end
  endtask

  initial begin
    rst = 1; up = 1;
    @(posedge clk); #1;
    check(0);
    ref_q = 0;
    rst = 0;
    // 40 clocks up, 40 down: wraps both ways.
    for (int i = 0; i < 80; i++) begin
      up = (i < 40);
      @(posedge clk); #1;
      if (up && ref_q == 15) wraps_up++;
      if (!up && ref_q == 0) wraps_dn++;
      ref_q = up ? (ref_q + 1) % 16 : (ref_q + 15) % 16;
      check(ref_q);
    end
    // Random direction and occasional reset.
    for (int i = 0; i < 2000; i++) begin
      up  = 1'($urandom_range(0, 1));
      rst = ($urandom_range(0, 49) == 0);
      @(posedge clk); #1;
      if (rst) ref_q = 0;
      else ref_q = up ? (ref_q + 1) % 16 : (ref_q + 15) % 16;
      check(ref_q);
    end
    checks++;
    if (wraps_up == 0 || wraps_dn == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
