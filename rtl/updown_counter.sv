// updown_counter: WIDTH-bit up/down counter, the example circuit whose clock
// is switched between 5 MHz and 50 MHz by partially reconfiguring the DCM
// that drives it.
//
// Each rising edge of clk adds one to q when up is high and subtracts one when
// it is low, wrapping modulo 2**WIDTH. rst clears q synchronously. The
// counter has no knowledge of the reconfiguration: only the frequency of clk
// changes, which is the point of the example (the rest of the system keeps
// running while the clock source is rewritten).
//
// From the reference PCAP design: a 4-bit up-down counter. Choices of this design: the
// direction input, wrap-around and the synchronous reset.
module updown_counter #(
  parameter int unsigned WIDTH = 4
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             up,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst)     q <= '0;
    else if (up) q <= q + 1'b1;
    else         q <= q - 1'b1;
  end

endmodule
