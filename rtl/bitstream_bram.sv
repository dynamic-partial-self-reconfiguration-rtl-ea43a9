// bitstream_bram: on-chip store for partial bitstreams, NUM_BRAMS block RAMs
// of BRAM_BYTES bytes each, seen as one byte-wide memory.
//
// The PCAP core reads it one byte per clock through a synchronous read port
// (data appears on the clock after the address). A second, write-only port
// lets user logic or a testbench fill it; in the intended use the contents
// arrive with the device's initial configuration instead, which INIT_FILE
// stands in for (a $readmemh image of the stored bitstreams). Without a file
// the memory starts cleared.
//
// Interface and timing, all on the rising edge of clk:
//   rd_addr -> rd_data one clock later.
//   wr_en/wr_addr/wr_data write one byte. Reading an address in the same
//   clock it is written returns the old byte.
//
// From the reference PCAP design: byte-wide storage in Spartan-3 block RAMs, using only
// their 16 Kbit data part (2048 x 8 each, parity bits unused), six of them.
// Choices of this design: the write port, the read-first collision rule and
// the optional initialisation file.
module bitstream_bram #(
  parameter int unsigned NUM_BRAMS  = 6,
  parameter int unsigned BRAM_BYTES = 2048,
  parameter int unsigned ADDR_W     = 14,
  parameter string       INIT_FILE  = ""
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] rd_addr,
  output logic [7:0]        rd_data,
  input  logic              wr_en,
  input  logic [ADDR_W-1:0] wr_addr,
  input  logic [7:0]        wr_data
);

  localparam int unsigned DEPTH = NUM_BRAMS * BRAM_BYTES;

  if (DEPTH > (1 << ADDR_W)) begin : gen_chk_depth
    $error("bitstream_bram: NUM_BRAMS*BRAM_BYTES exceeds the address range");
  end

  logic [7:0] mem [DEPTH];

  initial begin
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
    else for (int i = 0; i < DEPTH; i++) mem[i] = 8'h00;
  end

  always_ff @(posedge clk) begin
    rd_data <= mem[rd_addr];
    if (wr_en) mem[wr_addr] <= wr_data;
  end

endmodule
