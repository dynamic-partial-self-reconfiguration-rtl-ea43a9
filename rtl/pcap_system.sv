// pcap_system: a Spartan-3 class FPGA that partially reconfigures itself
// through its own SelectMAP slave port, with the partial bitstreams kept in
// on-chip block RAM and sent by the PCAP core, plus the example circuit whose
// clock the reconfiguration changes.
//
// Structure:
//   bitstream_bram - NUM_BRAMS x BRAM_BYTES bytes holding NUM_SLOTS partial
//                    bitstreams, slot n at n*SLOT_BYTES.
//   pcap_ctrl      - on start, streams slot `slot` to the SelectMAP pins at
//                    one byte per clock, framed by RDWR_B/CSI_B and followed
//                    by null operations.
//   updown_counter - the 4-bit counter clocked by the reconfigurable DCM.
// The eleven SelectMAP wires (D[0:7], CS, WRITE, CCLK) leave the device on
// smap_* and are looped back on the board into the dedicated SelectMAP pins,
// with the mode pins strapped for slave parallel mode. The device thus acts
// as the configuration master and as the slave being configured. CCLK is clk
// itself (CLK0 of the PCAP core's DCM), forwarded unchanged, so the port
// samples each byte on the clock edge after it was driven. smap_cclk is
// therefore wired straight to the clk input on purpose; on the FPGA it leaves
// through an output pin (a clock-forwarding output register if preferred).
//
// The two DCMs are device primitives and are outside this module: clk is
// the PCAP DCM's CLK0 (50 MHz in the reference system, giving 50 MB/s) and
// cnt_clk is the output of the reconfigured DCM (5 or 50 MHz).
// The block RAM load port (ld_*) is this design's addition; in the intended
// use the bitstreams are part of the initial configuration (INIT_FILE).
//
// Interface: see pcap_ctrl for start/slot/busy/done timing; ld_* writes one
// byte per clk; cnt_* run in the cnt_clk domain and are independent of the
// rest.
module pcap_system #(
  parameter int unsigned NUM_BRAMS       = 6,
  parameter int unsigned BRAM_BYTES      = 2048,
  parameter int unsigned ADDR_W          = 14,
  parameter int unsigned NUM_SLOTS       = 2,
  parameter int unsigned SLOT_BYTES      = 6144,
  parameter int unsigned BITSTREAM_BYTES = 5120,
  parameter int unsigned NULL_CYCLES     = 8,
  parameter int unsigned CNT_WIDTH       = 4,
  parameter string       INIT_FILE       = "",
  localparam int unsigned SLOT_W         = (NUM_SLOTS > 1) ? $clog2(NUM_SLOTS) : 1
) (
  // PCAP side, clocked by the PCAP DCM's CLK0
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 start,
  input  logic [SLOT_W-1:0]    slot,
  output logic                 busy,
  output logic                 done,
  // block RAM load port
  input  logic                 ld_we,
  input  logic [ADDR_W-1:0]    ld_addr,
  input  logic [7:0]           ld_data,
  // SelectMAP pins driven by the PCAP core (looped back externally)
  output logic [0:7]           smap_d,
  output logic                 smap_cs_b,
  output logic                 smap_rdwr_b,
  output logic                 smap_cclk,
  // example circuit, clocked by the reconfigurable DCM
  input  logic                 cnt_clk,
  input  logic                 cnt_rst,
  input  logic                 cnt_up,
  output logic [CNT_WIDTH-1:0] cnt_q
);

  logic [ADDR_W-1:0] mem_addr;
  logic [7:0]        mem_data;

  bitstream_bram #(
    .NUM_BRAMS (NUM_BRAMS),
    .BRAM_BYTES(BRAM_BYTES),
    .ADDR_W    (ADDR_W),
    .INIT_FILE (INIT_FILE)
  ) u_store (
    .clk    (clk),
    .rd_addr(mem_addr),
    .rd_data(mem_data),
    .wr_en  (ld_we),
    .wr_addr(ld_addr),
    .wr_data(ld_data)
  );

  pcap_ctrl #(
    .ADDR_W         (ADDR_W),
    .NUM_SLOTS      (NUM_SLOTS),
    .SLOT_BYTES     (SLOT_BYTES),
    .BITSTREAM_BYTES(BITSTREAM_BYTES),
    .NULL_CYCLES    (NULL_CYCLES)
  ) u_pcap (
    .clk        (clk),
    .rst        (rst),
    .start      (start),
    .slot       (slot),
    .busy       (busy),
    .done       (done),
    .mem_addr   (mem_addr),
    .mem_data   (mem_data),
    .smap_d     (smap_d),
    .smap_cs_b  (smap_cs_b),
    .smap_rdwr_b(smap_rdwr_b)
  );

  // CCLK is the core's own clock, forwarded to the SelectMAP pin.
  assign smap_cclk = clk;

  updown_counter #(.WIDTH(CNT_WIDTH)) u_counter (
    .clk(cnt_clk),
    .rst(cnt_rst),
    .up (cnt_up),
    .q  (cnt_q)
  );

endmodule
