// pcap_pkg: types and constants shared by the PCAP (parallel configuration
// access port) core and its testbenches.
//
// The controller walks through the SelectMAP slave write sequence
// (write enable, chip select, data bytes, trailing no-operations, release);
// pcap_state_t names its steps. The no-operation packet is the type-1 NOOP
// header of the Virtex-II / Spartan-3 configuration packet format
// (0x2000_0000), sent most significant byte first. The sequence itself follows
// the reference PCAP design; the NOOP value is taken from the device family,
// since that design only says that null operations are sent.
package pcap_pkg;

  // Steps of the SelectMAP write sequence.
  typedef enum logic [2:0] {
    ST_IDLE    = 3'd0,  // RDWR_B and CSI_B high, waiting for start
    ST_SETUP   = 3'd1,  // RDWR_B low, CSI_B still high
    ST_SEND    = 3'd2,  // CSI_B low, one bitstream byte per clock
    ST_NULL    = 3'd3,  // CSI_B low, null operations
    ST_RELEASE = 3'd4   // CSI_B high again, RDWR_B still low
  } pcap_state_t;

  // Type-1 NOOP packet of the configuration logic.
  localparam logic [31:0] NOOP_WORD = 32'h2000_0000;

  // Byte k (0 = first on the bus) of a repeated stream of NOOP words.
  function automatic logic [7:0] noop_byte(input logic [1:0] k);
    return NOOP_WORD[31 - 8*k -: 8];
  endfunction

endpackage
