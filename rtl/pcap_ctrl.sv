// pcap_ctrl: PCAP core - drives the device's own SelectMAP slave port from
// partial bitstreams held in on-chip BlockRAM, so that the FPGA can partially
// reconfigure itself without a processor or an ICAP.
//
// How it works. A start pulse selects one of NUM_SLOTS stored bitstreams.
// The controller then runs the SelectMAP write sequence:
//   1. RDWR_B is driven low (write) while CSI_B stays high, for SETUP_CYCLES.
//   2. CSI_B goes low and one bitstream byte is presented on D every clock.
//      An address counter steps through the BlockRAM until the final address
//      of the slot has been sent.
//   3. CSI_B stays low for NULL_CYCLES more clocks carrying null operations
//      (NOOP configuration packets) so the configuration logic flushes.
//   4. CSI_B goes high; RDWR_B follows HOLD_CYCLES later and the core is idle.
// The BlockRAM read is registered, so the read address runs one byte ahead
// of the byte on D; this keeps the rate at one byte per clock, i.e. 50 MB/s
// with a 50 MHz configuration clock. BUSY of the SelectMAP port is not
// watched, which limits the clock to the rate the port accepts without it.
//
// Interface and timing (all on the rising edge of clk, which is also the
// forwarded CCLK, so the port samples D/CSI_B/RDWR_B one clock after they
// change):
//   start, slot  - request; taken only while idle (busy low).
//   busy         - high from the clock after start until the sequence ends.
//   done         - one-clock pulse as the core returns to idle.
//   mem_addr     - BlockRAM read address; mem_data must be the byte at the
//                  address of the previous clock.
//   smap_d       - SelectMAP D[0:7]; D0 carries the byte's most significant bit.
//                  The ascending range [0:7] is deliberate: it keeps the pin
//                  names of the SelectMAP port (lint tools flag it).
//   smap_cs_b, smap_rdwr_b - active-low chip select and write, both registered.
// From start to done: 1 + SETUP_CYCLES + BITSTREAM_BYTES + NULL_CYCLES +
// HOLD_CYCLES clocks.
//
// From the reference PCAP design: the order of the sequence, the one-clock gaps around
// CSI_B, the eight null-operation clocks, one byte per clock from BlockRAM,
// BUSY/PROG/INIT/DONE left unused, and the slot sizes (three 2 KB BlockRAMs
// per 5 KB bitstream). Choices of this design: the start/slot request
// interface, the NOOP value, the slot layout (slot n at n*SLOT_BYTES, all
// slots the same length) and the synchronous reset.
module pcap_ctrl
  import pcap_pkg::*;
#(
  parameter int unsigned ADDR_W          = 14,
  parameter int unsigned NUM_SLOTS       = 2,
  parameter int unsigned SLOT_BYTES      = 6144,
  parameter int unsigned BITSTREAM_BYTES = 5120,
  parameter int unsigned SETUP_CYCLES    = 1,
  parameter int unsigned NULL_CYCLES     = 8,
  parameter int unsigned HOLD_CYCLES     = 1,
  localparam int unsigned SLOT_W         = (NUM_SLOTS > 1) ? $clog2(NUM_SLOTS) : 1
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  input  logic [SLOT_W-1:0] slot,
  output logic              busy,
  output logic              done,
  output logic [ADDR_W-1:0] mem_addr,
  input  logic [7:0]        mem_data,
  output logic [0:7]        smap_d,
  output logic              smap_cs_b,
  output logic              smap_rdwr_b
);

  if (NUM_SLOTS * SLOT_BYTES > (1 << ADDR_W)) begin : gen_chk_range
    $error("pcap_ctrl: NUM_SLOTS*SLOT_BYTES exceeds the address range");
  end
  if (BITSTREAM_BYTES > SLOT_BYTES || BITSTREAM_BYTES == 0) begin : gen_chk_len
    $error("pcap_ctrl: BITSTREAM_BYTES must be 1..SLOT_BYTES");
  end
  if (SETUP_CYCLES == 0 || HOLD_CYCLES == 0 || SETUP_CYCLES > 65535 ||
      NULL_CYCLES > 65535 || HOLD_CYCLES > 65535) begin : gen_chk_phase
    $error("pcap_ctrl: phase lengths must be 1..65535 (NULL_CYCLES 0..65535)");
  end

  pcap_state_t       state, state_n;
  logic [15:0]       cnt;        // clocks spent in the current phase
  logic [ADDR_W-1:0] rd_addr;    // address counter, one ahead of the bus
  logic [ADDR_W-1:0] out_addr;   // address of the byte now on D
  logic [ADDR_W-1:0] last_addr;  // final address of the selected slot
  logic              phase_end;

  // Last clock of a timed phase.
  always_comb begin
    unique case (state)
      ST_SETUP:   phase_end = (cnt == 16'(SETUP_CYCLES - 1));
      ST_SEND:    phase_end = (out_addr == last_addr);
      ST_NULL:    phase_end = (cnt == 16'(NULL_CYCLES - 1));
      ST_RELEASE: phase_end = (cnt == 16'(HOLD_CYCLES - 1));
      default:    phase_end = 1'b0;
    endcase
  end

  always_comb begin
    state_n = state;
    unique case (state)
      ST_IDLE:    if (start) state_n = ST_SETUP;
      ST_SETUP:   if (phase_end) state_n = ST_SEND;
      ST_SEND:    if (phase_end) state_n = (NULL_CYCLES == 0) ? ST_RELEASE : ST_NULL;
      ST_NULL:    if (phase_end) state_n = ST_RELEASE;
      ST_RELEASE: if (phase_end) state_n = ST_IDLE;
      default:    state_n = ST_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= ST_IDLE;
      cnt         <= '0;
      rd_addr     <= '0;
      out_addr    <= '0;
      last_addr   <= '0;
      done        <= 1'b0;
      smap_cs_b   <= 1'b1;
      smap_rdwr_b <= 1'b1;
    end else begin
      state       <= state_n;
      cnt         <= (state_n != state) ? '0 : cnt + 16'd1;
      done        <= (state == ST_RELEASE) && (state_n == ST_IDLE);
      smap_cs_b   <= !(state_n inside {ST_SEND, ST_NULL});
      smap_rdwr_b <= (state_n == ST_IDLE);
      unique case (state)
        ST_IDLE: if (start) begin
          rd_addr   <= ADDR_W'(slot * SLOT_BYTES);
          out_addr  <= ADDR_W'(slot * SLOT_BYTES);
          last_addr <= ADDR_W'(slot * SLOT_BYTES + BITSTREAM_BYTES - 1);
        end
        ST_SETUP: if (phase_end) rd_addr <= rd_addr + 1'b1;
        ST_SEND: begin
          rd_addr  <= rd_addr + 1'b1;
          out_addr <= out_addr + 1'b1;
        end
        default: ;
      endcase
    end
  end

  assign busy     = (state != ST_IDLE);
  assign mem_addr = rd_addr;

  // Byte on the SelectMAP bus: stored bitstream, then NOOP packets.
  always_comb begin
    unique case (state)
      ST_SEND: smap_d = mem_data;
      ST_NULL: smap_d = noop_byte(cnt[1:0]);
      default: smap_d = '0;
    endcase
  end

  // SelectMAP write rules: chip select only while writing, and the write
  // signal never changes while the chip is selected.
  a_cs_needs_write: assert property (@(posedge clk) disable iff (rst)
    !smap_cs_b |-> !smap_rdwr_b);
  a_write_stable: assert property (@(posedge clk) disable iff (rst)
    (!smap_cs_b && $past(!smap_cs_b)) |-> $stable(smap_rdwr_b));

endmodule
