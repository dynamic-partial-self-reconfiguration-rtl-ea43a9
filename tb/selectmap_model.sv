// selectmap_model: behavioural model (not synthesizable) of the slave side
// of a SelectMAP x8 configuration port, as seen by whatever drives it.
//
// On every rising CCLK edge it samples D[0:7], CSI_B and RDWR_B. A clock with
// CSI_B and RDWR_B both low writes one byte, which is appended to the queue
// `rx` (D0 is taken as the byte's most significant bit). A write session
// starts when RDWR_B goes low and ends when it returns high. The model counts
// the clocks RDWR_B was low before CSI_B fell (setup) and after CSI_B rose
// (hold), and counts protocol errors: CSI_B low with RDWR_B high (reads are
// not modelled), RDWR_B changing while CSI_B is low, CSI_B falling without a
// clock of RDWR_B low before it, RDWR_B rising in the same clock as CSI_B, and
// CSI_B deasserted and asserted again within one session. The configuration
// memory itself is not modelled; the enclosing testbench interprets `rx`.
// clear() restarts the bookkeeping, e.g. once the driver is out of reset.
module selectmap_model (
  input logic       cclk,
  input logic [0:7] d,
  input logic       cs_b,
  input logic       rdwr_b
);

  logic [7:0] rx [$];        // bytes written, oldest first
  int unsigned sessions    = 0;
  int unsigned errors      = 0;
  int unsigned setup_clks  = 0;  // of the current/last session
  int unsigned hold_clks   = 0;
  int unsigned last_bytes  = 0;  // bytes written in the last finished session
  int unsigned cur_bytes   = 0;
  bit          in_session  = 0;
  bit          cs_seen     = 0;  // CSI_B has been low since RDWR_B fell
  bit          cs_released = 0;  // CSI_B has risen again since then
  bit          prev_cs_b   = 1;
  bit          prev_rdwr_b = 1;

  // Forget everything seen so far (used after the driver's reset, since the
  // pins are undefined before it).
  function automatic void clear();
    rx.delete();
    sessions   = 0;
    errors     = 0;
    in_session = 0;
    last_bytes = 0;
  endfunction

  always @(posedge cclk) begin
    if (!cs_b && rdwr_b) errors++;
    if (!cs_b && !prev_cs_b && (rdwr_b != prev_rdwr_b)) errors++;

    if (!rdwr_b && !in_session) begin
      in_session  = 1;
      cs_seen     = 0;
      cs_released = 0;
      setup_clks  = 0;
      hold_clks   = 0;
      cur_bytes   = 0;
    end

    if (in_session) begin
      if (!cs_b) begin
        if (cs_released) errors++;
        if (!cs_seen && setup_clks == 0) errors++;
        cs_seen = 1;
        if (!rdwr_b) begin
          rx.push_back(d);
          cur_bytes++;
        end
      end else if (!cs_seen) begin
        setup_clks++;
      end else begin
        cs_released = 1;
        if (!rdwr_b) hold_clks++;
      end
      if (rdwr_b) begin
        if (cs_seen && hold_clks == 0) errors++;
        in_session = 0;
        last_bytes = cur_bytes;
        sessions++;
      end
    end

    prev_cs_b   = cs_b;
    prev_rdwr_b = rdwr_b;
  end

endmodule
