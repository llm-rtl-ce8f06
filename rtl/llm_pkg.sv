// llm_pkg - shared constants, types and helpers of the LLM memory subsystem.
//
// Every timing below is a cycle count of the 2 GHz command-bus clock
// (0.5 ns per cycle). The network latency (20 ns), the guard time (10 ns),
// tCAS (5 ns), tBURST (16 ns) and tFAW (12 ns, 32 activations) are the
// design's published values; tRCD, tRP and the microring tuning time are
// not published and are this design's own choice (14 ns, 14 ns, 2 ns).
package llm_pkg;

  // ---- default configuration ----
  localparam int unsigned NUM_REQ_D      = 16;   // requestors (one per core)
  localparam int unsigned NUM_CH_D       = 8;    // memory channels
  localparam int unsigned NUM_UBANK_D    = 64;   // ubanks per channel = wavelengths = AWGR ports
  localparam int unsigned LINE_BITS_D    = 512;  // 64-byte access
  localparam int unsigned LANE_BITS_D    = 16;   // 32 Gb/s per wavelength at 2 GHz
  localparam int unsigned MAT_DIM_D      = 512;  // mat = 512 x 512 cells
  localparam int unsigned MATS_PER_SUB_D = 4;    // mats across one sub-ubank row
  localparam int unsigned SUBARRAYS_D    = 2;    // subarrays per ubank (own choice)
  localparam int unsigned TAG_W_D        = 8;    // request tag width (own choice)
  localparam int unsigned DLY_W          = 8;    // width of the notification delay field

  // ---- default timing, in 0.5 ns cycles ----
  localparam int unsigned T_NET_D    = 40;  // electrical control plane, 20 ns
  localparam int unsigned T_GUARD_D  = 20;  // guard time before activation, 10 ns
  localparam int unsigned T_RCD_D    = 28;  // activate to column (own choice, 14 ns)
  localparam int unsigned T_CAS_D    = 10;  // column to data, 5 ns
  localparam int unsigned T_BURST_D  = 32;  // 64 B at 32 Gb/s, 16 ns
  localparam int unsigned T_RP_D     = 28;  // precharge (own choice, 14 ns)
  localparam int unsigned T_FAW_D    = 24;  // activation window, 12 ns
  localparam int unsigned FAW_ACTS_D = 32;  // activations allowed per window
  localparam int unsigned T_TUNE_D   = 4;   // microring tuning (own choice, 2 ns)

  typedef enum logic {
    CMD_RD = 1'b0,
    CMD_WR = 1'b1
  } cmd_e;

  // Width of an index into v items, at least 1.
  function automatic int unsigned idx_w(int unsigned v);
    return (v > 1) ? $clog2(v) : 1;
  endfunction

  // Requestor-side AWGR port (= microring index) that reaches ubank ub of
  // channel ch on wavelength ub, for an n-port cyclic AWGR that sends
  // wavelength w from input port i to output port (i + w) mod n.
  function automatic int unsigned ring_of(int unsigned ch, int unsigned ub, int unsigned n);
    return (ch + n - (ub % n)) % n;
  endfunction

endpackage
