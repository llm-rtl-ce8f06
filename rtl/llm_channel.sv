// llm_channel - one LLM memory channel.
//
// NUM_UBANK ubanks share the channel's electrical command/address bus; the
// command's ubank field selects the one that acts on it. Data does not use
// a shared bus: ubank b reads lane b of the write waveguide (its filter
// ring is fixed on wavelength b) and drives lane b of the read waveguide,
// so transfers to different ubanks overlap freely. ubank_busy reports each
// ubank's occupancy for observation; the memory controller keeps its own
// copy of it and never addresses a busy ubank.
module llm_channel
  import llm_pkg::*;
#(
  parameter int unsigned NUM_UBANK    = NUM_UBANK_D,
  parameter int unsigned LINE_BITS    = LINE_BITS_D,
  parameter int unsigned LANE_BITS    = LANE_BITS_D,
  parameter int unsigned SUBARRAYS    = SUBARRAYS_D,
  parameter int unsigned MAT_DIM      = MAT_DIM_D,
  parameter int unsigned MATS_PER_SUB = MATS_PER_SUB_D,
  parameter int unsigned T_RCD        = T_RCD_D,
  parameter int unsigned T_CAS        = T_CAS_D,
  parameter int unsigned T_BURST      = T_BURST_D,
  parameter int unsigned T_RP         = T_RP_D,
  localparam int unsigned UW = idx_w(NUM_UBANK),
  localparam int unsigned RW = idx_w(SUBARRAYS * MAT_DIM),
  localparam int unsigned CW = idx_w(MATS_PER_SUB * MAT_DIM / LINE_BITS)
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic                                 cmd_valid,
  input  logic                                 cmd_we,
  input  logic [UW-1:0]                        cmd_ubank,
  input  logic                                 cmd_sub,
  input  logic [RW-1:0]                        cmd_row,
  input  logic [CW-1:0]                        cmd_col,
  input  logic [NUM_UBANK-1:0][LANE_BITS-1:0]  wr_wg,
  output logic [NUM_UBANK-1:0][LANE_BITS-1:0]  rd_wg,
  output logic [NUM_UBANK-1:0]                 ubank_busy
);
  for (genvar b = 0; b < NUM_UBANK; b++) begin : g_ub
    llm_ubank #(
      .LINE_BITS(LINE_BITS), .LANE_BITS(LANE_BITS), .SUBARRAYS(SUBARRAYS),
      .MAT_DIM(MAT_DIM), .MATS_PER_SUB(MATS_PER_SUB),
      .T_RCD(T_RCD), .T_CAS(T_CAS), .T_BURST(T_BURST), .T_RP(T_RP)
    ) u_ubank (
      .clk, .rst_n,
      .cmd_valid(cmd_valid && (cmd_ubank == UW'(b))),
      .cmd_we, .cmd_sub, .cmd_row, .cmd_col,
      .wr_lane(wr_wg[b]), .rd_lane(rd_wg[b]), .busy(ubank_busy[b])
    );
  end
endmodule
