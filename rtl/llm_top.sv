// llm_top - LLM low-latency memory subsystem.
//
// NUM_REQ requestors reach NUM_CH memory channels of NUM_UBANK ubanks each.
// Control and data travel apart:
//   * control plane: each requestor's command goes over the electrical
//     all-to-all network (llm_ctrl_net) to the channel's memory controller
//     (llm_mem_ctrl), which queues it in the requestor's own single-entry
//     queue, arbitrates round-robin among commands to free ubanks, notifies
//     the requestor of the data time and, after the guard time, drives the
//     channel's command/address bus;
//   * data plane: two N x N AWGRs (N = NUM_UBANK ports and wavelengths),
//     one for writes and one for reads, with channel c on AWGR port c. A
//     requestor's ring on waveguide k tuned to wavelength b reaches ubank b
//     of channel (k + b) mod N, so every requestor has a dedicated,
//     unbuffered path to every ubank and the data plane never contends.
// Ports are per-requestor arrays of the core-side request/response
// interface of llm_requestor, plus event flags for observation. AWGR ports
// above NUM_CH are left dark. Latency of an uncontended read, from the
// cycle the request is accepted to the response:
//   3 + T_NET + T_GUARD + T_RCD + T_CAS + T_BURST  (133 cycles, 66.5 ns)
// (the notification's own trip overlaps the guard time). The optical path
// and the SerDes pipeline are modelled without delay.
module llm_top
  import llm_pkg::*;
#(
  parameter int unsigned NUM_REQ      = NUM_REQ_D,
  parameter int unsigned NUM_CH       = NUM_CH_D,
  parameter int unsigned NUM_UBANK    = NUM_UBANK_D,
  parameter int unsigned NUM_SLOTS    = 8,
  parameter int unsigned LINE_BITS    = LINE_BITS_D,
  parameter int unsigned LANE_BITS    = LANE_BITS_D,
  parameter int unsigned SUBARRAYS    = SUBARRAYS_D,
  parameter int unsigned MAT_DIM      = MAT_DIM_D,
  parameter int unsigned MATS_PER_SUB = MATS_PER_SUB_D,
  parameter int unsigned TAG_W        = TAG_W_D,
  parameter int unsigned T_NET        = T_NET_D,
  parameter int unsigned T_GUARD      = T_GUARD_D,
  parameter int unsigned T_RCD        = T_RCD_D,
  parameter int unsigned T_CAS        = T_CAS_D,
  parameter int unsigned T_BURST      = T_BURST_D,
  parameter int unsigned T_RP         = T_RP_D,
  parameter int unsigned T_FAW        = T_FAW_D,
  parameter int unsigned FAW_ACTS     = FAW_ACTS_D,
  parameter int unsigned T_TUNE       = T_TUNE_D,
  localparam int unsigned N      = NUM_UBANK,
  localparam int unsigned LW     = idx_w(N),
  localparam int unsigned CHW    = idx_w(NUM_CH),
  localparam int unsigned QW     = idx_w(NUM_REQ),
  localparam int unsigned RW     = idx_w(SUBARRAYS * MAT_DIM),
  localparam int unsigned CW     = idx_w(MATS_PER_SUB * MAT_DIM / LINE_BITS),
  localparam int unsigned PKT_W  = 1 + LW + 1 + RW + CW,
  localparam int unsigned ACK_W  = 1 + DLY_W,
  localparam int unsigned ADDR_W = RW + 1 + CW + LW + CHW
) (
  input  logic                                      clk,
  input  logic                                      rst_n,
  input  logic [NUM_REQ-1:0]                        req_valid,
  output logic [NUM_REQ-1:0]                        req_ready,
  input  logic [NUM_REQ-1:0]                        req_we,
  input  logic [NUM_REQ-1:0][ADDR_W-1:0]            req_addr,
  input  logic [NUM_REQ-1:0][LINE_BITS-1:0]         req_wdata,
  input  logic [NUM_REQ-1:0][TAG_W-1:0]             req_tag,
  output logic [NUM_REQ-1:0]                        resp_valid,
  output logic [NUM_REQ-1:0]                        resp_we,
  output logic [NUM_REQ-1:0][TAG_W-1:0]             resp_tag,
  output logic [NUM_REQ-1:0][LINE_BITS-1:0]         resp_rdata,
  output logic [NUM_CH-1:0]                         stat_conflict,
  output logic [NUM_CH-1:0]                         stat_faw,
  output logic [NUM_CH-1:0]                         stat_contend,
  output logic [NUM_REQ-1:0]                        stat_ring_block,
  output logic [NUM_CH-1:0][NUM_UBANK-1:0]          stat_ubank_busy
);
  // control plane wires
  logic [NUM_REQ-1:0]                        up_valid;
  logic [NUM_REQ-1:0][CHW-1:0]               up_ch;
  logic [NUM_REQ-1:0][PKT_W-1:0]             up_pkt;
  logic [NUM_CH-1:0][NUM_REQ-1:0]            dn_valid;
  logic [NUM_CH-1:0][NUM_REQ-1:0][PKT_W-1:0] dn_pkt;
  logic [NUM_CH-1:0]                         ack_valid;
  logic [NUM_CH-1:0][QW-1:0]                 ack_req;
  logic [NUM_CH-1:0]                         ack_we;
  logic [NUM_CH-1:0][DLY_W-1:0]              ack_dly;
  logic [NUM_CH-1:0][ACK_W-1:0]              ack_pkt;
  logic [NUM_REQ-1:0][NUM_CH-1:0]            rack_valid;
  logic [NUM_REQ-1:0][NUM_CH-1:0][ACK_W-1:0] rack_pkt;

  // command buses
  logic [NUM_CH-1:0]           cmd_valid, cmd_we, cmd_sub;
  logic [NUM_CH-1:0][LW-1:0]   cmd_ubank;
  logic [NUM_CH-1:0][RW-1:0]   cmd_row;
  logic [NUM_CH-1:0][CW-1:0]   cmd_col;

  // data plane wires, [port][wavelength]
  logic [NUM_REQ-1:0][N-1:0]                 tx_on;
  logic [NUM_REQ-1:0][N-1:0][LW-1:0]         tx_lambda;
  logic [NUM_REQ-1:0][N-1:0][LANE_BITS-1:0]  tx_data;
  logic [N-1:0][N-1:0][LANE_BITS-1:0]        wr_req_side, wr_mem_side;
  logic [N-1:0][N-1:0][LANE_BITS-1:0]        rd_mem_side, rd_req_side;
  logic                                      wg_collision;

  for (genvar r = 0; r < NUM_REQ; r++) begin : g_req
    llm_requestor #(
      .NUM_CH(NUM_CH), .N(N), .NUM_SLOTS(NUM_SLOTS), .LINE_BITS(LINE_BITS),
      .LANE_BITS(LANE_BITS), .RW(RW), .CW(CW), .TAG_W(TAG_W),
      .T_TUNE(T_TUNE), .T_BURST(T_BURST)
    ) u_req (
      .clk, .rst_n,
      .req_valid(req_valid[r]), .req_ready(req_ready[r]), .req_we(req_we[r]),
      .req_addr(req_addr[r]), .req_wdata(req_wdata[r]), .req_tag(req_tag[r]),
      .resp_valid(resp_valid[r]), .resp_we(resp_we[r]), .resp_tag(resp_tag[r]),
      .resp_rdata(resp_rdata[r]),
      .up_valid(up_valid[r]), .up_ch(up_ch[r]), .up_pkt(up_pkt[r]),
      .ack_valid(rack_valid[r]), .ack_pkt(rack_pkt[r]),
      .tx_on(tx_on[r]), .tx_lambda(tx_lambda[r]), .tx_data(tx_data[r]),
      .rd_wg(rd_req_side), .stat_ring_block(stat_ring_block[r])
    );
  end

  llm_ctrl_net #(
    .NUM_REQ(NUM_REQ), .NUM_CH(NUM_CH), .PKT_W(PKT_W), .ACK_W(ACK_W), .T_NET(T_NET)
  ) u_net (
    .clk, .rst_n,
    .up_valid, .up_ch, .up_pkt, .dn_valid, .dn_pkt,
    .ack_valid, .ack_req, .ack_pkt, .rack_valid, .rack_pkt
  );

  for (genvar c = 0; c < NUM_CH; c++) begin : g_ch
    assign ack_pkt[c] = {ack_we[c], ack_dly[c]};

    llm_mem_ctrl #(
      .NUM_REQ(NUM_REQ), .NUM_UBANK(NUM_UBANK), .RW(RW), .CW(CW),
      .T_NET(T_NET), .T_GUARD(T_GUARD), .T_RCD(T_RCD), .T_CAS(T_CAS),
      .T_BURST(T_BURST), .T_RP(T_RP), .T_FAW(T_FAW), .FAW_ACTS(FAW_ACTS)
    ) u_mc (
      .clk, .rst_n,
      .req_valid(dn_valid[c]), .req_pkt(dn_pkt[c]),
      .ack_valid(ack_valid[c]), .ack_req(ack_req[c]), .ack_we(ack_we[c]), .ack_dly(ack_dly[c]),
      .cmd_valid(cmd_valid[c]), .cmd_we(cmd_we[c]), .cmd_ubank(cmd_ubank[c]),
      .cmd_sub(cmd_sub[c]), .cmd_row(cmd_row[c]), .cmd_col(cmd_col[c]),
      .stat_conflict(stat_conflict[c]), .stat_faw(stat_faw[c]), .stat_contend(stat_contend[c])
    );

    llm_channel #(
      .NUM_UBANK(NUM_UBANK), .LINE_BITS(LINE_BITS), .LANE_BITS(LANE_BITS),
      .SUBARRAYS(SUBARRAYS), .MAT_DIM(MAT_DIM), .MATS_PER_SUB(MATS_PER_SUB),
      .T_RCD(T_RCD), .T_CAS(T_CAS), .T_BURST(T_BURST), .T_RP(T_RP)
    ) u_ch (
      .clk, .rst_n,
      .cmd_valid(cmd_valid[c]), .cmd_we(cmd_we[c]), .cmd_ubank(cmd_ubank[c]),
      .cmd_sub(cmd_sub[c]), .cmd_row(cmd_row[c]), .cmd_col(cmd_col[c]),
      .wr_wg(wr_mem_side[c]), .rd_wg(rd_mem_side[c]),
      .ubank_busy(stat_ubank_busy[c])
    );
  end

  for (genvar p = NUM_CH; p < N; p++) begin : g_dark
    assign rd_mem_side[p] = '0;
  end

  // write data plane: requestor rings -> waveguides -> AWGR -> channels
  llm_wg_combiner #(.NUM_REQ(NUM_REQ), .N(N), .LANE_BITS(LANE_BITS)) u_wg (
    .clk, .tx_on, .tx_lambda, .tx_data, .wg(wr_req_side), .collision(wg_collision)
  );
  llm_awgr #(.N(N), .LANE_BITS(LANE_BITS), .REVERSE(1'b0)) u_awgr_wr (
    .in_wg(wr_req_side), .out_wg(wr_mem_side)
  );

  // read data plane: channels -> AWGR (entered from the memory side) -> rings
  llm_awgr #(.N(N), .LANE_BITS(LANE_BITS), .REVERSE(1'b1)) u_awgr_rd (
    .in_wg(rd_mem_side), .out_wg(rd_req_side)
  );

  initial assert (NUM_CH <= NUM_UBANK)
    else $error("llm_top: an N-port AWGR serves at most N channels");
endmodule
