// llm_ctrl_net - low-bandwidth electrical control plane.
//
// An all-to-all network between the requestors and the per-channel memory
// controllers that carries only commands (requestor to controller) and
// notifications (controller to requestor); data never uses it. Each
// requestor may inject one command per cycle, tagged with its destination
// channel, and each controller one notification per cycle, tagged with its
// destination requestor. Both directions have the same fixed latency of
// T_NET cycles (20 ns published), modelled by one pipeline per source and
// a demultiplexer at the far end, so the network itself never contends.
// The packet formats are opaque here.
module llm_ctrl_net
  import llm_pkg::*;
#(
  parameter int unsigned NUM_REQ = NUM_REQ_D,
  parameter int unsigned NUM_CH  = NUM_CH_D,
  parameter int unsigned PKT_W   = 20,
  parameter int unsigned ACK_W   = 9,
  parameter int unsigned T_NET   = T_NET_D,
  localparam int unsigned CHW = idx_w(NUM_CH),
  localparam int unsigned QW  = idx_w(NUM_REQ)
) (
  input  logic                                       clk,
  input  logic                                       rst_n,
  // requestor -> controller
  input  logic [NUM_REQ-1:0]                         up_valid,
  input  logic [NUM_REQ-1:0][CHW-1:0]                up_ch,
  input  logic [NUM_REQ-1:0][PKT_W-1:0]              up_pkt,
  output logic [NUM_CH-1:0][NUM_REQ-1:0]             dn_valid,
  output logic [NUM_CH-1:0][NUM_REQ-1:0][PKT_W-1:0]  dn_pkt,
  // controller -> requestor
  input  logic [NUM_CH-1:0]                          ack_valid,
  input  logic [NUM_CH-1:0][QW-1:0]                  ack_req,
  input  logic [NUM_CH-1:0][ACK_W-1:0]               ack_pkt,
  output logic [NUM_REQ-1:0][NUM_CH-1:0]             rack_valid,
  output logic [NUM_REQ-1:0][NUM_CH-1:0][ACK_W-1:0]  rack_pkt
);
  logic [NUM_REQ-1:0]            u_v;
  logic [NUM_REQ-1:0][CHW-1:0]   u_ch;
  logic [NUM_REQ-1:0][PKT_W-1:0] u_p;
  logic [NUM_CH-1:0]             a_v;
  logic [NUM_CH-1:0][QW-1:0]     a_r;
  logic [NUM_CH-1:0][ACK_W-1:0]  a_p;

  for (genvar r = 0; r < NUM_REQ; r++) begin : g_up
    llm_delay_line #(.W(1 + CHW + PKT_W), .LAT(T_NET)) u_dl (
      .clk, .rst_n,
      .din({up_valid[r], up_ch[r], up_pkt[r]}),
      .dout({u_v[r], u_ch[r], u_p[r]})
    );
    for (genvar c = 0; c < NUM_CH; c++) begin : g_dn
      assign dn_valid[c][r] = u_v[r] && (u_ch[r] == CHW'(c));
      assign dn_pkt[c][r]   = u_p[r];
    end
  end

  for (genvar c = 0; c < NUM_CH; c++) begin : g_ack
    llm_delay_line #(.W(1 + QW + ACK_W), .LAT(T_NET)) u_dl (
      .clk, .rst_n,
      .din({ack_valid[c], ack_req[c], ack_pkt[c]}),
      .dout({a_v[c], a_r[c], a_p[c]})
    );
    for (genvar r = 0; r < NUM_REQ; r++) begin : g_rk
      assign rack_valid[r][c] = a_v[c] && (a_r[c] == QW'(r));
      assign rack_pkt[r][c]   = a_p[c];
    end
  end
endmodule
