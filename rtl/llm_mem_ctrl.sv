// llm_mem_ctrl - LLM memory controller for one channel.
//
// Each requestor owns one single-entry command queue here, so no requestor
// can block another (no head-of-line blocking). Every cycle a round-robin
// arbiter picks one queued command whose ubank is free and for which the
// tFAW window still allows an activation; a queued command whose ubank is
// busy simply waits (a bank conflict is the only contention left, and it
// is stalled here). On a grant in cycle g the controller
//   * sends the requestor a notification (ack_*) saying in how many cycles
//     after its arrival, T_NET cycles later, the data will be on the
//     ubank's wavelength: ack_dly = T_GUARD + T_RCD + T_CAS + 1 - T_NET;
//   * holds the command for the guard time and puts it on the channel's
//     command/address bus in cycle g + T_GUARD, so the requestor's
//     microring is tuned by the time the row is activated;
//   * marks the ubank busy until cycle g + 1 + T_RCD + T_CAS + T_BURST + T_RP.
// Only the electrical command is queued; data never passes through the
// controller. A command packet is {we, ubank, sub, row, col}.
// stat_conflict is high in a cycle where a queued command waits for a busy
// ubank, stat_faw where one waits only for the tFAW window, stat_contend
// where two or more commands were ready and the arbiter chose.
// The queue-per-requestor, the round-robin arbiter, the notification and
// the 10 ns guard time follow the published design; the notification
// format and the packet layout are this design's choices.
module llm_mem_ctrl
  import llm_pkg::*;
#(
  parameter int unsigned NUM_REQ   = NUM_REQ_D,
  parameter int unsigned NUM_UBANK = NUM_UBANK_D,
  parameter int unsigned RW        = 10,
  parameter int unsigned CW        = 2,
  parameter int unsigned T_NET     = T_NET_D,
  parameter int unsigned T_GUARD   = T_GUARD_D,
  parameter int unsigned T_RCD     = T_RCD_D,
  parameter int unsigned T_CAS     = T_CAS_D,
  parameter int unsigned T_BURST   = T_BURST_D,
  parameter int unsigned T_RP      = T_RP_D,
  parameter int unsigned T_FAW     = T_FAW_D,
  parameter int unsigned FAW_ACTS  = FAW_ACTS_D,
  localparam int unsigned UW    = idx_w(NUM_UBANK),
  localparam int unsigned QW    = idx_w(NUM_REQ),
  localparam int unsigned PKT_W = 1 + UW + 1 + RW + CW
) (
  input  logic                            clk,
  input  logic                            rst_n,
  // commands from the control plane, one slot per requestor
  input  logic [NUM_REQ-1:0]              req_valid,
  input  logic [NUM_REQ-1:0][PKT_W-1:0]   req_pkt,
  // notification to the granted requestor
  output logic                            ack_valid,
  output logic [QW-1:0]                   ack_req,
  output logic                            ack_we,
  output logic [DLY_W-1:0]                ack_dly,
  // channel command/address bus
  output logic                            cmd_valid,
  output logic                            cmd_we,
  output logic [UW-1:0]                   cmd_ubank,
  output logic                            cmd_sub,
  output logic [RW-1:0]                   cmd_row,
  output logic [CW-1:0]                   cmd_col,
  // event flags
  output logic                            stat_conflict,
  output logic                            stat_faw,
  output logic                            stat_contend
);
  typedef struct packed {
    logic          we;
    logic [UW-1:0] ubank;
    logic          sub;
    logic [RW-1:0] row;
    logic [CW-1:0] col;
  } cmd_t;

  localparam int unsigned OCC     = 1 + T_RCD + T_CAS + T_BURST + T_RP;
  localparam int unsigned BW      = $clog2(OCC + 1);
  localparam int unsigned ACK_DLY = T_GUARD + T_RCD + T_CAS + 1 - T_NET;

  logic [NUM_REQ-1:0] q_valid;
  cmd_t               q_cmd [NUM_REQ];
  logic [NUM_REQ-1:0] ready, waiting_bank, deq;
  logic [BW-1:0]      busy_cnt [NUM_UBANK];
  logic [NUM_UBANK-1:0] ub_busy;
  logic               faw_allow;
  logic [NUM_REQ-1:0] gnt;
  logic [QW-1:0]      gnt_idx;
  logic               gnt_valid;
  cmd_t               gcmd;

  for (genvar r = 0; r < NUM_REQ; r++) begin : g_q
    llm_cmd_queue #(.W(PKT_W)) u_q (
      .clk, .rst_n,
      .enq(req_valid[r]), .enq_data(req_pkt[r]),
      .deq(deq[r]), .valid(q_valid[r]), .data(q_cmd[r])
    );
  end

  for (genvar b = 0; b < NUM_UBANK; b++) begin : g_busy
    assign ub_busy[b] = (busy_cnt[b] != '0);
  end

  always_comb begin
    for (int r = 0; r < int'(NUM_REQ); r++) begin
      waiting_bank[r] = q_valid[r] && ub_busy[q_cmd[r].ubank];
      ready[r]        = q_valid[r] && !ub_busy[q_cmd[r].ubank] && faw_allow;
    end
  end

  llm_rr_arbiter #(.N(NUM_REQ)) u_arb (
    .clk, .rst_n, .req(ready), .advance(1'b1),
    .gnt, .gnt_idx, .gnt_valid
  );

  assign deq  = gnt;
  assign gcmd = q_cmd[gnt_idx];

  llm_faw_limiter #(.T_FAW(T_FAW), .FAW_ACTS(FAW_ACTS)) u_faw (
    .clk, .rst_n, .act(gnt_valid), .allow(faw_allow)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < int'(NUM_UBANK); b++) busy_cnt[b] <= '0;
    end else begin
      for (int b = 0; b < int'(NUM_UBANK); b++) begin
        if (gnt_valid && gcmd.ubank == UW'(b)) busy_cnt[b] <= BW'(OCC - 1);
        else if (busy_cnt[b] != '0)            busy_cnt[b] <= busy_cnt[b] - 1'b1;
      end
    end
  end

  // Notification, sent in the grant cycle.
  assign ack_valid = gnt_valid;
  assign ack_req   = gnt_idx;
  assign ack_we    = gcmd.we;
  assign ack_dly   = DLY_W'(ACK_DLY);

  // Guard time: the granted command reaches the bus T_GUARD cycles later.
  cmd_t bus_cmd;
  logic bus_valid;
  llm_delay_line #(.W(1 + PKT_W), .LAT(T_GUARD)) u_guard (
    .clk, .rst_n,
    .din({gnt_valid, gnt_valid ? gcmd : cmd_t'('0)}),
    .dout({bus_valid, bus_cmd})
  );

  assign cmd_valid = bus_valid;
  assign cmd_we    = bus_cmd.we;
  assign cmd_ubank = bus_cmd.ubank;
  assign cmd_sub   = bus_cmd.sub;
  assign cmd_row   = bus_cmd.row;
  assign cmd_col   = bus_cmd.col;

  assign stat_conflict = |waiting_bank;
  assign stat_faw      = !faw_allow && |(q_valid & ~waiting_bank);
  assign stat_contend  = ($countones(ready) > 1);

  initial assert (T_GUARD + T_RCD + T_CAS + 1 >= T_NET + 2)
    else $error("llm_mem_ctrl: the notification would arrive after the data");
endmodule
