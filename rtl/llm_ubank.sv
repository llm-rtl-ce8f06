// llm_ubank - one ubank: closed-page access sequencer, two sub-ubanks, the
// sub-ubank multiplexer and the SerDes on the ubank's own wavelength.
//
// A command (cmd_valid) opens one row of one sub-ubank and runs the whole
// closed-page sequence with fixed timing, so that the requestor, told the
// timing in advance, can have its microring tuned when the data flows:
//   cycle i             command on the bus, row activated into the row buffer
//   i+1 .. i+T_RCD      RCD  (column access at the end: read column loaded
//                            into the SerDes through the sub-ubank mux)
//   next T_CAS cycles   CAS
//   next T_BURST cycles BURST: 16 bits per cycle out on rd_lane (read) or
//                            in from wr_lane (write); a write merges the
//                            line into the row buffer in the last cycle
//   next T_RP cycles    PRE:  row restored, bank precharged
// A new command is accepted from cycle i + 1 + T_RCD + T_CAS + T_BURST + T_RP.
// busy is high from cycle i+1 until then. The published parts are the
// closed-page policy, tCAS, tBURST, the dedicated wavelength and the two
// sub-ubanks sharing one data path through a multiplexer; folding the
// activate and column commands into one command and the tRCD/tRP values
// are this design's choices. rd_lane is zero outside a read burst, as an
// idle modulator puts no light on the wavelength.
module llm_ubank
  import llm_pkg::*;
#(
  parameter int unsigned LINE_BITS    = LINE_BITS_D,
  parameter int unsigned LANE_BITS    = LANE_BITS_D,
  parameter int unsigned SUBARRAYS    = SUBARRAYS_D,
  parameter int unsigned MAT_DIM      = MAT_DIM_D,
  parameter int unsigned MATS_PER_SUB = MATS_PER_SUB_D,
  parameter int unsigned T_RCD        = T_RCD_D,
  parameter int unsigned T_CAS        = T_CAS_D,
  parameter int unsigned T_BURST      = T_BURST_D,
  parameter int unsigned T_RP         = T_RP_D,
  localparam int unsigned ROWS     = SUBARRAYS * MAT_DIM,
  localparam int unsigned ROW_BITS = MATS_PER_SUB * MAT_DIM,
  localparam int unsigned RW       = idx_w(ROWS),
  localparam int unsigned CW       = idx_w(ROW_BITS / LINE_BITS)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 cmd_valid,
  input  logic                 cmd_we,
  input  logic                 cmd_sub,
  input  logic [RW-1:0]        cmd_row,
  input  logic [CW-1:0]        cmd_col,
  input  logic [LANE_BITS-1:0] wr_lane,
  output logic [LANE_BITS-1:0] rd_lane,
  output logic                 busy
);
  typedef enum logic [2:0] {S_IDLE, S_RCD, S_CAS, S_BURST, S_PRE} state_e;
  localparam int unsigned TW = $clog2(T_RCD + T_CAS + T_BURST + T_RP + 2);

  state_e         state;
  logic [TW-1:0]  cnt;
  logic           we_q, sub_q;
  logic [CW-1:0]  col_q;
  logic           last;

  logic [1:0]                 s_act, s_wr, s_pre;
  logic [LINE_BITS-1:0]       s_rd [2];
  logic [LINE_BITS-1:0]       mux_rd;
  logic [LINE_BITS-1:0]       line;
  logic                       ser_load, ser_shift;
  logic [LANE_BITS-1:0]       ser_out;
  logic [CW-1:0]              s_col;

  assign last = (cnt == TW'(1));
  assign busy = (state != S_IDLE);
  assign s_col = cmd_valid && !busy ? cmd_col : col_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cnt   <= '0;
      we_q  <= 1'b0;
      sub_q <= 1'b0;
      col_q <= '0;
    end else begin
      unique case (state)
        S_IDLE:  if (cmd_valid) begin
                   state <= S_RCD;  cnt <= TW'(T_RCD);
                   we_q <= cmd_we;  sub_q <= cmd_sub;  col_q <= cmd_col;
                 end
        S_RCD:   if (last) begin state <= S_CAS;   cnt <= TW'(T_CAS);   end else cnt <= cnt - 1'b1;
        S_CAS:   if (last) begin state <= S_BURST; cnt <= TW'(T_BURST); end else cnt <= cnt - 1'b1;
        S_BURST: if (last) begin state <= S_PRE;   cnt <= TW'(T_RP);    end else cnt <= cnt - 1'b1;
        S_PRE:   if (last) begin state <= S_IDLE;  cnt <= '0;           end else cnt <= cnt - 1'b1;
        default: state <= S_IDLE;
      endcase
    end
  end

  // Sub-ubank control: only the selected half is activated.
  always_comb begin
    s_act = '0;
    s_wr  = '0;
    s_pre = '0;
    if (state == S_IDLE && cmd_valid)               s_act[cmd_sub] = 1'b1;
    if (state == S_BURST && last && we_q)           s_wr[sub_q]    = 1'b1;
    if (state == S_PRE && cnt == TW'(T_RP))         s_pre[sub_q]   = 1'b1;
  end

  for (genvar s = 0; s < 2; s++) begin : g_sub
    llm_sub_ubank #(
      .ROWS(ROWS), .ROW_BITS(ROW_BITS), .LINE_BITS(LINE_BITS)
    ) u_sub (
      .clk, .rst_n,
      .act(s_act[s]), .act_row(cmd_row),
      .col(s_col), .col_wr(s_wr[s]), .wr_data({wr_lane, line[LINE_BITS-1:LANE_BITS]}),
      .pre(s_pre[s]), .rd_data(s_rd[s])
    );
  end

  // Sub-ubank multiplexer in front of the shared SerDes.
  assign mux_rd    = s_rd[sub_q];
  assign ser_load  = (state == S_RCD) && last && !we_q;
  assign ser_shift = (state == S_BURST);

  llm_serdes #(.LINE_BITS(LINE_BITS), .LANE_BITS(LANE_BITS)) u_serdes (
    .clk, .rst_n,
    .load(ser_load), .load_data(mux_rd),
    .shift(ser_shift), .lane_in(wr_lane),
    .lane_out(ser_out), .data(line)
  );

  assign rd_lane = (state == S_BURST && !we_q) ? ser_out : '0;

  assert property (@(posedge clk) disable iff (!rst_n) cmd_valid |-> !busy)
    else $error("llm_ubank: command to a busy ubank (bank conflict not stalled)");
endmodule
