// llm_requestor - requestor (chiplet) side of LLM.
//
// A requestor is a core, or a group of cores, behind its last-level cache.
// On a miss or write-back it takes a request (req_*), keeps the data in its
// own buffer and sends only the command over the electrical control plane
// to the channel's memory controller. When that controller grants the
// command it returns a notification saying how many cycles later the data
// will flow. The requestor then tunes one microring and moves the data over
// the optical data plane:
//   * waveguide k = (channel - ubank) mod N is the AWGR input port from
//     which wavelength lambda = ubank reaches that ubank of that channel,
//     so the ubank address picks the wavelength and the channel address
//     picks the ring (one ring per waveguide, N rings per direction);
//   * the ring is retuned when the notification arrives, which takes
//     T_TUNE cycles and must end before the data window opens;
//   * for T_BURST cycles it modulates 16 bits per cycle of write data on
//     tx ring k, or filters 16 bits per cycle of read data from read
//     waveguide k, wavelength lambda.
// Up to NUM_SLOTS requests are in flight, to any mix of channels and
// ubanks, with two limits: one command per channel waiting in the
// controller (its queue has a single entry per requestor), and one
// transfer per ring and direction at a time (a ring holds one wavelength).
// A request that breaks either limit is held with req_ready = 0;
// stat_ring_block marks a request held only by the ring limit.
// Completed requests answer on resp_* (reads with data, writes as an
// acknowledgement), chosen round-robin, one per cycle.
// Address layout (line address): {row, sub, col, ubank, channel}, channel
// in the low bits.
// Timing: a request accepted in cycle q leaves on the control plane in
// cycle q+1; a read granted at cycle g answers in cycle
// g + T_GUARD + T_RCD + T_CAS + T_BURST + 1.
// The ring/wavelength rule, buffering at the requestor and the tuning on
// notification follow the published design; the slot pool, the
// notification format, the address layout and the tuning time are this
// design's choices.
module llm_requestor
  import llm_pkg::*;
#(
  parameter int unsigned NUM_CH    = NUM_CH_D,
  parameter int unsigned N         = NUM_UBANK_D,   // AWGR ports = wavelengths = ubanks/channel
  parameter int unsigned NUM_SLOTS = 8,
  parameter int unsigned LINE_BITS = LINE_BITS_D,
  parameter int unsigned LANE_BITS = LANE_BITS_D,
  parameter int unsigned RW        = 10,
  parameter int unsigned CW        = 2,
  parameter int unsigned TAG_W     = TAG_W_D,
  parameter int unsigned T_TUNE    = T_TUNE_D,
  parameter int unsigned T_BURST   = T_BURST_D,
  localparam int unsigned CHW    = idx_w(NUM_CH),
  localparam int unsigned LW     = idx_w(N),
  localparam int unsigned SW     = idx_w(NUM_SLOTS),
  localparam int unsigned PKT_W  = 1 + LW + 1 + RW + CW,
  localparam int unsigned ACK_W  = 1 + DLY_W,
  localparam int unsigned ADDR_W = RW + 1 + CW + LW + CHW
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  // core / last-level cache side
  input  logic                                 req_valid,
  output logic                                 req_ready,
  input  logic                                 req_we,
  input  logic [ADDR_W-1:0]                    req_addr,
  input  logic [LINE_BITS-1:0]                 req_wdata,
  input  logic [TAG_W-1:0]                     req_tag,
  output logic                                 resp_valid,
  output logic                                 resp_we,
  output logic [TAG_W-1:0]                     resp_tag,
  output logic [LINE_BITS-1:0]                 resp_rdata,
  // control plane
  output logic                                 up_valid,
  output logic [CHW-1:0]                       up_ch,
  output logic [PKT_W-1:0]                     up_pkt,
  input  logic [NUM_CH-1:0]                    ack_valid,
  input  logic [NUM_CH-1:0][ACK_W-1:0]         ack_pkt,   // {we, delay}
  // optical data plane
  output logic [N-1:0]                         tx_on,
  output logic [N-1:0][LW-1:0]                 tx_lambda,
  output logic [N-1:0][LANE_BITS-1:0]          tx_data,
  input  logic [N-1:0][N-1:0][LANE_BITS-1:0]   rd_wg,
  output logic                                 stat_ring_block
);
  typedef enum logic [2:0] {T_IDLE, T_SENT, T_WAIT, T_XFER, T_DONE} tstate_e;
  localparam int unsigned TW = (DLY_W > $clog2(T_BURST + 1)) ? DLY_W : $clog2(T_BURST + 1);
  localparam int unsigned KW = $clog2(T_TUNE + 1);

  // request fields
  logic [CHW-1:0] f_ch;
  logic [LW-1:0]  f_ub;
  logic [CW-1:0]  f_col;
  logic           f_sub;
  logic [RW-1:0]  f_row;
  logic [LW-1:0]  f_ring;
  assign {f_row, f_sub, f_col, f_ub, f_ch} = req_addr;

  always_comb begin
    int unsigned t;
    t = int'(f_ch) + N - int'(f_ub);
    if (t >= N) t = t - N;
    f_ring = LW'(t);
  end

  tstate_e         st    [NUM_SLOTS];
  logic            s_we  [NUM_SLOTS];
  logic [CHW-1:0]  s_ch  [NUM_SLOTS];
  logic [LW-1:0]   s_ub  [NUM_SLOTS];
  logic [LW-1:0]   s_ring[NUM_SLOTS];
  logic [TAG_W-1:0] s_tag[NUM_SLOTS];
  logic [TW-1:0]   s_cnt [NUM_SLOTS];
  logic [KW-1:0]   s_tune[NUM_SLOTS];

  logic [NUM_SLOTS-1:0] s_load, s_shift, s_done;
  logic [LANE_BITS-1:0] s_lane_in  [NUM_SLOTS];
  logic [LANE_BITS-1:0] s_lane_out [NUM_SLOTS];
  logic [LINE_BITS-1:0] s_line     [NUM_SLOTS];

  // admission
  logic          have_free, ch_pending, ring_busy, accept;
  logic [SW-1:0] free_idx;

  always_comb begin
    have_free  = 1'b0;
    free_idx   = '0;
    ch_pending = 1'b0;
    ring_busy  = 1'b0;
    for (int s = 0; s < int'(NUM_SLOTS); s++) begin
      if (!have_free && st[s] == T_IDLE) begin
        have_free = 1'b1;
        free_idx  = SW'(s);
      end
      if (st[s] == T_SENT && s_ch[s] == f_ch) ch_pending = 1'b1;
      if (st[s] != T_IDLE && st[s] != T_DONE && s_we[s] == req_we && s_ring[s] == f_ring)
        ring_busy = 1'b1;
    end
  end

  assign req_ready       = have_free && !ch_pending && !ring_busy;
  assign accept          = req_valid && req_ready;
  assign stat_ring_block = req_valid && have_free && !ch_pending && ring_busy;

  // response selection
  logic [NUM_SLOTS-1:0] r_gnt;
  logic [SW-1:0]        r_idx;
  logic                 r_valid;
  llm_rr_arbiter #(.N(NUM_SLOTS)) u_resp_arb (
    .clk, .rst_n, .req(s_done), .advance(1'b1),
    .gnt(r_gnt), .gnt_idx(r_idx), .gnt_valid(r_valid)
  );
  assign resp_valid = r_valid;
  assign resp_we    = s_we[r_idx];
  assign resp_tag   = s_tag[r_idx];
  assign resp_rdata = s_line[r_idx];

  for (genvar s = 0; s < NUM_SLOTS; s++) begin : g_slot
    logic my_ack;
    logic [DLY_W-1:0] my_dly;
    assign my_ack = (st[s] == T_SENT) && ack_valid[s_ch[s]];
    assign my_dly = ack_pkt[s_ch[s]][DLY_W-1:0];
    assign s_done[s]  = (st[s] == T_DONE);
    assign s_load[s]  = accept && (free_idx == SW'(s));
    assign s_shift[s] = (st[s] == T_XFER);
    assign s_lane_in[s] = s_we[s] ? '0 : rd_wg[s_ring[s]][s_ub[s]];

    llm_serdes #(.LINE_BITS(LINE_BITS), .LANE_BITS(LANE_BITS)) u_buf (
      .clk, .rst_n,
      .load(s_load[s]), .load_data(req_wdata),
      .shift(s_shift[s]), .lane_in(s_lane_in[s]),
      .lane_out(s_lane_out[s]), .data(s_line[s])
    );

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        st[s]     <= T_IDLE;
        s_we[s]   <= 1'b0;
        s_ch[s]   <= '0;
        s_ub[s]   <= '0;
        s_ring[s] <= '0;
        s_tag[s]  <= '0;
        s_cnt[s]  <= '0;
        s_tune[s] <= '0;
      end else begin
        if (s_tune[s] != '0) s_tune[s] <= s_tune[s] - 1'b1;
        unique case (st[s])
          T_IDLE: if (s_load[s]) begin
                    st[s]   <= T_SENT;
                    s_we[s] <= req_we;   s_ch[s]   <= f_ch;   s_ub[s] <= f_ub;
                    s_ring[s] <= f_ring; s_tag[s]  <= req_tag;
                  end
          T_SENT: if (my_ack) begin
                    st[s]     <= T_WAIT;
                    s_cnt[s]  <= TW'(my_dly) - 1'b1;
                    s_tune[s] <= KW'(T_TUNE);     // ring k retuned to lambda = ubank
                  end
          T_WAIT: if (s_cnt[s] == TW'(1)) begin
                    st[s] <= T_XFER;  s_cnt[s] <= TW'(T_BURST);
                  end else s_cnt[s] <= s_cnt[s] - 1'b1;
          T_XFER: if (s_cnt[s] == TW'(1)) st[s] <= T_DONE;
                  else s_cnt[s] <= s_cnt[s] - 1'b1;
          T_DONE: if (r_gnt[s]) st[s] <= T_IDLE;
          default: st[s] <= T_IDLE;
        endcase
      end
    end

    assert property (@(posedge clk) disable iff (!rst_n)
      (st[s] == T_WAIT && s_cnt[s] == TW'(1)) |-> (s_tune[s] <= KW'(1)))
      else $error("llm_requestor: microring not tuned when the data window opens");
    assert property (@(posedge clk) disable iff (!rst_n)
      my_ack |-> (ack_pkt[s_ch[s]][DLY_W] == s_we[s] && my_dly >= DLY_W'(2)))
      else $error("llm_requestor: notification does not match the pending command");
  end

  // modulator ring array (write waveguides)
  always_comb begin
    tx_on     = '0;
    tx_lambda = '0;
    tx_data   = '0;
    for (int s = 0; s < int'(NUM_SLOTS); s++) begin
      if (st[s] == T_XFER && s_we[s]) begin
        tx_on[s_ring[s]]     = 1'b1;
        tx_lambda[s_ring[s]] = s_ub[s];
        tx_data[s_ring[s]]   = s_lane_out[s];
      end
    end
  end

  // command to the control plane, one cycle after acceptance
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      up_valid <= 1'b0;
      up_ch    <= '0;
      up_pkt   <= '0;
    end else begin
      up_valid <= accept;
      up_ch    <= f_ch;
      up_pkt   <= {req_we, f_ub, f_sub, f_row, f_col};
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) req_valid |-> (int'(f_ch) < int'(NUM_CH)))
    else $error("llm_requestor: channel field out of range");
endmodule
