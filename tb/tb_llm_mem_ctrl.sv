// tb_llm_mem_ctrl - self-checking test of the per-channel memory controller.
// Four requestors send random commands, biased to few ubanks so that bank
// conflicts happen, with a tight activation window (6 cycles, 2 activations)
// so that the tFAW limit is reached. A cycle-level reference model (queues,
// ubank occupancy, round-robin pointer, activation window) predicts every
// notification and every command-bus cycle, which must come exactly
// T_GUARD cycles after its grant. Counts bank-conflict stalls, tFAW stalls
// and arbitration contention; each must happen.
module tb_llm_mem_ctrl;
  localparam int R = 4, NU = 4, RW = 4, CW = 1;
  localparam int NET = 6, GUARD = 4, RCD = 5, CAS = 3, BURST = 8, RP = 4, FAW = 6, ACTS = 2;
  localparam int OCC = 1 + RCD + CAS + BURST + RP;
  localparam int PW = 1 + 2 + 1 + RW + CW;
  logic clk = 0, rst_n = 0;
  logic [R-1:0] req_valid = '0;
  logic [R-1:0][PW-1:0] req_pkt = '0;
  logic ack_valid, ack_we;
  logic [1:0] ack_req;
  logic [7:0] ack_dly;
  logic cmd_valid, cmd_we, cmd_sub;
  logic [1:0] cmd_ubank;
  logic [RW-1:0] cmd_row;
  logic [CW-1:0] cmd_col;
  logic stat_conflict, stat_faw, stat_contend;
  int checks = 0, failures = 0, cyc = 0;
  int n_conf = 0, n_faw = 0, n_cont = 0, n_grant = 0;

  llm_mem_ctrl #(.NUM_REQ(R), .NUM_UBANK(NU), .RW(RW), .CW(CW), .T_NET(NET), .T_GUARD(GUARD),
                 .T_RCD(RCD), .T_CAS(CAS), .T_BURST(BURST), .T_RP(RP), .T_FAW(FAW), .FAW_ACTS(ACTS)) dut (
    .clk, .rst_n, .req_valid, .req_pkt, .ack_valid, .ack_req, .ack_we, .ack_dly,
    .cmd_valid, .cmd_we, .cmd_ubank, .cmd_sub, .cmd_row, .cmd_col,
    .stat_conflict, .stat_faw, .stat_contend);
  always #5 clk = ~clk;

  // reference model
  bit            qv [R];
  logic [PW-1:0] qc [R];
  int            busy [NU];
  int            ptr = 0;
  bit            hist [$];
  bit            inflight [R];
  bit            outstanding [R];   // sent and not yet acknowledged by the controller
  logic [PW-1:0] bus_exp [int];

  function automatic int ub_of(logic [PW-1:0] p); return int'(p[PW-2 -: 2]); endfunction

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int g, acts, nelig;
    bit any_wait_bank, any_faw;
    for (int r = 0; r < R; r++) begin qv[r] = 0; inflight[r] = 0; outstanding[r] = 0; end
    for (int b = 0; b < NU; b++) busy[b] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 1500; t++) begin
      @(negedge clk);
      // drive new commands (one outstanding per requestor)
      for (int r = 0; r < R; r++) begin
        req_valid[r] = 0;
        if (!qv[r] && !inflight[r] && !outstanding[r] && t < 1400 && $urandom_range(0, 2) == 0) begin
          req_valid[r] = 1;
          req_pkt[r] = PW'($urandom);
          req_pkt[r][PW-2 -: 2] = ($urandom_range(0, 2) == 0) ? 2'($urandom) : 2'(0);
        end
      end
      #1;
      // predicted grant
      acts = 0;
      for (int i = 0; i < hist.size(); i++) acts += int'(hist[i]);
      g = -1; nelig = 0; any_wait_bank = 0; any_faw = 0;
      for (int i = 0; i < R; i++) begin
        int r;
        r = (ptr + i) % R;
        if (qv[r] && busy[ub_of(qc[r])] != 0) any_wait_bank = 1;
        if (qv[r] && busy[ub_of(qc[r])] == 0) begin
          if (acts < ACTS) begin nelig++; if (g < 0) g = r; end
          else any_faw = 1;
        end
      end
      checks++;
      if (g < 0) begin
        if (ack_valid) begin failures++; $display("t=%0d unexpected grant", t); end
      end else begin
        if (!ack_valid || int'(ack_req) != g || ack_we !== qc[g][PW-1] || int'(ack_dly) != GUARD + RCD + CAS + 1 - NET) begin
          failures++; $display("t=%0d expected grant to %0d, got v=%b r=%0d dly=%0d", t, g, ack_valid, ack_req, ack_dly);
        end
      end
      checks += 3;
      if (stat_conflict !== any_wait_bank) begin failures++; $display("t=%0d stat_conflict", t); end
      if (stat_faw !== any_faw) begin failures++; $display("t=%0d stat_faw", t); end
      if (stat_contend !== (nelig > 1)) begin failures++; $display("t=%0d stat_contend", t); end
      n_conf += int'(any_wait_bank); n_faw += int'(any_faw); n_cont += int'(nelig > 1);
      // command bus
      checks++;
      if (bus_exp.exists(cyc)) begin
        if (!cmd_valid || {cmd_we, cmd_ubank, cmd_sub, cmd_row, cmd_col} !== bus_exp[cyc]) begin
          failures++; $display("t=%0d command bus mismatch", t);
        end
        bus_exp.delete(cyc);
      end else if (cmd_valid) begin
        failures++; $display("t=%0d unexpected command on the bus", t);
      end
      // advance the model to the next cycle
      for (int b = 0; b < NU; b++) if (busy[b] != 0) busy[b]--;
      if (g >= 0) begin
        n_grant++;
        qv[g] = 0; inflight[g] = 1;
        busy[ub_of(qc[g])] = OCC - 1;
        ptr = (g + 1) % R;
        bus_exp[cyc + GUARD] = qc[g];
      end
      hist.push_back(g >= 0);
      if (hist.size() > FAW - 1) void'(hist.pop_front());
      if (ack_valid) outstanding[ack_req] = 0;
      for (int r = 0; r < R; r++) begin
        if (req_valid[r]) outstanding[r] = 1;
        if (inflight[r] && g != r && $urandom_range(0, 3) == 0) inflight[r] = 0;
        if (req_valid[r]) begin qv[r] = 1; qc[r] = req_pkt[r]; end
      end
      @(posedge clk);
    end
    checks += 4;
    if (n_conf == 0) begin failures++; $display("no bank conflict stall"); end
    if (n_faw == 0)  begin failures++; $display("no tFAW stall"); end
    if (n_cont == 0) begin failures++; $display("no contention"); end
    if (n_grant < 50) begin failures++; $display("too few grants"); end
    $display("grants=%0d conflict=%0d faw=%0d contend=%0d", n_grant, n_conf, n_faw, n_cont);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cyc <= cyc + 1;
endmodule
