// tb_llm_requestor - self-checking test of the requestor interface.
// The testbench plays the control plane, the memory controllers and the
// memory: it watches the commands the requestor sends, answers each with a
// notification after a random wait, and then, in the announced data window,
// either drives read data on the read waveguide/wavelength the requestor
// must listen to, or collects write data from the ring that must be lit.
// Checked: command fields, ring index (channel - ubank) mod N and
// wavelength, data both ways, response tag and cycle (window end), and the
// two admission limits (one pending command per channel, one transfer per
// ring and direction), which must each hold a request back at least once.
module tb_llm_requestor;
  localparam int C = 2, N = 4, S = 3, RW = 4, CW = 1, TW = 8, TUNE = 2, BURST = 32;
  localparam int LINE = 512, LANE = 16;
  localparam int AW = RW + 1 + CW + 2 + 1;
  localparam int PW = 1 + 2 + 1 + RW + CW;
  logic clk = 0, rst_n = 0;
  logic req_valid = 0, req_ready, req_we = 0;
  logic [AW-1:0] req_addr = '0;
  logic [LINE-1:0] req_wdata = '0;
  logic [TW-1:0] req_tag = '0;
  logic resp_valid, resp_we;
  logic [TW-1:0] resp_tag;
  logic [LINE-1:0] resp_rdata;
  logic up_valid;
  logic [0:0] up_ch;
  logic [PW-1:0] up_pkt;
  logic [C-1:0] ack_valid = '0;
  logic [C-1:0][8:0] ack_pkt = '0;
  logic [N-1:0] tx_on;
  logic [N-1:0][1:0] tx_lambda;
  logic [N-1:0][LANE-1:0] tx_data;
  logic [N-1:0][N-1:0][LANE-1:0] rd_wg = '0;
  logic stat_ring_block;
  int checks = 0, failures = 0, cyc = 0, n_ring_block = 0, n_ch_block = 0, n_done = 0;

  llm_requestor #(.NUM_CH(C), .N(N), .NUM_SLOTS(S), .LINE_BITS(LINE), .LANE_BITS(LANE), .RW(RW), .CW(CW),
                  .TAG_W(TW), .T_TUNE(TUNE), .T_BURST(BURST)) dut (
    .clk, .rst_n, .req_valid, .req_ready, .req_we, .req_addr, .req_wdata, .req_tag,
    .resp_valid, .resp_we, .resp_tag, .resp_rdata, .up_valid, .up_ch, .up_pkt,
    .ack_valid, .ack_pkt, .tx_on, .tx_lambda, .tx_data, .rd_wg, .stat_ring_block);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  typedef struct {
    bit we; int ch; int ub; int ring; logic [AW-1:0] addr; logic [LINE-1:0] data;
    int t_ack; int dly; int t_win; logic [TW-1:0] tag; int state;   // 0 sent, 1 acked, 2 done
  } xfer_t;
  xfer_t xf [$];
  logic [LINE-1:0] mem [logic [AW-1:0]];
  bit busy_addr [logic [AW-1:0]];
  bit tag_used [int];

  function automatic logic [LINE-1:0] rnd();
    logic [LINE-1:0] v;
    for (int i = 0; i < LINE / 32; i++) v[i*32 +: 32] = $urandom;
    return v;
  endfunction

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // driver
  initial begin
    int ntag;
    ntag = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    while (ntag < 120) begin
      logic [AW-1:0] a;
      @(negedge clk);
      if (!req_valid) begin
        do a = AW'($urandom) & AW'({RW'(1), 1'b1, 1'b1, 2'b11, 1'b1}); while (busy_addr.exists(a));
        req_valid = 1; req_we = ($urandom_range(0, 1) == 1) || !mem.exists(a);
        req_addr = a; req_wdata = rnd(); req_tag = TW'(ntag);
      end
      #1;
      if (stat_ring_block) n_ring_block++;
      if (req_valid && !req_ready && !stat_ring_block) n_ch_block++;
      if (req_valid && req_ready) begin
        xfer_t x;
        x.we = req_we; x.ch = int'(req_addr[0]); x.ub = int'(req_addr[2:1]);
        x.ring = (x.ch + N - x.ub) % N; x.addr = req_addr; x.data = req_wdata; x.tag = req_tag;
        x.state = 0; x.t_ack = -1;
        xf.push_back(x);
        busy_addr[req_addr] = 1;
        ntag++;
        @(posedge clk); #1;
        req_valid = 0;
      end
    end
  end

  // control plane, controllers and memory
  int last_up = -1;
  initial begin
    @(posedge rst_n);
    forever begin
      @(negedge clk);
      #2;
      ack_valid = '0;
      rd_wg = '0;
      // command leaving the requestor
      if (up_valid) begin
        bit found;
        found = 0;
        foreach (xf[i]) if (!found && xf[i].state == 0 && xf[i].t_ack < 0) begin
          found = 1;
          checks++;
          if (int'(up_ch) != xf[i].ch || up_pkt !== {xf[i].we, 2'(xf[i].ub), xf[i].addr[4], xf[i].addr[AW-1 -: RW], xf[i].addr[3]}) begin
            failures++; $display("t=%0d command packet wrong", cyc);
          end
          xf[i].t_ack = cyc + $urandom_range(2, 12);
          xf[i].dly = $urandom_range(TUNE + 2, 9);
        end
        checks++;
        if (!found) begin failures++; $display("t=%0d unexpected command", cyc); end
      end
      foreach (xf[i]) begin
        if (xf[i].state == 0 && xf[i].t_ack >= 0 && cyc >= xf[i].t_ack && !ack_valid[xf[i].ch]) begin
          ack_valid[xf[i].ch] = 1;
          ack_pkt[xf[i].ch] = {xf[i].we, 8'(xf[i].dly)};
          xf[i].state = 1;
          xf[i].t_win = cyc + xf[i].dly;
          if (!xf[i].we) xf[i].data = mem[xf[i].addr];
        end
      end
      // data windows
      for (int k = 0; k < N; k++) begin
        bit lit;
        lit = 0;
        foreach (xf[i]) if (xf[i].state == 1 && xf[i].ring == k && cyc >= xf[i].t_win && cyc < xf[i].t_win + BURST) begin
          int c;
          c = cyc - xf[i].t_win;
          if (xf[i].we) begin
            lit = 1;
            checks++;
            if (!tx_on[k] || int'(tx_lambda[k]) != xf[i].ub || tx_data[k] !== xf[i].data[c*LANE +: LANE]) begin
              failures++; $display("t=%0d write lane on ring %0d wrong", cyc, k);
            end
          end else begin
            rd_wg[k][xf[i].ub] = xf[i].data[c*LANE +: LANE];
          end
        end
        checks++;
        if (!lit && tx_on[k]) begin failures++; $display("t=%0d ring %0d lit outside a write window", cyc, k); end
      end
      // responses
      if (resp_valid) begin
        bit found;
        found = 0;
        foreach (xf[i]) if (!found && xf[i].state == 1 && xf[i].tag == resp_tag) begin
          found = 1;
          checks += 2;
          if (resp_we !== xf[i].we || (!xf[i].we && resp_rdata !== xf[i].data)) begin
            failures++; $display("t=%0d response %0d wrong", cyc, resp_tag);
          end
          if (cyc < xf[i].t_win + BURST || cyc > xf[i].t_win + BURST + S) begin
            failures++; $display("t=%0d response %0d at wrong time (window end %0d)", cyc, resp_tag, xf[i].t_win + BURST);
          end
          if (xf[i].we) mem[xf[i].addr] = xf[i].data;
          busy_addr.delete(xf[i].addr);
          xf.delete(i);
          n_done++;
        end
        checks++;
        if (!found) begin failures++; $display("t=%0d unexpected response", cyc); end
      end
      if (n_done == 120) begin
        checks += 2;
        if (n_ring_block == 0) begin failures++; $display("ring limit never held a request"); end
        if (n_ch_block == 0) begin failures++; $display("channel limit never held a request"); end
        $display("ring blocks=%0d channel/slot blocks=%0d", n_ring_block, n_ch_block);
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end
endmodule
