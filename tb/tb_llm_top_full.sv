// tb_llm_top_full - the LLM memory subsystem at its full default size:
// 16 requestors, 8 channels of 64 ubanks, two 64-port AWGRs, published
// timing. Every requestor writes one line to its own channel and ubank,
// all at once, then reads it back; then two requestors read the same ubank
// so that one must wait for the other (a bank conflict). Checks data, the
// read latency (3 + 40 + 20 + 28 + 10 + 32 = 133 cycles, 66.5 ns, or one
// cycle more for the second of two requestors sharing a channel) and that the conflicting read is delayed by exactly one ubank occupancy
// (1 + 28 + 10 + 32 + 28 = 99 cycles).
module tb_llm_top_full;
  import llm_pkg::*;
  localparam int R = NUM_REQ_D, C = NUM_CH_D, LINE = LINE_BITS_D, TW = TAG_W_D;
  localparam int AW = 10 + 1 + 2 + 6 + 3;
  localparam int LAT = 3 + T_NET_D + T_GUARD_D + T_RCD_D + T_CAS_D + T_BURST_D;
  localparam int OCC = 1 + T_RCD_D + T_CAS_D + T_BURST_D + T_RP_D;

  logic clk = 0, rst_n = 0;
  logic [R-1:0] req_valid = '0, req_ready, req_we = '0;
  logic [R-1:0][AW-1:0] req_addr = '0;
  logic [R-1:0][LINE-1:0] req_wdata = '0;
  logic [R-1:0][TW-1:0] req_tag = '0;
  logic [R-1:0] resp_valid, resp_we;
  logic [R-1:0][TW-1:0] resp_tag;
  logic [R-1:0][LINE-1:0] resp_rdata;
  logic [C-1:0] stat_conflict, stat_faw, stat_contend;
  logic [R-1:0] stat_ring_block;
  logic [C-1:0][63:0] stat_ubank_busy;
  int checks = 0, failures = 0, cyc = 0;

  llm_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  logic [LINE-1:0] wd [R];
  logic [AW-1:0] addr [R];
  int t_acc [R], t_rsp [R];

  function automatic logic [LINE-1:0] rnd();
    logic [LINE-1:0] v;
    for (int i = 0; i < LINE / 32; i++) v[i*32 +: 32] = $urandom;
    return v;
  endfunction

  // every requestor in mask issues one request at the same time; wait for all responses
  task automatic round(logic [R-1:0] mask, bit we);
    logic [R-1:0] done;
    done = '0;
    @(negedge clk);
    for (int r = 0; r < R; r++) if (mask[r]) begin
      req_valid[r] = 1; req_we[r] = we; req_addr[r] = addr[r]; req_wdata[r] = wd[r]; req_tag[r] = TW'(r);
    end
    #1;
    for (int r = 0; r < R; r++) if (mask[r]) begin
      checks++;
      if (!req_ready[r]) begin failures++; $display("r%0d not ready", r); end
      t_acc[r] = cyc;
    end
    @(posedge clk); #1;
    req_valid = '0;
    while (done != mask) begin
      @(negedge clk); #1;
      for (int r = 0; r < R; r++) if (mask[r] && resp_valid[r]) begin
        done[r] = 1;
        t_rsp[r] = cyc;
        checks++;
        if (resp_we[r] !== we || int'(resp_tag[r]) != r || (!we && resp_rdata[r] !== wd[r])) begin
          failures++; $display("r%0d response wrong", r);
        end
      end
    end
  endtask

  initial begin
    #50000; failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    // requestor r -> channel r % 8, ubank (5 r + 3) % 64, row 17 r, col r % 4, sub r % 2
    for (int r = 0; r < R; r++) begin
      addr[r] = {10'(17 * r), 1'(r % 2), 2'(r % 4), 6'((5 * r + 3) % 64), 3'(r % C)};
      wd[r] = rnd();
    end
    round('1, 1'b1);
    round('1, 1'b0);
    // requestors r and r + 8 share a channel: the controller grants one
    // command per cycle, so one of the two reads is one cycle later
    for (int c = 0; c < C; c++) begin
      int l0, l1;
      l0 = t_rsp[c] - t_acc[c];
      l1 = t_rsp[c + C] - t_acc[c + C];
      checks++;
      if (l0 + l1 != 2 * LAT + 1 || (l0 != LAT && l1 != LAT)) begin
        failures++; $display("channel %0d read latencies %0d, %0d; expected %0d and %0d", c, l0, l1, LAT, LAT + 1);
      end
    end
    // bank conflict: requestors 0 and 1 read the line of requestor 0
    addr[1] = addr[0]; wd[1] = wd[0];
    round(R'(3), 1'b0);
    checks++;
    if ((t_rsp[0] - t_acc[0]) + (t_rsp[1] - t_acc[1]) != 2 * LAT + OCC) begin
      failures++; $display("conflict latencies %0d and %0d, expected %0d and %0d",
                           t_rsp[0] - t_acc[0], t_rsp[1] - t_acc[1], LAT, LAT + OCC);
    end
    $display("read latency %0d cycles, conflicting read %0d cycles", LAT,
             (t_rsp[0] - t_acc[0] > t_rsp[1] - t_acc[1]) ? t_rsp[0] - t_acc[0] : t_rsp[1] - t_acc[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
