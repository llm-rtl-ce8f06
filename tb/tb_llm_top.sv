// tb_llm_top - end-to-end test of the LLM memory subsystem at reduced size
// (4 requestors, 4 channels, 8 ubanks and 8-port AWGRs, short timings, a
// tFAW limit lowered to 2 activations per 30 cycles so that it is reached).
// Phase 1 checks the latency of an isolated write and read against
// 3 + T_NET + T_GUARD + T_RCD + T_CAS + T_BURST. Phase 2 runs random reads
// and writes from all requestors at once over a small address pool, so that
// bank conflicts, arbitration contention, tFAW stalls, ring conflicts at the
// requestor and parallel transfers on many wavelengths all happen; a
// reference memory checks every read. Each of those mechanisms is counted
// and must occur.
module tb_llm_top;
  localparam int R = 4, C = 4, NU = 8, SLOTS = 4, LINE = 512, TW = 8;
  localparam int NET = 10, GUARD = 6, RCD = 5, CAS = 3, BURST = 32, RP = 4, FAW = 30, ACTS = 2, TUNE = 2;
  localparam int RW = 8, CW = 1, LW = 3, CHW = 2;
  localparam int AW = RW + 1 + CW + LW + CHW;
  localparam int LAT = 3 + NET + GUARD + RCD + CAS + BURST;
  localparam int OPS = 80;

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
  logic [C-1:0][NU-1:0] stat_ubank_busy;
  int checks = 0, failures = 0, cyc = 0;
  int n_conflict = 0, n_faw = 0, n_contend = 0, n_ring = 0, n_par_ub = 0, n_par_ch = 0;

  llm_top #(.NUM_REQ(R), .NUM_CH(C), .NUM_UBANK(NU), .NUM_SLOTS(SLOTS), .SUBARRAYS(1), .MAT_DIM(256),
            .T_NET(NET), .T_GUARD(GUARD), .T_RCD(RCD), .T_CAS(CAS), .T_BURST(BURST), .T_RP(RP),
            .T_FAW(FAW), .FAW_ACTS(ACTS), .T_TUNE(TUNE)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      n_conflict += int'(|stat_conflict);
      n_faw      += int'(|stat_faw);
      n_contend  += int'(|stat_contend);
      n_ring     += int'(|stat_ring_block);
      begin
        int nb, nc;
        nc = 0;
        for (int c = 0; c < C; c++) begin
          nb = $countones(stat_ubank_busy[c]);
          if (nb >= 2) n_par_ub++;
          if (nb > 0) nc++;
        end
        if (nc >= 2) n_par_ch++;
      end
    end
  end

  logic [LINE-1:0] mem [logic [AW-1:0]];
  bit locked [logic [AW-1:0]];

  function automatic logic [LINE-1:0] rnd();
    logic [LINE-1:0] v;
    for (int i = 0; i < LINE / 32; i++) v[i*32 +: 32] = $urandom;
    return v;
  endfunction

  typedef struct { bit we; logic [AW-1:0] a; logic [LINE-1:0] d; int t0; } pend_t;
  pend_t pend [R][int];
  int n_done = 0, last_lat = 0;

  // issue one request from requestor r; returns once it is accepted
  task automatic issue(int r, bit we, logic [AW-1:0] a, logic [LINE-1:0] wd, int tag);
    @(negedge clk);
    req_valid[r] = 1; req_we[r] = we; req_addr[r] = a; req_wdata[r] = wd; req_tag[r] = TW'(tag);
    #1;
    while (!req_ready[r]) begin @(negedge clk); #1; end
    pend[r][tag] = '{we, a, we ? wd : mem[a], cyc};
    @(posedge clk); #1;
    req_valid[r] = 0;
  endtask

  // responses: check against the reference memory
  always @(negedge clk) begin
    #2;
    for (int r = 0; r < R; r++) if (resp_valid[r]) begin
      int tag;
      tag = int'(resp_tag[r]);
      checks++;
      if (!pend[r].exists(tag)) begin
        failures++; $display("r%0d unexpected response tag %0d", r, tag);
      end else begin
        pend_t p;
        p = pend[r][tag];
        if (resp_we[r] !== p.we || (!p.we && resp_rdata[r] !== p.d)) begin
          failures++; $display("r%0d %s addr %h wrong", r, p.we ? "write" : "read", p.a);
        end
        if (p.we) mem[p.a] = p.d;
        locked.delete(p.a);
        last_lat = cyc - p.t0;
        pend[r].delete(tag);
        n_done++;
      end
    end
  end

  function automatic logic [AW-1:0] pick_addr();
    logic [AW-1:0] a;
    a = AW'($urandom);
    a[AW-1 -: RW] = RW'($urandom_range(0, 3));       // few rows
    a[CHW +: LW]  = LW'($urandom_range(0, 2));       // few ubanks: conflicts
    return a;
  endfunction

  task automatic issuer(int r);
    for (int n = 0; n < OPS; n++) begin
      logic [AW-1:0] a;
      bit we;
      do a = pick_addr(); while (locked.exists(a));
      locked[a] = 1;
      we = !mem.exists(a) || ($urandom_range(0, 1) == 1);
      issue(r, we, a, rnd(), n);
    end
  endtask

  initial begin
    #2000000; failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [LINE-1:0] d;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    // phase 1: isolated write and read
    d = rnd();
    locked[AW'(15'h1235)] = 1;
    issue(1, 1, AW'(15'h1235), d, 1);
    wait (n_done == 1);
    checks++;
    if (last_lat != LAT) begin failures++; $display("write latency %0d, expected %0d", last_lat, LAT); end
    locked[AW'(15'h1235)] = 1;
    issue(2, 0, AW'(15'h1235), '0, 2);
    wait (n_done == 2);
    checks++;
    if (last_lat != LAT) begin failures++; $display("read latency %0d, expected %0d", last_lat, LAT); end
    $display("isolated read latency %0d cycles", last_lat);
    // phase 2: all requestors at once, several requests in flight each
    fork
      issuer(0); issuer(1); issuer(2); issuer(3);
    join
    wait (n_done == 2 + R * OPS);
    checks += 6;
    if (n_conflict == 0) begin failures++; $display("no bank-conflict stall"); end
    if (n_faw == 0)      begin failures++; $display("no tFAW stall"); end
    if (n_contend == 0)  begin failures++; $display("no arbitration contention"); end
    if (n_ring == 0)     begin failures++; $display("no ring conflict at a requestor"); end
    if (n_par_ub == 0)   begin failures++; $display("no parallel ubanks in a channel"); end
    if (n_par_ch == 0)   begin failures++; $display("no parallel channels"); end
    $display("events: conflict=%0d faw=%0d contend=%0d ring=%0d par_ubank=%0d par_channel=%0d",
             n_conflict, n_faw, n_contend, n_ring, n_par_ub, n_par_ch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
