// tb_llm_workloads - the three synthetic memory workloads run on the whole
// memory subsystem: Stream (every traffic generator walks its own run of
// consecutive lines), Random (independent reads and writes to uniformly
// random lines) and GUPS (random read-modify-write updates: read a line,
// XOR a key into it, write it back). Each workload runs from all traffic
// generators at once with several requests in flight per generator.
// The system is built smaller than the defaults (4 requestors, 4 channels,
// 8 ubanks per channel, a smaller cell array) but keeps the default DRAM,
// network and guard timings, so the latencies it reports are those of the
// full design under that load. A reference memory checks every response;
// GUPS is checked once more by reading back every line it touched. The test
// also checks that no access beats the uncontended latency and prints the
// average latency and throughput of each workload.
module tb_llm_workloads;
  localparam int R = 4, C = 4, NU = 8, SLOTS = 4, LINE = 512, TW = 8;
  localparam int RW = 8, CW = 1, LW = 3, CHW = 2;
  localparam int AW = RW + 1 + CW + LW + CHW;
  localparam int LAT = 3 + 40 + 20 + 28 + 10 + 32;      // default timings
  localparam int SPAN = 64;                              // lines per generator in Stream
  localparam int OPS = 48;                               // operations per generator

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

  llm_top #(.NUM_REQ(R), .NUM_CH(C), .NUM_UBANK(NU), .NUM_SLOTS(SLOTS), .SUBARRAYS(1),
            .MAT_DIM(256)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  logic [LINE-1:0] mem [logic [AW-1:0]];
  bit locked [logic [AW-1:0]];

  function automatic logic [LINE-1:0] rnd();
    logic [LINE-1:0] v;
    for (int i = 0; i < LINE / 32; i++) v[i*32 +: 32] = $urandom;
    return v;
  endfunction

  typedef struct { bit we; logic [AW-1:0] a; logic [LINE-1:0] d; int t0; } pend_t;
  pend_t pend [R][int];
  logic [LINE-1:0] last_rd [R];
  int n_done = 0, lat_sum = 0, lat_min = 1 << 30;
  int tag_ctr [R];
  bit touched [logic [AW-1:0]];           // lines updated by GUPS

  task automatic issue(int r, bit we, logic [AW-1:0] a, logic [LINE-1:0] wd, output int tag);
    tag = tag_ctr[r];
    tag_ctr[r] = (tag_ctr[r] + 1) % 256;
    @(negedge clk);
    req_valid[r] = 1; req_we[r] = we; req_addr[r] = a; req_wdata[r] = wd; req_tag[r] = TW'(tag);
    #1;
    while (!req_ready[r]) begin @(negedge clk); #1; end
    pend[r][tag] = '{we, a, we ? wd : mem[a], cyc};
    @(posedge clk); #1;
    req_valid[r] = 0;
  endtask

  always @(negedge clk) begin
    #2;
    for (int r = 0; r < R; r++) if (resp_valid[r]) begin
      int tag, lat;
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
        else last_rd[r] = resp_rdata[r];
        locked.delete(p.a);
        lat = cyc - p.t0;
        lat_sum += lat;
        if (lat < lat_min) lat_min = lat;
        pend[r].delete(tag);
        n_done++;
      end
    end
  end

  function automatic logic [AW-1:0] stream_addr(int r, int i);
    return AW'(r * SPAN + i);
  endfunction

  function automatic logic [AW-1:0] rand_addr();
    return AW'($urandom_range(0, R * SPAN - 1));
  endfunction

  task automatic stream_gen(int r, bit we);
    int t;
    for (int i = 0; i < SPAN; i++) begin
      logic [AW-1:0] a;
      a = stream_addr(r, i);
      locked[a] = 1;
      issue(r, we, a, rnd(), t);
    end
  endtask

  task automatic random_gen(int r);
    int t;
    for (int n = 0; n < OPS; n++) begin
      logic [AW-1:0] a;
      do a = rand_addr(); while (locked.exists(a));
      locked[a] = 1;
      issue(r, $urandom_range(0, 1) == 1, a, rnd(), t);
    end
  endtask

  // one GUPS update: the read and the write hold the line locked throughout
  task automatic gups_gen(int r);
    int t;
    for (int n = 0; n < OPS / 2; n++) begin
      logic [AW-1:0] a;
      logic [LINE-1:0] key;
      do a = rand_addr(); while (locked.exists(a));
      locked[a] = 1;
      touched[a] = 1;
      key = rnd();
      issue(r, 0, a, '0, t);
      while (pend[r].exists(t)) @(posedge clk);
      locked[a] = 1;
      issue(r, 1, a, last_rd[r] ^ key, t);
    end
  endtask

  task automatic run(string name, int kind);
    int d0, c0, s0, ops;
    d0 = n_done; c0 = cyc; s0 = lat_sum;
    for (int r = 0; r < R; r++) begin
      automatic int rr = r;
      fork
        case (kind)
          0: stream_gen(rr, 1);
          1: stream_gen(rr, 0);
          2: random_gen(rr);
          default: gups_gen(rr);
        endcase
      join_none
    end
    wait fork;
    ops = (kind < 2) ? R * SPAN : R * OPS;
    wait (n_done == d0 + ops);
    $display("%-12s %4d accesses  avg latency %0d cycles  %0d cycles total",
             name, ops, (lat_sum - s0) / ops, cyc - c0);
    checks++;
    if ((lat_sum - s0) < ops * LAT) begin failures++; $display("%s: latency below the minimum", name); end
    if (kind == 3) begin
      // read back every line the updates touched
      int t;
      foreach (touched[a]) begin
        locked[a] = 1;
        issue(0, 0, a, '0, t);
        while (pend[0].exists(t)) @(posedge clk);
      end
    end
  endtask

  initial begin
    #2000000; failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int r = 0; r < R; r++) tag_ctr[r] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    run("stream-write", 0);
    run("stream-read", 1);
    run("random", 2);
    run("gups", 3);
    checks++;
    if (lat_min != LAT) begin failures++; $display("minimum latency %0d, expected %0d", lat_min, LAT); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
