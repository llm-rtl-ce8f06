// tb_llm_ubank - self-checking test of one ubank.
// Writes and reads with the exact cycle timing a requestor would use: write
// data is driven on the lane during cycles i+T_RCD+T_CAS+1 .. +T_BURST after
// the command cycle i, read data is sampled in the same window. Checks the
// data against a reference memory, both sub-ubanks, the busy window
// (exactly 1+T_RCD+T_CAS+T_BURST+T_RP cycles) and a dark lane outside reads.
module tb_llm_ubank;
  localparam int LINE = 512, LANE = 16, NCH = LINE / LANE;
  localparam int RCD = 5, CAS = 3, BURST = NCH, RP = 4;
  localparam int OCC = 1 + RCD + CAS + BURST + RP;
  localparam int ROWS = 256;
  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0, cmd_we = 0, cmd_sub = 0;
  logic [7:0] cmd_row = 0;
  logic [0:0] cmd_col = 0;
  logic [LANE-1:0] wr_lane = 0, rd_lane;
  logic busy;
  int checks = 0, failures = 0;
  logic [LINE-1:0] model [logic [9:0]];

  llm_ubank #(.LINE_BITS(LINE), .LANE_BITS(LANE), .SUBARRAYS(1), .MAT_DIM(256), .MATS_PER_SUB(4),
              .T_RCD(RCD), .T_CAS(CAS), .T_BURST(BURST), .T_RP(RP)) dut (
    .clk, .rst_n, .cmd_valid, .cmd_we, .cmd_sub, .cmd_row, .cmd_col, .wr_lane, .rd_lane, .busy);
  always #5 clk = ~clk;

  function automatic logic [LINE-1:0] rnd();
    logic [LINE-1:0] v;
    for (int i = 0; i < LINE / 32; i++) v[i*32 +: 32] = $urandom;
    return v;
  endfunction

  // one access; returns after the ubank is idle again
  task automatic access(bit we, bit sub, int row, int col, logic [LINE-1:0] wd, output logic [LINE-1:0] rd);
    @(negedge clk);
    cmd_valid = 1; cmd_we = we; cmd_sub = sub; cmd_row = 8'(row); cmd_col = 1'(col);
    @(negedge clk);                 // now in cycle i+1
    cmd_valid = 0;
    for (int k = 1; k < OCC + 1; k++) begin
      int c;
      c = k - (RCD + CAS + 1);
      checks++;
      if (busy !== (k < OCC)) begin failures++; $display("busy=%b at cycle i+%0d", busy, k); end
      if (c >= 0 && c < BURST) begin
        if (we) wr_lane = wd[c*LANE +: LANE];
        else begin
          rd[c*LANE +: LANE] = rd_lane;
        end
      end else begin
        wr_lane = 16'($urandom);     // noise outside the window must be ignored
        checks++;
        if (rd_lane !== '0) begin failures++; $display("lane lit outside a read burst"); end
      end
      if (k < OCC) @(negedge clk);
    end
  endtask

  initial begin
    #500000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [LINE-1:0] d, got;
    logic [9:0] key;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 40; n++) begin
      bit sub; int row, col;
      sub = 1'($urandom); row = $urandom_range(0, 3); col = $urandom_range(0, 1);
      key = {sub, 8'(row), 1'(col)};
      if (!model.exists(key) || $urandom_range(0, 2) == 0) begin
        d = rnd(); model[key] = d;
        access(1, sub, row, col, d, got);
      end else begin
        access(0, sub, row, col, '0, got);
        checks++;
        if (got !== model[key]) begin failures++; $display("read sub %0d row %0d col %0d wrong", sub, row, col); end
      end
    end
    // the other column of a written row and the other sub-ubank stay intact
    foreach (model[k]) begin
      access(0, k[9], int'(k[8:1]), int'(k[0]), '0, got);
      checks++;
      if (got !== model[k]) begin failures++; $display("final read of %h wrong", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
