// tb_llm_channel - self-checking test of a channel of 4 ubanks.
// Commands to different ubanks are issued on consecutive cycles so their
// data windows overlap on different wavelengths; every ubank's read data
// must come back intact on its own lane, and no other lane may be lit.
module tb_llm_channel;
  localparam int NU = 4, LINE = 512, LANE = 16, NCH = LINE / LANE;
  localparam int RCD = 5, CAS = 3, BURST = NCH, RP = 4;
  localparam int WIN = RCD + CAS + 1;            // first data cycle after the command cycle
  localparam int OCC = 1 + RCD + CAS + BURST + RP;
  logic clk = 0, rst_n = 0;
  logic cmd_valid = 0, cmd_we = 0, cmd_sub = 0;
  logic [1:0] cmd_ubank = 0;
  logic [7:0] cmd_row = 0;
  logic [0:0] cmd_col = 0;
  logic [NU-1:0][LANE-1:0] wr_wg = '0, rd_wg;
  logic [NU-1:0] ubank_busy;
  int checks = 0, failures = 0, cyc = 0, max_par = 0;

  llm_channel #(.NUM_UBANK(NU), .LINE_BITS(LINE), .LANE_BITS(LANE), .SUBARRAYS(1), .MAT_DIM(256),
                .MATS_PER_SUB(4), .T_RCD(RCD), .T_CAS(CAS), .T_BURST(BURST), .T_RP(RP)) dut (
    .clk, .rst_n, .cmd_valid, .cmd_we, .cmd_ubank, .cmd_sub, .cmd_row, .cmd_col,
    .wr_wg, .rd_wg, .ubank_busy);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  logic [LINE-1:0] wdat [NU], rdat [NU];
  int t0 [NU];
  bit we_op;

  function automatic logic [LINE-1:0] rnd();
    logic [LINE-1:0] v;
    for (int i = 0; i < LINE / 32; i++) v[i*32 +: 32] = $urandom;
    return v;
  endfunction

  // issue one command per cycle to ubanks 0..NU-1, then serve all windows
  task automatic round(bit we, int row);
    we_op = we;
    for (int b = 0; b < NU; b++) begin
      @(negedge clk);
      cmd_valid = 1; cmd_we = we; cmd_ubank = 2'(b); cmd_sub = 1'(b); cmd_row = 8'(row); cmd_col = 1'(b);
      t0[b] = cyc;
    end
    @(negedge clk); cmd_valid = 0;
    while (cyc <= t0[NU-1] + OCC) begin
      int par;
      par = 0;
      for (int b = 0; b < NU; b++) begin
        int c;
        c = cyc - t0[b] - WIN;
        par += int'(ubank_busy[b]);
        if (c >= 0 && c < BURST) begin
          if (we) wr_wg[b] = wdat[b][c*LANE +: LANE];
          else rdat[b][c*LANE +: LANE] = rd_wg[b];
        end else begin
          wr_wg[b] = '0;
          checks++;
          if (rd_wg[b] !== '0) begin failures++; $display("lane %0d lit outside its burst", b); end
        end
      end
      if (par > max_par) max_par = par;
      @(negedge clk);
    end
  endtask

  initial begin
    #500000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3; n++) begin
      for (int b = 0; b < NU; b++) wdat[b] = rnd();
      round(1, n);
      round(0, n);
      for (int b = 0; b < NU; b++) begin
        checks++;
        if (rdat[b] !== wdat[b]) begin failures++; $display("round %0d ubank %0d data wrong", n, b); end
      end
    end
    checks++;
    if (max_par != NU) begin failures++; $display("only %0d ubanks were active together", max_par); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
