// tb_llm_rr_arbiter - self-checking test of the round-robin arbiter.
// Random request vectors; a reference pointer model predicts every grant.
// Also checks that a permanently requesting input is served within N grants.
module tb_llm_rr_arbiter;
  localparam int N = 5;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req, gnt;
  logic [2:0] gnt_idx;
  logic gnt_valid;
  int checks = 0, failures = 0;
  int ptr = 0;
  int wait0 = 0, maxwait0 = 0;

  llm_rr_arbiter #(.N(N)) dut (.clk, .rst_n, .req, .advance(1'b1), .gnt, .gnt_idx, .gnt_valid);

  always #5 clk = ~clk;

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp;
    req = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 600; t++) begin
      @(negedge clk);
      req = N'($urandom);
      req[0] = (t >= 300);           // input 0 requests continuously in the second half
      #1;
      exp = -1;
      for (int i = 0; i < N; i++) if (exp < 0 && req[(ptr + i) % N]) exp = (ptr + i) % N;
      checks++;
      if (exp < 0) begin
        if (gnt_valid || gnt != 0) begin failures++; $display("grant without request"); end
      end else begin
        if (!gnt_valid || int'(gnt_idx) != exp || gnt != N'(1 << exp)) begin
          failures++; $display("t=%0d req=%b ptr=%0d exp=%0d got %0d", t, req, ptr, exp, gnt_idx);
        end
        ptr = (exp + 1) % N;
      end
      if (t >= 300) begin
        if (gnt[0]) wait0 = 0; else wait0++;
        if (wait0 > maxwait0) maxwait0 = wait0;
      end
    end
    checks++;
    if (maxwait0 >= N) begin failures++; $display("input 0 starved for %0d grants", maxwait0); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
