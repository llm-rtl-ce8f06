// tb_llm_faw_limiter - self-checking test of the activation window limiter.
// With a small window (8 cycles, 3 activations) a greedy random source
// activates whenever allowed; a reference model of the sliding window
// predicts allow every cycle, and no window may ever hold more than 3.
module tb_llm_faw_limiter;
  localparam int W = 8, A = 3;
  logic clk = 0, rst_n = 0, act = 0, allow;
  int checks = 0, failures = 0, blocked = 0;
  bit hist [$];

  llm_faw_limiter #(.T_FAW(W), .FAW_ACTS(A)) dut (.clk, .rst_n, .act, .allow);
  always #5 clk = ~clk;

  initial begin
    #25000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int cnt;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 800; t++) begin
      @(negedge clk);
      cnt = 0;
      for (int i = 0; i < hist.size(); i++) cnt += int'(hist[i]);
      checks++;
      if (allow !== (cnt < A)) begin failures++; $display("t=%0d allow=%b model count=%0d", t, allow, cnt); end
      if (!allow) blocked++;
      act = allow && ($urandom_range(0, 3) != 0);
      hist.push_back(act);
      if (hist.size() > W - 1) void'(hist.pop_front());
    end
    checks++;
    if (blocked == 0) begin failures++; $display("limit never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
