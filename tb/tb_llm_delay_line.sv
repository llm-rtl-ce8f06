// tb_llm_delay_line - self-checking test of the fixed-latency pipeline:
// random data in, the same data exactly LAT cycles later, zero after reset.
module tb_llm_delay_line;
  localparam int LAT = 7;
  logic clk = 0, rst_n = 0;
  logic [11:0] din = 0, dout;
  logic [11:0] sent [$];
  int checks = 0, failures = 0;

  llm_delay_line #(.W(12), .LAT(LAT)) dut (.clk, .rst_n, .din, .dout);
  always #5 clk = ~clk;

  initial begin
    #15000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < LAT; i++) sent.push_back(12'h0);
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      checks++;
      if (dout !== sent[0]) begin failures++; $display("t=%0d dout=%h expected %h", t, dout, sent[0]); end
      void'(sent.pop_front());
      din = 12'($urandom);
      sent.push_back(din);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
