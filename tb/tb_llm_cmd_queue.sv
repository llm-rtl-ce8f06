// tb_llm_cmd_queue - self-checking test of the single-entry command queue:
// enqueue, hold, dequeue, and enqueue in the same cycle as a dequeue.
module tb_llm_cmd_queue;
  logic clk = 0, rst_n = 0;
  logic enq = 0, deq = 0, valid;
  logic [15:0] enq_data = 0, data;
  int checks = 0, failures = 0;

  llm_cmd_queue #(.W(16)) dut (.clk, .rst_n, .enq, .enq_data, .deq, .valid, .data);
  always #5 clk = ~clk;

  task automatic chk(logic ev, logic [15:0] ed, string what);
    checks++;
    if (valid !== ev || (ev && data !== ed)) begin
      failures++; $display("%s: valid=%b data=%h expected %b %h", what, valid, data, ev, ed);
    end
  endtask

  initial begin
    #10000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [15:0] v;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); chk(0, 0, "after reset");
    for (int i = 0; i < 50; i++) begin
      v = 16'($urandom);
      enq = 1; enq_data = v;
      @(negedge clk); enq = 0;
      chk(1, v, "after enqueue");
      repeat ($urandom_range(0, 3)) begin @(negedge clk); chk(1, v, "holding"); end
      if (i % 2 == 0) begin
        deq = 1; @(negedge clk); deq = 0; chk(0, 0, "after dequeue");
      end else begin
        deq = 1; enq = 1; v = 16'($urandom); enq_data = v;
        @(negedge clk); deq = 0; enq = 0; chk(1, v, "dequeue with enqueue");
        deq = 1; @(negedge clk); deq = 0; chk(0, 0, "after dequeue");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
