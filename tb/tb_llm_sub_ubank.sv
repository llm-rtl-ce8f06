// tb_llm_sub_ubank - self-checking test of a sub-ubank: activate, column
// write into the row buffer, restore at precharge, and read back after a
// later activation, against a reference copy of the array.
module tb_llm_sub_ubank;
  localparam int ROWS = 8, RB = 1024, LINE = 512, NC = RB / LINE;
  logic clk = 0, rst_n = 0;
  logic act = 0, col_wr = 0, pre = 0;
  logic [2:0] act_row = 0;
  logic [0:0] col = 0;
  logic [LINE-1:0] wr_data = 0, rd_data;
  logic [LINE-1:0] model [ROWS][NC];
  int checks = 0, failures = 0;

  llm_sub_ubank #(.ROWS(ROWS), .ROW_BITS(RB), .LINE_BITS(LINE)) dut (
    .clk, .rst_n, .act, .act_row, .col, .col_wr, .wr_data, .pre, .rd_data);
  always #5 clk = ~clk;

  function automatic logic [LINE-1:0] rnd();
    logic [LINE-1:0] v;
    for (int i = 0; i < LINE / 32; i++) v[i*32 +: 32] = $urandom;
    return v;
  endfunction

  task automatic pulse_act(int r);
    @(negedge clk); act = 1; act_row = 3'(r); @(negedge clk); act = 0;
  endtask
  task automatic do_wr(int c, logic [LINE-1:0] d);
    col = 1'(c); wr_data = d; col_wr = 1; @(negedge clk); col_wr = 0;
  endtask
  task automatic do_pre();
    pre = 1; @(negedge clk); pre = 0;
  endtask

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < ROWS; r++) begin
      pulse_act(r);
      for (int c = 0; c < NC; c++) begin model[r][c] = rnd(); do_wr(c, model[r][c]); end
      do_pre();
    end
    for (int n = 0; n < 60; n++) begin
      int r, c;
      r = $urandom_range(0, ROWS - 1);
      pulse_act(r);
      for (int k = 0; k < NC; k++) begin
        col = 1'(k); #1;
        checks++;
        if (rd_data !== model[r][k]) begin failures++; $display("row %0d col %0d wrong", r, k); end
      end
      if (n % 2 == 0) begin
        c = $urandom_range(0, NC - 1);
        model[r][c] = rnd();
        do_wr(c, model[r][c]);
        col = 1'(c); #1;
        checks++;
        if (rd_data !== model[r][c]) begin failures++; $display("row buffer not updated"); end
      end
      do_pre();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
