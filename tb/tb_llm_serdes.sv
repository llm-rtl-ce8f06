// tb_llm_serdes - self-checking test of the line/lane SerDes: a loaded line
// leaves lowest chunk first in LINE/LANE cycles, and a line shifted in
// lowest chunk first is assembled in data.
module tb_llm_serdes;
  localparam int LINE = 512, LANE = 16, NCH = LINE / LANE;
  logic clk = 0, rst_n = 0, load = 0, shift = 0;
  logic [LINE-1:0] load_data = 0, data, ref_line;
  logic [LANE-1:0] lane_in = 0, lane_out;
  int checks = 0, failures = 0;

  llm_serdes #(.LINE_BITS(LINE), .LANE_BITS(LANE)) dut (.clk, .rst_n, .load, .load_data, .shift, .lane_in, .lane_out, .data);
  always #5 clk = ~clk;

  initial begin
    #50000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 6; n++) begin
      for (int i = 0; i < LINE / 32; i++) ref_line[i*32 +: 32] = $urandom;
      // serialize
      @(negedge clk); load = 1; load_data = ref_line;
      @(negedge clk); load = 0; shift = 1;
      for (int c = 0; c < NCH; c++) begin
        checks++;
        if (lane_out !== ref_line[c*LANE +: LANE]) begin failures++; $display("tx chunk %0d wrong", c); end
        @(negedge clk);
      end
      shift = 0;
      // deserialize
      shift = 1;
      for (int c = 0; c < NCH; c++) begin
        lane_in = ref_line[c*LANE +: LANE];
        @(negedge clk);
      end
      shift = 0;
      checks++;
      if (data !== ref_line) begin failures++; $display("rx line wrong"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
