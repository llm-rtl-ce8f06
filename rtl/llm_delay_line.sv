// llm_delay_line - fixed-latency pipeline.
//
// What enters as din in cycle t leaves as dout in cycle t + LAT (LAT >= 1
// registers). The memory controller uses it to hold a granted command for
// the guard time, and the control plane uses it for the fixed latency of the
// electrical network. Reset clears every stage, so a valid bit carried in
// din reads 0 until real traffic has passed through.
module llm_delay_line #(
  parameter int unsigned W   = 8,
  parameter int unsigned LAT = 20
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);
  logic [W-1:0] stage [LAT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(LAT); i++) stage[i] <= '0;
    end else begin
      stage[0] <= din;
      for (int i = 1; i < int'(LAT); i++) stage[i] <= stage[i-1];
    end
  end

  assign dout = stage[LAT-1];

  initial assert (LAT >= 1) else $error("llm_delay_line: LAT must be at least 1");
endmodule
