// tb_llm_wg_combiner - self-checking test of the write waveguides: each
// lit ring's data must appear on its waveguide at its wavelength, dark
// lanes stay zero, and the collision flag stays low while every
// (waveguide, wavelength) pair has at most one ring.
module tb_llm_wg_combiner;
  localparam int R = 3, N = 4, LB = 16;
  logic clk = 0;
  logic [R-1:0][N-1:0] tx_on;
  logic [R-1:0][N-1:0][1:0] tx_lambda;
  logic [R-1:0][N-1:0][LB-1:0] tx_data;
  logic [N-1:0][N-1:0][LB-1:0] wg, expw;
  logic collision;
  int checks = 0, failures = 0;

  llm_wg_combiner #(.NUM_REQ(R), .N(N), .LANE_BITS(LB)) dut (.clk, .tx_on, .tx_lambda, .tx_data, .wg, .collision);

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      bit used [N][N];
      expw = '0; tx_on = '0; tx_lambda = '0; tx_data = '0;
      for (int k = 0; k < N; k++) for (int l = 0; l < N; l++) used[k][l] = 0;
      for (int r = 0; r < R; r++) for (int k = 0; k < N; k++) begin
        int l;
        l = $urandom_range(0, N - 1);
        if ($urandom_range(0, 1) == 1 && !used[k][l]) begin
          used[k][l] = 1;
          tx_on[r][k] = 1; tx_lambda[r][k] = 2'(l); tx_data[r][k] = LB'($urandom);
          expw[k][l] = tx_data[r][k];
        end
      end
      #1;
      checks += 2;
      if (wg !== expw) begin failures++; $display("t=%0d waveguide contents wrong", t); end
      if (collision !== 1'b0) begin failures++; $display("false collision"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
