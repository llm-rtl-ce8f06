// tb_llm_awgr - self-checking test of the AWGR routing model: every
// (input port, wavelength) lane must appear, alone, on output port
// (port + wavelength) mod N, and in reverse use on (port - wavelength) mod N.
module tb_llm_awgr;
  localparam int N = 8, LB = 16;
  logic [N-1:0][N-1:0][LB-1:0] in_wg, out_f, out_r;
  int checks = 0, failures = 0;

  llm_awgr #(.N(N), .LANE_BITS(LB), .REVERSE(1'b0)) u_f (.in_wg, .out_wg(out_f));
  llm_awgr #(.N(N), .LANE_BITS(LB), .REVERSE(1'b1)) u_r (.in_wg, .out_wg(out_r));

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int t = 0; t < 20; t++) begin
      for (int i = 0; i < N; i++) for (int w = 0; w < N; w++) in_wg[i][w] = LB'($urandom);
      #1;
      for (int i = 0; i < N; i++) for (int w = 0; w < N; w++) begin
        checks += 2;
        if (out_f[(i + w) % N][w] !== in_wg[i][w]) begin failures++; $display("fwd %0d/%0d", i, w); end
        if (out_r[(i + N - w) % N][w] !== in_wg[i][w]) begin failures++; $display("rev %0d/%0d", i, w); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
