// llm_rr_arbiter - round-robin arbiter.
//
// Each cycle it grants the first requesting input at or after the pointer,
// searching upwards and wrapping. When the grant is taken (advance = 1) the
// pointer moves to the input after the granted one, so every requestor is
// served within N grants. The grant is combinational from req; the pointer
// is the only state and resets to input 0.
module llm_rr_arbiter #(
  parameter int unsigned N = 16,
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  req,
  input  logic          advance,
  output logic [N-1:0]  gnt,
  output logic [IW-1:0] gnt_idx,
  output logic          gnt_valid
);
  logic [IW-1:0] ptr;

  always_comb begin
    gnt       = '0;
    gnt_idx   = '0;
    gnt_valid = 1'b0;
    for (int i = 0; i < int'(N); i++) begin
      int unsigned j;
      j = (int'(ptr) + i) % N;
      if (!gnt_valid && req[j]) begin
        gnt_valid = 1'b1;
        gnt_idx   = IW'(j);
        gnt[j]    = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ptr <= '0;
    else if (advance && gnt_valid)
      ptr <= (int'(gnt_idx) == int'(N) - 1) ? '0 : gnt_idx + 1'b1;
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));
endmodule
