// llm_faw_limiter - four-activation-window style activation limiter.
//
// Counts the activations issued in the last T_FAW cycles and deasserts
// allow when one more activation would exceed FAW_ACTS in any window of
// T_FAW cycles. A shift register records which of the previous T_FAW-1
// cycles issued an activation; cnt is its population count. With one
// command per cycle and the published 12 ns / 32 activations, the limit
// (24 possible commands per window) is never reached, as the design
// intends; it becomes active only when the parameters are tightened.
module llm_faw_limiter #(
  parameter int unsigned T_FAW    = 24,
  parameter int unsigned FAW_ACTS = 32,
  localparam int unsigned CW = $clog2(T_FAW + 1)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic act,
  output logic allow
);
  logic [T_FAW-2:0] hist;   // hist[0] = previous cycle
  logic [CW-1:0]    cnt;    // activations in hist

  assign allow = (32'(cnt) < FAW_ACTS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hist <= '0;
      cnt  <= '0;
    end else begin
      hist <= {hist[T_FAW-3:0], act};
      cnt  <= cnt + CW'(act) - CW'(hist[T_FAW-2]);
    end
  end

  initial assert (T_FAW >= 3) else $error("llm_faw_limiter: T_FAW must be at least 3");
  assert property (@(posedge clk) disable iff (!rst_n) act |-> allow)
    else $error("llm_faw_limiter: activation beyond the tFAW limit");
endmodule
