// llm_cmd_queue - single-entry command queue.
//
// The memory controller keeps one of these per requestor, so a bursty
// requestor can never fill a shared queue and block the others. It holds
// only the electrical command (the data waits at the requestor). An entry
// written with enq is visible as valid/data from the next cycle; deq
// empties it. The requestor's credit scheme guarantees that nothing is
// enqueued into a full entry; an assertion checks it. A dequeue and an
// enqueue in the same cycle leave the new entry in place.
module llm_cmd_queue #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         enq,
  input  logic [W-1:0] enq_data,
  input  logic         deq,
  output logic         valid,
  output logic [W-1:0] data
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= 1'b0;
      data  <= '0;
    end else if (enq) begin
      valid <= 1'b1;
      data  <= enq_data;
    end else if (deq) begin
      valid <= 1'b0;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) enq |-> (!valid || deq))
    else $error("llm_cmd_queue: enqueue into a full single-entry queue");
endmodule
