// llm_sub_ubank - one half of a ubank: cell array and row buffer.
//
// A ubank is split into two sub-ubanks so that an activation opens only
// half a ubank row: 4 mats of 512 columns = 2048 bits (256 bytes). The row
// address is {subarray id, row within the subarray}; the global row decoder
// is the array index. act copies the addressed row into the row buffer
// (the global sense amplifiers); col_wr merges a 64-byte column into the
// row buffer; pre writes the row buffer back to the open row (closed-page
// restore). rd_data is the 64-byte column col of the row buffer, available
// combinationally. The cell array is an ordinary memory array; sense
// amplifiers, wordline-select latches and column decoders are not
// modelled as circuits. Storage depth (SUBARRAYS x 512 rows) is this
// design's choice; the row width follows the published mat organisation.
module llm_sub_ubank #(
  parameter int unsigned ROWS      = 1024,  // SUBARRAYS x 512
  parameter int unsigned ROW_BITS  = 2048,  // 4 mats x 512 columns
  parameter int unsigned LINE_BITS = 512,
  localparam int unsigned RW = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int unsigned NCOL = ROW_BITS / LINE_BITS,
  localparam int unsigned CW = (NCOL > 1) ? $clog2(NCOL) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 act,
  input  logic [RW-1:0]        act_row,
  input  logic [CW-1:0]        col,
  input  logic                 col_wr,
  input  logic [LINE_BITS-1:0] wr_data,
  input  logic                 pre,
  output logic [LINE_BITS-1:0] rd_data
);
  logic [ROW_BITS-1:0] cells [ROWS];
  logic [ROW_BITS-1:0] row_buf;
  logic [RW-1:0]       open_row;

  always_ff @(posedge clk) begin
    if (act) row_buf <= cells[act_row];
    else if (col_wr) row_buf[int'(col)*LINE_BITS +: LINE_BITS] <= wr_data;
    if (pre) cells[open_row] <= row_buf;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   open_row <= '0;
    else if (act) open_row <= act_row;
  end

  assign rd_data = row_buf[int'(col)*LINE_BITS +: LINE_BITS];

  initial assert (ROW_BITS % LINE_BITS == 0)
    else $error("llm_sub_ubank: ROW_BITS must be a multiple of LINE_BITS");
endmodule
