// llm_serdes - serializer/deserializer between a 64-byte line and one
// wavelength lane.
//
// One shift register serves both directions. load writes a whole line;
// each cycle with shift = 1 the lowest LANE_BITS leave on lane_out and
// lane_in enters at the top, so after LINE_BITS/LANE_BITS shifts the line
// has been sent lowest chunk first, or a line received lowest chunk first
// sits in data. With the published 32 Gb/s per wavelength and a 2 GHz
// clock a lane carries 16 bits per cycle and a line takes 32 cycles, which
// is tBURST = 16 ns. The SerDes' own pipeline latency is not modelled.
module llm_serdes #(
  parameter int unsigned LINE_BITS = 512,
  parameter int unsigned LANE_BITS = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 load,
  input  logic [LINE_BITS-1:0] load_data,
  input  logic                 shift,
  input  logic [LANE_BITS-1:0] lane_in,
  output logic [LANE_BITS-1:0] lane_out,
  output logic [LINE_BITS-1:0] data
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     data <= '0;
    else if (load)  data <= load_data;
    else if (shift) data <= {lane_in, data[LINE_BITS-1:LANE_BITS]};
  end

  assign lane_out = data[LANE_BITS-1:0];

  initial assert (LINE_BITS % LANE_BITS == 0)
    else $error("llm_serdes: LINE_BITS must be a multiple of LANE_BITS");
endmodule
