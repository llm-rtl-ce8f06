// llm_awgr - behavioural model of an N x N Arrayed Waveguide Grating Router.
//
// The AWGR is a passive optical part; this model reproduces only its
// routing function, which is a fixed permutation of wavelength lanes: the
// light of wavelength w entering input port i leaves on output port
// (i + w) mod N, so the N wavelengths of one input are spread over all N
// outputs, one per output, and every output receives each wavelength from
// exactly one input. The cyclic form of the permutation is this design's
// choice; the published property is only that each wavelength of an input
// goes to a unique output. With REVERSE = 1 the same device is used with
// the light entering on the output side: wavelength w entering port o
// leaves on port (o - w) mod N. Lanes are indexed [port][wavelength]; the
// model is pure wiring, with no delay.
module llm_awgr #(
  parameter int unsigned N         = 64,
  parameter int unsigned LANE_BITS = 16,
  parameter bit          REVERSE   = 1'b0
) (
  input  logic [N-1:0][N-1:0][LANE_BITS-1:0] in_wg,
  output logic [N-1:0][N-1:0][LANE_BITS-1:0] out_wg
);
  for (genvar i = 0; i < N; i++) begin : g_in
    for (genvar w = 0; w < N; w++) begin : g_w
      localparam int unsigned O = REVERSE ? ((i + N - w) % N) : ((i + w) % N);
      assign out_wg[O][w] = in_wg[i][w];
    end
  end
endmodule
