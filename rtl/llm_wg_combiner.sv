// llm_wg_combiner - behavioural model of the requestor-side write
// waveguides.
//
// Waveguide k runs past every requestor, and each requestor has one
// modulator microring on it. A ring that is on and tuned to wavelength
// lambda puts its 16-bit lane of data on wavelength lambda of waveguide k;
// the waveguide carries all wavelengths side by side (WDM), modelled as the
// OR of the modulated lanes. The memory controllers' scheduling makes sure
// that no two rings modulate the same wavelength of the same waveguide at
// once (that pair names one ubank); collision flags a violation and an
// assertion reports it. Lanes are indexed [waveguide][wavelength].
module llm_wg_combiner #(
  parameter int unsigned NUM_REQ   = 16,
  parameter int unsigned N         = 64,
  parameter int unsigned LANE_BITS = 16,
  localparam int unsigned LW = (N > 1) ? $clog2(N) : 1
) (
  input  logic                                             clk,
  input  logic [NUM_REQ-1:0][N-1:0]                        tx_on,
  input  logic [NUM_REQ-1:0][N-1:0][LW-1:0]                tx_lambda,
  input  logic [NUM_REQ-1:0][N-1:0][LANE_BITS-1:0]         tx_data,
  output logic [N-1:0][N-1:0][LANE_BITS-1:0]               wg,
  output logic                                             collision
);
  logic [N-1:0][N-1:0] lit;

  always_comb begin
    wg        = '0;
    lit       = '0;
    collision = 1'b0;
    for (int r = 0; r < int'(NUM_REQ); r++) begin
      for (int k = 0; k < int'(N); k++) begin
        if (tx_on[r][k]) begin
          if (lit[k][tx_lambda[r][k]]) collision = 1'b1;
          lit[k][tx_lambda[r][k]] = 1'b1;
          wg[k][tx_lambda[r][k]]  = wg[k][tx_lambda[r][k]] | tx_data[r][k];
        end
      end
    end
  end

  assert property (@(posedge clk) !collision)
    else $error("llm_wg_combiner: two rings modulate the same wavelength of one waveguide");
endmodule
