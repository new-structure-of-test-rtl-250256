// bus_test_mux -- the multiplexers between the bus under test and its two
// sources.
//
// Each bus line is driven either by functional data from the sending core
// (test_mode=0) or by the test pattern generator output Y_i (test_mode=1).
// The need for these multiplexers is stated with the generator's published
// cost figures; their form (one 2:1 mux per line, one common select) is
// this design's own. Purely combinational.
module bus_test_mux #(
  parameter int unsigned N = 8
) (
  input  logic         test_mode,
  input  logic [N-1:0] func_data,
  input  logic [N-1:0] tpg_data,
  output logic [N-1:0] bus_out
);

  always_comb begin
    for (int unsigned i = 0; i < N; i++)
      bus_out[i] = test_mode ? tpg_data[i] : func_data[i];
  end

endmodule
