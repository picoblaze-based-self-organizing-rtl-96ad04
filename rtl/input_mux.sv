// input_mux: registered N-to-1 input multiplexer of one neuron.
//
// Each neuron can read any of the external inputs and the output register
// of every neuron in the array, itself included (30 sources for the 2 x 14
// array: 2 inputs + 28 neurons). The controller's port address selects the
// source: port p reads source p, so ports 0..ROWS-1 are the external inputs
// and port ROWS+k is neuron k (layer-major order). A port address with no
// source behind it reads 0.
//
// Timing: one register stage after the multiplexer. The selected value is
// visible on `dout` one clock after `sel`; the controller holds its port
// address for two clocks, so the value is ready when it is sampled.
// The multiplexer size (neurons + inputs) and its registered output follow
// the document; the out-of-range value is this design's choice.
module input_mux
  import solar_pkg::*;
#(
  parameter int unsigned N = 30
) (
  input  logic  clk,
  input  byte_t din [N],
  input  byte_t sel,
  output byte_t dout
);

  byte_t mux;
  always_comb begin
    mux = '0;
    for (int unsigned i = 0; i < N; i++)
      if (sel == DATA_W'(i)) mux = din[i];
  end

  always_ff @(posedge clk) dout <= mux;

endmodule
