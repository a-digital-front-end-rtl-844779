// crossover_switch: maps the four channels of a channel IC onto three lanes.
//
// Each channel IC carries four identical channels of which three are needed.
// The switch leaves one channel, chosen by the controller, out of the
// datapath and shifts the channels above it down by one lane, so that lane k
// carries channel k below the left-out channel and channel k+1 above it.
// The document shows the principle (several such switches divide a channel
// into parts that are reconfigured independently); the shift mapping is this
// design's choice.  Purely combinational.
module crossover_switch #(
  parameter int W     = 18,
  parameter int N_IN  = 4,
  parameter int N_OUT = N_IN - 1
) (
  input  logic [N_IN-1:0][W-1:0]  in,
  input  logic [$clog2(N_IN)-1:0] skip,  // channel left out
  output logic [N_OUT-1:0][W-1:0] out
);
  always_comb
    for (int k = 0; k < N_OUT; k++)
      out[k] = (k < int'(skip)) ? in[k] : in[k+1];
endmodule
