// psa_adc: digital part of the parallel successive-approximation A/D
// converter (PSA-ADC).
//
// K+N identical successive-approximation channels work on successive
// samples, each skewed by one clock from the previous one.  A channel spends
// K clocks sampling the input on its passive S/H while its comparator
// auto-zeroes (sample and azero high), then N clocks on the binary search:
// in each it drives its DAC with the bits found so far plus a trial bit, and
// keeps the trial bit if the comparator reports the held input at or above
// the DAC level.  When the last bit is decided the code goes to the output
// register.  With K+N channels one code leaves every clock.  The sampling of
// a channel ends with the last clock of its K-clock preparation.
// The channel count, the skewed timing, the shift-register search, the DAC
// fed from common references and the shared output register follow the
// document; K = 2 follows from its count of 12 comparators for 10 bits.  The
// comparators, S/H and reference ladder are analog and outside this module:
// dac_code is the code the two-step reference switches select (upper half
// of the bits on the coarse ladder, lower half on the fine one).
//
// Timing: dout is registered N clocks after the clock edge that ends the
// sampling of its channel, one code per clock; dout_valid rises
// once the first channel has finished a full conversion after reset.
module psa_adc #(
  parameter int N = 10,             // bits
  parameter int K = 2,              // preparation (auto-zero) clocks
  parameter int NSUB = K + N        // SA channels
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [NSUB-1:0]           comp,      // held input >= DAC level
  output logic [NSUB-1:0]           sample,    // S/H switch closed
  output logic [NSUB-1:0]           azero,     // comparator auto-zero
  output logic [NSUB-1:0][N-1:0]    dac_code,
  output logic [N-1:0]              dout,
  output logic                      dout_valid,
  output logic [$clog2(NSUB)-1:0]   dout_sub   // channel that produced dout
);
  localparam int SW = $clog2(NSUB);

  logic [SW-1:0]            ph;      // global phase: channel 0 step
  logic [NSUB-1:0][N-1:0]   res;     // bits found so far
  logic [NSUB-1:0]          armed;   // has been through a preparation
  logic [NSUB-1:0][SW-1:0]  step;

  always_comb begin
    for (int j = 0; j < NSUB; j++) begin
      int s;
      s = int'(ph) - j;
      if (s < 0) s += NSUB;
      step[j]     = SW'(s);
      sample[j]   = (s < K);
      azero[j]    = (s < K);
      dac_code[j] = (s >= K) ? (res[j] | (N'(1) << (N - 1 - (s - K)))) : '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph         <= '0;
      res        <= '0;
      armed      <= '0;
      dout       <= '0;
      dout_valid <= 1'b0;
      dout_sub   <= '0;
    end else begin
      ph <= (ph == SW'(NSUB - 1)) ? '0 : ph + 1'b1;
      dout_valid <= 1'b0;
      for (int j = 0; j < NSUB; j++) begin
        if (int'(step[j]) < K) begin
          res[j] <= '0;
          if (step[j] == '0) armed[j] <= 1'b1;
        end else begin
          if (comp[j]) res[j] <= dac_code[j];
          if (int'(step[j]) == NSUB - 1) begin
            dout       <= comp[j] ? dac_code[j] : res[j];
            dout_valid <= armed[j];
            dout_sub   <= SW'(j);
          end
        end
      end
    end
  end
endmodule
