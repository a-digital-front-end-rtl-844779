// channel_sum: first step of the trigger summation, on a channel IC.
//
// The linearised samples of the channels whose enable bit is set are added
// and the sum is registered.  The same sum is formed in modulo-3 arithmetic
// from the residues of the inputs; a mismatch with the residue of the
// registered sum raises err in the following cycle, the concurrent check the
// document proposes for arithmetic parts.  Per-channel enables and the
// two-step summation follow the document; the widths are this design's.
//
// Timing: sum is valid one clock after the inputs, err one clock later.
module channel_sum
  import fermi_pkg::*;
#(
  parameter int N = CH_PER_IC,
  parameter int W = LIN_BITS,
  parameter int SW = W + $clog2(N)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [N-1:0][W-1:0] in,
  input  logic [N-1:0]      enable,
  output logic [SW-1:0]     sum,
  output logic              err     // residue check failed
);
  logic [SW-1:0] s_comb;
  logic [1:0]    r_comb, r_q;

  always_comb begin
    s_comb = '0;
    r_comb = '0;
    for (int i = 0; i < N; i++) begin
      if (enable[i]) begin
        s_comb += SW'(in[i]);
        r_comb  = mod3(longint'(r_comb) + longint'(mod3(longint'(in[i]))));
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum <= '0;
      r_q <= '0;
      err <= 1'b0;
    end else begin
      sum <= s_comb;
      r_q <= r_comb;
      err <= (mod3(longint'(sum)) != r_q);
    end
  end
endmodule
