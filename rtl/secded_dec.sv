// secded_dec: decoder of the extended Hamming code of secded_enc.
//
// The syndrome is the XOR of the positions of all set code bits.  A non-zero
// syndrome with wrong overall parity is a single error at that position and
// is corrected; a non-zero syndrome with correct parity is a double error,
// reported but not corrected; a zero syndrome with wrong parity is an error
// in the parity bit itself and leaves the data intact.  Purely combinational.
module secded_dec #(
  parameter int K = 54,
  parameter int P = fermi_pkg::hamming_bits(K)
) (
  input  logic [K+P:0] code,
  output logic [K-1:0] data,
  output logic         single_err,  // one error, corrected
  output logic         double_err   // two errors, data not to be trusted
);
  logic [K+P:0] fixed;
  logic [P-1:0] syn;
  logic         par;

  always_comb begin
    int d;
    syn = '0;
    for (int pos = 1; pos <= K + P; pos++)
      if (code[pos]) syn ^= P'(pos);
    par        = ^code;
    single_err = par;
    double_err = (syn != '0) && !par;
    fixed      = code;
    if (par && syn != '0 && int'(syn) <= K + P) fixed[syn] = ~code[syn];
    data = '0;
    d    = 0;
    for (int pos = 1; pos <= K + P; pos++) begin
      if ((pos & (pos - 1)) != 0) begin
        data[d] = fixed[pos];
        d++;
      end
    end
  end
endmodule
