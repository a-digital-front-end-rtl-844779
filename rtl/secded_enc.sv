// secded_enc: Hamming single-error-correcting, double-error-detecting encoder.
//
// The document protects both the stored data (54 bits to 61) and the memory
// pointers with a code that corrects single errors and detects double ones;
// it names no particular code.  This design uses the extended Hamming code:
// code bit 0 is the overall parity, bits 1..K+P are the Hamming positions,
// check bits sit at the power-of-two positions and data bits fill the others
// in ascending order.  Purely combinational.
module secded_enc #(
  parameter int K = 54,
  parameter int P = fermi_pkg::hamming_bits(K)
) (
  input  logic [K-1:0] data,
  output logic [K+P:0] code
);
  always_comb begin
    int d;
    code = '0;
    d = 0;
    for (int pos = 1; pos <= K + P; pos++) begin
      if ((pos & (pos - 1)) != 0) begin
        code[pos] = data[d];
        d++;
      end
    end
    for (int i = 0; i < P; i++) begin
      for (int pos = 1; pos <= K + P; pos++) begin
        if ((pos & (1 << i)) != 0 && pos != (1 << i)) code[1 << i] ^= code[pos];
      end
    end
    code[0] = ^code[K+P:1];
  end
endmodule
