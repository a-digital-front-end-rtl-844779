// flash_adc_coder: digital logic of the pipeline flash A/D converter.
//
// The converter first digitises the input with a 5-bit flash converter (m
// bits), subtracts the matching DAC level and converts the residue with a
// two-step subranging flash converter: 3 MSBs from 8 coarse comparators,
// then 3 LSBs from 8 fine comparators on the resistor string the coarse
// result selects.  This module turns the comparator outputs into the 10-bit
// code.  The thermometer outputs of each bank are registered and coded by
// counting their ones, which ignores isolated bubbles.  The coarse result
// drives the LSB switch control (one-hot string select) for the fine
// comparison of the same residue one slot later.  The flash result is kept
// in a delay line until the fine bits of the same sample arrive, and the
// three parts are combined as flash*2^(N-M) + residue - 2^(N-M-1): the flash
// converter carries one bit more than the 4 it needs, so a residue that
// overlaps into the neighbouring flash step is corrected digitally.  The
// result saturates at 0 and 2^N-1.
// The bit split (m = 5, n1 + n2 = 6, one redundant flash bit, 8 + 8
// comparators, separate MSB and LSB coders, synchronisation) follows the
// document; the counting coders, the offset-correction formula and the slot
// offsets of the comparisons (coarse three, fine four 15-ns slots after
// sampling, from the SU&H phase plan) are this design's reading of it.
//
// Timing: flash_th is taken at slot 0 of a sample, crs_th at slot D_C and
// fin_th at slot D_C+1; dout is valid one clock after fin_th is taken.
module flash_adc_coder #(
  parameter int M   = 5,     // flash bits
  parameter int N1  = 3,     // subranging MSBs
  parameter int N2  = 3,     // subranging LSBs
  parameter int N   = 10,    // output bits
  parameter int D_C = 3      // slots from sampling to coarse comparison
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [(1<<M)-2:0]        flash_th,  // 31 flash comparators
  input  logic [(1<<N1)-1:0]       crs_th,    // 8 coarse comparators
  input  logic [(1<<N2)-1:0]       fin_th,    // 8 fine comparators
  output logic [(1<<N1)-1:0]       lsb_sel,   // fine string select
  output logic [N-1:0]             dout,
  output logic                     overrange  // a bank saturated
);
  localparam int DF = D_C + 1;   // flash delay to line up with fine bits

  function automatic int ones(logic [31:0] v);
    int c = 0;
    for (int i = 0; i < 32; i++) c += int'(v[i]);
    return c;
  endfunction

  logic [M-1:0]  fl_pipe [DF];
  logic [N1-1:0] msb_q;
  logic          ov_c;
  int            nc, nf;

  assign nc = ones(32'(crs_th));
  assign nf = ones(32'(fin_th));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DF; i++) fl_pipe[i] <= '0;
      msb_q     <= '0;
      ov_c      <= 1'b0;
      lsb_sel   <= '0;
      dout      <= '0;
      overrange <= 1'b0;
    end else begin
      fl_pipe[0] <= M'(ones(32'(flash_th)));
      for (int i = 1; i < DF; i++) fl_pipe[i] <= fl_pipe[i-1];
      // coarse comparison: MSB coder and LSB switch control
      msb_q   <= (nc > (1 << N1) - 1) ? '1 : N1'(nc);
      ov_c    <= (nc > (1 << N1) - 1);
      lsb_sel <= '0;
      lsb_sel[(nc > (1 << N1) - 1) ? (1 << N1) - 1 : nc] <= 1'b1;
      // fine comparison: LSB coder and combination
      begin
        int lsb, v;
        lsb = (nf > (1 << N2) - 1) ? (1 << N2) - 1 : nf;
        v   = int'(fl_pipe[DF-1]) * (1 << (N - M)) + (int'(msb_q) << N2) + lsb
              - (1 << (N - M - 1));
        if (v < 0)               dout <= '0;
        else if (v > (1 << N) - 1) dout <= '1;
        else                     dout <= N'(v);
        overrange <= ov_c || (nf > (1 << N2) - 1);
      end
    end
  end

endmodule
