// digital_filter: inner product of a weight vector and the samples of a time
// frame, in bit-skewed form, with a concurrent modulo-3 check.
//
// Two banks of up to NMAX signed weights are held in a coefficient memory,
// each weight stored with its residue modulo 3.  `start` selects a bank and
// starts a frame; each valid sample meets the next weight.  The multiplier
// is a pipelined array of carry-save rows: the sample word travels down the
// rows in parallel, row k adds it (shifted by k) when weight bit k is set,
// and every row is one clock.  Bit k of the product is final after row k, so
// the products leave in skew form, bit k k clocks after bit 0, and the rows
// beyond the weight width resolve the remaining carries one bit per row.
// The accumulator takes them in the same form: each bit slice is a full
// adder with its sum bit and carry held in flip-flops, so a carry moves one
// slice up per clock and meets the bits of the same product there.  Carries
// propagate in space, as in a parallel adder, and in time, as in a serial
// one; no carry chain is longer than one bit.  The frame's clear and
// last-sample marks travel along the same diagonal, and the result bits are
// de-skewed by delay lines of RW-1-j clocks and leave together.  In parallel
// the residues of weights and samples are multiplied and added modulo 3; the
// residue of the result must equal it, and err reports a mismatch (a fault
// in the weights, the multiplier or the accumulator).
// Weights and residues from a dedicated memory, two banks, the pipelined
// skew-output multiplier with parallel samples, the skew-input accumulator,
// the modulo-3 check and the latency rule follow the document.  Carry-save
// rows with the weight sign bit handled by subtraction, 8-bit signed weights
// and NMAX = 16 are this design's choices.  For the latency rule
// L = n_bits + log2(N), n_bits is read as the width of the products.
//
// Timing: one sample per clock.  The result leaves RW = XW + WW + log2(NMAX)
// clocks after the last sample is taken: the product width plus the log2 of
// the number of samples.  A new frame may start the clock after the last
// sample of the previous one.
module digital_filter #(
  parameter int XW   = 16,                    // sample bits (unsigned)
  parameter int WW   = 8,                     // weight bits (signed)
  parameter int NMAX = 16,                    // samples per frame
  parameter int RW   = XW + WW + $clog2(NMAX)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // coefficient memory write port
  input  logic                    cw_en,
  input  logic                    cw_bank,
  input  logic [$clog2(NMAX)-1:0] cw_idx,
  input  logic signed [WW-1:0]    cw_weight,
  input  logic [1:0]              cw_res,     // weight modulo 3
  // sample stream
  input  logic                    start,
  input  logic                    bank,
  input  logic                    x_valid,
  input  logic [XW-1:0]           x,
  input  logic                    x_last,
  output logic                    y_valid,
  output logic signed [RW-1:0]    y,
  output logic                    err
);
  logic signed [WW-1:0] wmem [2][NMAX];
  logic [1:0]            rmem [2][NMAX];

  logic                    bank_q;
  logic [$clog2(NMAX)-1:0] idx;
  logic [1:0]              res, res_n;
  logic signed [WW-1:0]    w;
  logic [1:0]              rw;
  logic                    take, last;

  always_ff @(posedge clk)
    if (cw_en) begin
      wmem[cw_bank][cw_idx] <= cw_weight;
      rmem[cw_bank][cw_idx] <= cw_res;
    end

  assign w    = wmem[bank_q][idx];
  assign rw   = rmem[bank_q][idx];
  assign take = x_valid && !start;
  assign last = take && x_last;

  always_comb begin
    logic [1:0] rx;
    rx    = fermi_pkg::mod3(longint'(x));
    res_n = fermi_pkg::mod3(longint'(res) + longint'(rw) * longint'(rx));
  end

  // word-level control and residue
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bank_q <= 1'b0;
      idx    <= '0;
      res    <= '0;
    end else if (start) begin
      bank_q <= bank;
      idx    <= '0;
      res    <= '0;
    end else if (x_valid) begin
      idx <= idx + 1'b1;
      res <= res_n;
    end
  end

  // Multiplier array, one carry-save row per product bit.  Row k holds the
  // sample, the weight and the partial product in sum (ms) and carry (mc)
  // form, all k clocks after the sample entered.  Rows k < WW add the
  // sample shifted by k when weight bit k is set (the sign bit subtracts:
  // inverted sample plus one, the one entering row 0 as a carry).  No later
  // row touches bit k, so bit k of the row's new sum is final and leaves to
  // accumulator slice k: the product comes out in skew form.
  logic [RW-1:0] ms [RW], mc [RW];
  logic [XW-1:0] mx [RW];
  logic [WW-1:0] mw [RW];
  logic [RW-1:0] mv;
  logic [RW-1:0] ns [RW], nc [RW];
  logic [RW-1:0] pbit;

  assign ms[0] = '0;
  assign mc[0] = RW'(take && w[WW-1]) << (WW - 1);
  assign mx[0] = x;
  assign mw[0] = w;
  assign mv[0] = take;

  always_comb
    for (int k = 0; k < RW; k++) begin
      logic [RW-1:0] pp;
      pp = '0;
      if (mv[k] && k < WW - 1 && mw[k][k])
        pp = RW'(mx[k]) << k;
      else if (mv[k] && k == WW - 1 && mw[k][k])
        pp = RW'(~((RW - WW + 1)'(mx[k]))) << (WW - 1);
      ns[k]   = ms[k] ^ mc[k] ^ pp;
      nc[k]   = ((ms[k] & mc[k]) | (ms[k] & pp) | (mc[k] & pp)) << 1;
      pbit[k] = ns[k][k];
    end

  logic [RW-1:0] clr_d, last_d;
  logic [RW-1:0] acc, cy;              // sum and carry register of each slice
  logic [RW-1:0] ad [RW];              // de-skew lines of the sum bits
  logic [1:0]    rp [RW];
  logic          yv;

  assign clr_d[0]  = start;
  assign last_d[0] = last;
  assign ad[0]     = acc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 1; i < RW; i++) begin
        ms[i] <= '0; mc[i] <= '0; mx[i] <= '0; mw[i] <= '0; ad[i] <= '0;
      end
      for (int i = 0; i < RW; i++) rp[i] <= '0;
      mv[RW-1:1]     <= '0;
      clr_d[RW-1:1]  <= '0;
      last_d[RW-1:1] <= '0;
      acc <= '0;
      cy  <= '0;
      yv  <= 1'b0;
    end else begin
      for (int i = 1; i < RW; i++) begin
        ms[i]     <= ns[i-1];
        mc[i]     <= nc[i-1];
        mx[i]     <= mx[i-1];
        mw[i]     <= mw[i-1];
        mv[i]     <= mv[i-1];
        ad[i]     <= ad[i-1];
        clr_d[i]  <= clr_d[i-1];
        last_d[i] <= last_d[i-1];
      end
      // accumulator slices: full adder of the held sum bit, the product bit
      // from multiplier row j and the carry the slice below produced one
      // clock earlier
      for (int j = 0; j < RW; j++) begin
        logic a, b, ci;
        a  = clr_d[j] ? 1'b0 : acc[j];
        b  = pbit[j];
        ci = (j == 0) ? 1'b0 : cy[j-1];
        acc[j] <= a ^ b ^ ci;
        cy[j]  <= (a & b) | (a & ci) | (b & ci);
      end
      rp[0] <= res_n;
      for (int i = 1; i < RW; i++) rp[i] <= rp[i-1];
      yv <= last_d[RW-1];
    end
  end

  always_comb
    for (int j = 0; j < RW; j++) y[j] = ad[RW-1-j][j];

  assign y_valid = yv;
  assign err     = yv && (fermi_pkg::mod3(longint'(y)) != rp[RW-1]);
endmodule
