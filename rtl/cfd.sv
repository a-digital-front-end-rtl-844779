// cfd: digital constant-fraction discriminator with pulse amplitude veto and
// pile-up detection, working on the module-wide energy sum.
//
// The sum runs through a chain of registers; a multiplexer picks the delayed
// copy s(t-D), D = 1..3, and a multiplier scales the undelayed sum by the
// programmable fraction F/16.  Their difference c = s(t-D) - F*s(t)/16 is
// negative on the leading edge of a pulse and turns non-negative at a fixed
// fraction of its height, independent of amplitude.  A pulse is flagged when
// the registered c was negative, the current c is not, and the sum is at or
// above the programmed veto level.  Each flag sets two "pulse detected"
// windows that expire after programmed numbers of clocks; a new pulse while
// the long window is open sets the mild pile-up flag, while the short one is
// open the severe pile-up flag.  The three flags are delayed by a programmed
// number of clocks to line them up with the trigger data.
// Delay taps, multiplier, zero comparisons, veto comparison, two windows and
// the output delay come from the document; the form of c, the sense of the
// two zero comparisons and the widths are this design's choices.
//
// Timing: a flag leaves align+3 clocks after the sample that completes the
// zero crossing entered.
module cfd
  import fermi_pkg::*;
#(
  parameter int SW      = LIN_BITS + 4,   // width of the module sum
  parameter int WIN_W   = 6,              // window counters
  parameter int ALIGN_MAX = 7
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [SW-1:0]    s_in,
  input  logic [1:0]       delay_sel,  // D = 1..3 (0 taken as 1)
  input  logic [3:0]       frac,       // F, fraction F/16
  input  logic [SW-1:0]    veto,       // minimum pulse amplitude
  input  logic [WIN_W-1:0] win_short,  // severe pile-up window, clocks
  input  logic [WIN_W-1:0] win_long,   // mild pile-up window, clocks
  input  logic [2:0]       align,      // output delay, clocks
  output cfd_flags_t       flags
);
  logic [SW-1:0]          s0, d1, d2, d3, amp_q;
  logic [SW-1:0]          tap;
  logic [SW+4-1:0]        prod;
  logic signed [SW+1:0]   c, c_q, c_prev;
  logic                   detect;
  logic [WIN_W-1:0]       cnt_s, cnt_l;
  cfd_flags_t             f_now;
  cfd_flags_t             dly [ALIGN_MAX+1];

  always_comb begin
    unique case (delay_sel)
      2'd2:    tap = d2;
      2'd3:    tap = d3;
      default: tap = d1;
    endcase
    prod = s0 * frac;
    c    = $signed({2'b00, tap}) - $signed({2'b00, prod[SW+3:4]});
  end

  assign detect = (c_prev < 0) && (c_q >= 0) && (amp_q >= veto);

  always_comb begin
    f_now.pulse  = detect;
    f_now.mild   = detect && (cnt_l != '0);
    f_now.severe = detect && (cnt_s != '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {s0, d1, d2, d3, amp_q} <= '0;
      c_q    <= '0;
      c_prev <= '0;
      cnt_s  <= '0;
      cnt_l  <= '0;
      for (int i = 0; i <= ALIGN_MAX; i++) dly[i] <= '0;
    end else begin
      s0     <= s_in;
      d1     <= s0;
      d2     <= d1;
      d3     <= d2;
      c_q    <= c;
      amp_q  <= s0;
      c_prev <= c_q;
      if (detect) begin
        cnt_s <= win_short;
        cnt_l <= win_long;
      end else begin
        if (cnt_s != '0) cnt_s <= cnt_s - 1'b1;
        if (cnt_l != '0) cnt_l <= cnt_l - 1'b1;
      end
      dly[0] <= f_now;
      for (int i = 1; i <= ALIGN_MAX; i++) dly[i] <= dly[i-1];
    end
  end

  assign flags = dly[align];
endmodule
