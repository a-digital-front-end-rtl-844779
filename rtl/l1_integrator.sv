// l1_integrator: first level trigger word of one FERMI module.
//
// The three channel-IC sums are added to the module sum (second summation
// step).  The module sum is integrated by a digital filter whose coefficients
// are 1 for the newest `length` samples and 0 for the rest, scaled by a
// programmable right shift and limited to 12 bits.  The result is double
// buffered: a register in the internal clock domain, then a register in the
// global clock domain, whose phase differs by the programmable clock delay.
// All of that follows the document.  The maximum window of 8 samples and
// saturation (instead of dropping high bits) when the word overflows 12 bits
// are this design's choices.
//
// Timing: module sum one clock after the inputs, integral one clock later,
// shifted and limited word one clock later in the internal domain, then one
// global clock.  A new window length applies at once.
module l1_integrator
  import fermi_pkg::*;
#(
  parameter int NIN     = N_IC,
  parameter int IW      = LIN_BITS + 2,
  parameter int MAX_LEN = 8,
  parameter int OW      = TRIG_BITS,
  parameter int MW      = IW + $clog2(NIN + 1),            // module sum
  parameter int AW      = MW + $clog2(MAX_LEN + 1)         // integral
) (
  input  logic                  clk,       // internal clock
  input  logic                  clk_glb,   // global (trigger) clock
  input  logic                  rst_n,
  input  logic [NIN-1:0][IW-1:0] ic_sum,
  input  logic [$clog2(MAX_LEN+1)-1:0] length,  // 1..MAX_LEN samples
  input  logic [4:0]            shift,
  output logic [MW-1:0]         module_sum,
  output logic [OW-1:0]         trig_data,  // global clock domain
  output logic                  saturated   // internal domain, per sample
);
  logic [MAX_LEN-1:0][MW-1:0] hist;
  logic [AW-1:0]              integ;
  logic [AW-1:0]              shifted;
  logic [OW-1:0]              buf_int;

  logic [MW-1:0] module_sum_c;
  always_comb begin
    module_sum_c = '0;
    for (int i = 0; i < NIN; i++) module_sum_c += MW'(ic_sum[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      module_sum <= '0;
      hist       <= '0;
    end else begin
      module_sum <= module_sum_c;
      hist <= {hist[MAX_LEN-2:0], module_sum_c};
    end
  end

  // hist[0] equals module_sum (the newest sample); the window covers
  // hist[0 .. length-1].
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) integ <= '0;
    else begin
      logic [AW-1:0] acc;
      acc = '0;
      for (int i = 0; i < MAX_LEN; i++)
        if (i < int'(length)) acc += AW'(hist[i]);
      integ <= acc;
    end
  end

  assign shifted = integ >> shift;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_int   <= '0;
      saturated <= 1'b0;
    end else if (shifted > AW'({OW{1'b1}})) begin
      buf_int   <= '1;
      saturated <= 1'b1;
    end else begin
      buf_int   <= OW'(shifted);
      saturated <= 1'b0;
    end
  end

  always_ff @(posedge clk_glb or negedge rst_n) begin
    if (!rst_n) trig_data <= '0;
    else        trig_data <= buf_int;
  end
endmodule
