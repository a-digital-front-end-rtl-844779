// tb_cfd: drives the discriminator with a stream of pulses of random
// amplitude and spacing on a small noisy baseline, some close enough to pile
// up, and compares the three flags each clock with a reference model of the
// constant-fraction rule (zero crossing of s(t-D) - F*s(t)/16, amplitude at
// or above the veto level), the two pile-up windows and the output delay.
// It counts pulses, vetoed crossings, mild and severe pile-ups and fails if
// any of them never happened.
module tb_cfd;
  import fermi_pkg::*;
  localparam int NS = 6000;
  logic clk = 0, rst_n = 0;
  logic [19:0] s_in, veto;
  logic [1:0]  delay_sel;
  logic [3:0]  frac;
  logic [5:0]  win_short, win_long;
  logic [2:0]  align;
  cfd_flags_t  flags;
  int checks = 0, failures = 0;
  int s [NS];
  int cval [NS];
  cfd_flags_t ref_f [NS];
  int n_pulse = 0, n_veto = 0, n_mild = 0, n_severe = 0;

  cfd dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (NS + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real shape [9] = '{0.3, 0.8, 1.0, 0.8, 0.55, 0.35, 0.2, 0.1, 0.05};
    int last = -1000, D, F, nxt;
    // build the input: pulses at random gaps of 3..40 samples
    for (int i = 0; i < NS; i++) s[i] = $urandom_range(0, 40);
    nxt = 20;
    while (nxt < NS - 20) begin
      int a;
      a = $urandom_range(300, 60000);
      for (int k = 0; k < 9; k++) s[nxt + k] += int'(a * shape[k]);
      nxt += $urandom_range(3, 40);
    end
    for (int i = 0; i < NS; i++) if (s[i] > 20'hFFFFF) s[i] = 20'hFFFFF;
    veto = 20'd2000; win_short = 6'd5; win_long = 6'd14;
    delay_sel = 2'd2; frac = 4'd6; align = 3'd2;
    D = 2; F = 6;
    // reference model
    for (int n = 0; n < NS; n++) begin
      int sd;
      sd = (n >= D) ? s[n-D] : 0;
      cval[n] = sd - ((s[n] * F) >> 4);
    end
    for (int n = 0; n < NS; n++) begin
      bit det;
      det = n >= 1 && cval[n-1] < 0 && cval[n] >= 0 && s[n] >= int'(veto);
      if (n >= 1 && cval[n-1] < 0 && cval[n] >= 0 && s[n] < int'(veto)) n_veto++;
      ref_f[n].pulse  = det;
      ref_f[n].mild   = det && (n - last) <= int'(win_long);
      ref_f[n].severe = det && (n - last) <= int'(win_short);
      if (det) last = n;
    end
    s_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < NS; n++) begin
      @(negedge clk);
      s_in = 20'(s[n]);
      @(posedge clk); #1;
      // sample n enters at edge n; its flags appear after edge n+2+align
      if (n >= 3 + int'(align)) begin
        int m;
        m = n - 2 - int'(align);
        checks++;
        if (flags !== ref_f[m]) begin
          failures++;
          $display("FAIL sample %0d got %b exp %b", m, flags, ref_f[m]);
        end
        n_pulse  += int'(flags.pulse);
        n_mild   += int'(flags.mild);
        n_severe += int'(flags.severe);
      end
    end
    $display("pulses=%0d vetoed=%0d mild=%0d severe=%0d", n_pulse, n_veto, n_mild, n_severe);
    checks += 4;
    if (n_pulse == 0)  begin failures++; $display("FAIL no pulse"); end
    if (n_veto == 0)   begin failures++; $display("FAIL no veto"); end
    if (n_mild == 0)   begin failures++; $display("FAIL no mild pile-up"); end
    if (n_severe == 0) begin failures++; $display("FAIL no severe pile-up"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
