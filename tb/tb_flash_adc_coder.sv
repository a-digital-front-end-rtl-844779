// tb_flash_adc_coder: a behavioural model of the pipeline flash converter
// produces the comparator outputs for a stream of random input levels (one
// per 15-ns slot): the 5-bit flash converter with a random threshold error
// of up to +-15 LSB, the DAC subtraction (offset by half a flash step) and
// the coarse and fine banks of the subranging converter, presented at slots
// 0, 3 and 4 of each sample.  Some thermometer codes carry a bubble.  Every
// output code must equal the input level, one slot after the fine bits, and
// the LSB switch control must select the string of the coarse result.
module tb_flash_adc_coder;
  localparam int NS = 3000;
  logic clk = 0, rst_n = 0;
  logic [30:0] flash_th;
  logic [7:0]  crs_th, fin_th, lsb_sel;
  logic [9:0]  dout;
  logic        overrange;
  int checks = 0, failures = 0, n_corr = 0, n_bubble = 0;
  int v [NS], f [NS], r [NS], m [NS];

  flash_adc_coder dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (NS + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < NS; n++) begin
      int e;
      v[n] = $urandom_range(0, 1023);
      e = $urandom_range(0, 30) - 15;
      f[n] = (v[n] - e) / 32;
      if (v[n] - e < 0) f[n] = 0;
      if (f[n] > 31) f[n] = 31;
      if (f[n] != v[n] / 32) n_corr++;
      r[n] = v[n] - 32 * f[n] + 16;
      if (r[n] < 0 || r[n] > 63) begin   // keep within the correction range
        f[n] = v[n] / 32;
        r[n] = v[n] - 32 * f[n] + 16;
      end
      m[n] = r[n] / 8;
    end
    flash_th = '0; crs_th = '0; fin_th = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < NS; n++) begin
      @(negedge clk);
      flash_th = '0;
      for (int i = 0; i < f[n]; i++) flash_th[i] = 1'b1;
      if (n % 37 == 0 && f[n] > 2 && f[n] < 30) begin
        flash_th[f[n] - 2] = 1'b0; flash_th[f[n]] = 1'b1;   // bubble
        n_bubble++;
      end
      crs_th = '0;
      if (n >= 3) for (int k = 1; k <= 8; k++) crs_th[k-1] = (r[n-3] >= 8 * k);
      fin_th = '0;
      if (n >= 4) for (int k = 1; k <= 8; k++) fin_th[k-1] = (r[n-4] >= 8 * m[n-4] + k);
      @(posedge clk); #1;
      if (n >= 3) check(lsb_sel == (8'b1 << m[n-3]), $sformatf("LSB switch n=%0d", n));
      if (n >= 4) check(dout == 10'(v[n-4]) && !overrange,
                        $sformatf("code n=%0d got %0d exp %0d", n - 4, dout, v[n-4]));
    end
    $display("flash errors corrected=%0d bubbles=%0d", n_corr, n_bubble);
    check(n_corr > 0 && n_bubble > 0, "correction and bubbles exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
