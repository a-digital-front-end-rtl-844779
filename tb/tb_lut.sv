// tb_lut: loads the whole 1024-entry table through the counter and W
// register, then checks normal conversion (with its two-clock latency),
// the emergency bypass and the test-pattern playback, in which the counter
// steps through the table once per clock.
module tb_lut;
  import fermi_pkg::*;
  logic clk = 0, rst_n = 0;
  lut_mode_e mode;
  logic [9:0]  adc_code;
  logic        cnt_clear, wr_strobe;
  logic [15:0] wr_data, lin_out;
  int checks = 0, failures = 0;

  lut dut (.*);
  always #5 clk = ~clk;

  function automatic logic [15:0] f(int i);
    return 16'((i * 61 + 1234) ^ (i << 6));
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [9:0] hist [3];
    mode = LUT_LOAD; adc_code = '0; cnt_clear = 0; wr_strobe = 0; wr_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk) cnt_clear = 1;
    @(negedge clk) cnt_clear = 0;
    for (int i = 0; i < 1024; i++) begin
      wr_strobe = 1; wr_data = f(i);
      @(negedge clk);
    end
    wr_strobe = 0;
    @(negedge clk);
    // normal conversion: output two clocks after the code
    mode = LUT_NORMAL;
    for (int n = 0; n < 300; n++) begin
      adc_code = 10'($urandom);
      hist[2] = hist[1]; hist[1] = hist[0]; hist[0] = adc_code;
      @(posedge clk); #1;
      if (n >= 2) check(lin_out == f(int'(hist[1])), $sformatf("normal n=%0d", n));
      @(negedge clk);
    end
    // bypass
    mode = LUT_BYPASS;
    for (int n = 0; n < 50; n++) begin
      adc_code = 10'($urandom);
      hist[1] = hist[0]; hist[0] = adc_code;
      @(posedge clk); #1;
      if (n >= 3) check(lin_out == 16'(hist[1]), "bypass");
      @(negedge clk);
    end
    // test pattern: clear the counter, then the table plays back in order
    mode = LUT_TEST;
    cnt_clear = 1;
    @(negedge clk) cnt_clear = 0;
    @(posedge clk); #1;
    for (int i = 0; i < 1100; i++) begin
      @(posedge clk); #1;
      check(lin_out == f((i + 1) % 1024), $sformatf("pattern %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
