// tb_l1_integrator: drives random channel-IC sums and checks the module sum
// (one clock), the windowed integral after shift and 12-bit saturation
// (three internal clocks plus one global clock), for several window lengths
// and shifts.  The global clock runs at the same rate with a phase offset.
module tb_l1_integrator;
  logic clk = 0, clk_glb = 0, rst_n = 0;
  logic [2:0][17:0] ic_sum;
  logic [3:0]       length;
  logic [4:0]       shift;
  logic [19:0]      module_sum;
  logic [11:0]      trig_data;
  logic             saturated;
  int checks = 0, failures = 0, n_sat = 0;
  int hist [$];
  int vs [4000];

  l1_integrator dut (.*);
  always #5 clk = ~clk;
  initial begin #3; forever #5 clk_glb = ~clk_glb; end

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
    ic_sum = '0; length = 4; shift = 3;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      int s, acc, v;
      if (n % 500 == 0) begin
        length = 4'(1 + (n / 500) % 8);
        shift  = 5'((n / 500) % 6);
      end
      @(negedge clk);
      s = 0;
      for (int i = 0; i < 3; i++) begin
        ic_sum[i] = 18'($urandom_range(0, (n % 1000 < 500) ? 4000 : 200000));
        s += int'(ic_sum[i]);
      end
      hist.push_front(s);
      if (hist.size() > 8) void'(hist.pop_back());
      @(posedge clk); #1;
      check(module_sum == 20'(s), "module sum");
      acc = 0;
      for (int i = 0; i < 8; i++) if (i < int'(length) && i < hist.size()) acc += hist[i];
      v = acc >> shift;
      if (v > 4095) v = 4095;
      vs[n] = v;
      // buffer written two internal clocks later, global edge 3 ns after
      #3;
      if (n > 12 && (n % 500) > 12) begin
        check(trig_data == 12'(vs[n-2]), $sformatf("trigger word n=%0d got %0d exp %0d", n, trig_data, vs[n-2]));
        if (vs[n-2] == 4095) n_sat++;
      end
    end
    repeat (5) @(posedge clk);
    check(n_sat > 0, "saturation exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
