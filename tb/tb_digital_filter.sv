// tb_digital_filter: loads both coefficient banks with random signed
// weights and their residues modulo 3, then runs frames of random length
// (1..16 samples, random bank, random gaps) and checks the inner product
// against a reference sum, its latency (result sampled LAT = 16 + 8 + log2 16 =
// 28 clocks after the last sample) and a quiet residue check.  Finally one
// weight is written with a wrong residue and the check must fire.
module tb_digital_filter;
  localparam int LAT = 28;
  logic clk = 0, rst_n = 0;
  logic        cw_en, cw_bank, start, bank, x_valid, x_last, y_valid, err;
  logic [3:0]  cw_idx;
  logic signed [7:0] cw_weight;
  logic [1:0]  cw_res;
  logic [15:0] x;
  logic signed [27:0] y;
  int checks = 0, failures = 0, n_err = 0;
  int wt [2][16];

  digital_filter dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [1:0] res3(int v);
    int r;
    r = v % 3;
    if (r < 0) r += 3;
    return 2'(r);
  endfunction

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_frame(int len, int b, bit expect_err, bit force3);
    longint sum;
    int k;
    @(negedge clk);
    start = 1; bank = b[0];
    @(negedge clk);
    start = 0;
    sum = 0;
    for (int i = 0; i < len; i++) begin
      while ($urandom_range(0, 3) == 0) begin x_valid = 0; @(negedge clk); end
      x_valid = 1;
      x = 16'($urandom);
      if (force3) x = 16'(3 * $urandom_range(0, 20000) + 1);
      x_last = (i == len - 1);
      sum += longint'(x) * wt[b][i];
      @(negedge clk);
    end
    x_valid = 0; x_last = 0;
    // the last sample was taken at the edge just passed
    k = 0;
    while (!y_valid && k < 100) begin
      @(posedge clk); #1;
      k++;
      if (y_valid) break;
    end
    check(y_valid, "result produced");
    check(k == LAT - 1, $sformatf("latency %0d", k + 1));
    check(y == 28'(sum), $sformatf("inner product got %0d exp %0d", y, sum));
    check(err == expect_err, "residue check");
    if (err) n_err++;
  endtask

  initial begin
    cw_en = 0; cw_bank = 0; cw_idx = 0; cw_weight = 0; cw_res = 0;
    start = 0; bank = 0; x_valid = 0; x = 0; x_last = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < 2; b++)
      for (int i = 0; i < 16; i++) begin
        @(negedge clk);
        wt[b][i] = $urandom_range(0, 255) - 128;
        cw_en = 1; cw_bank = b[0]; cw_idx = 4'(i); cw_weight = 8'(wt[b][i]);
        cw_res = res3(wt[b][i]);
      end
    @(negedge clk) cw_en = 0;
    for (int f = 0; f < 150; f++)
      run_frame($urandom_range(1, 16), $urandom_range(0, 1), 0, 0);
    run_frame(16, 0, 0, 0);
    // corrupt the residue of bank 1, weight 2
    @(negedge clk);
    cw_en = 1; cw_bank = 1; cw_idx = 2; cw_weight = 8'(wt[1][2]);
    cw_res = 2'((res3(wt[1][2]) + 1) % 3);
    @(negedge clk) cw_en = 0;
    run_frame(5, 1, 1, 1);
    check(n_err == 1, "residue error detected once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
