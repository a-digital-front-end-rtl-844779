// tb_channel_sum: random samples and enable masks; the registered sum must
// equal the sum of the enabled inputs one clock later, and the modulo-3
// check must stay quiet.
module tb_channel_sum;
  logic clk = 0, rst_n = 0;
  logic [3:0][15:0] in;
  logic [3:0]       enable;
  logic [17:0]      sum;
  logic             err;
  int checks = 0, failures = 0;

  channel_sum dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_q;
    in = '0; enable = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      for (int i = 0; i < 4; i++) in[i] = 16'($urandom);
      enable = 4'($urandom);
      exp_q = 0;
      for (int i = 0; i < 4; i++) if (enable[i]) exp_q += int'(in[i]);
      @(posedge clk); #1;
      checks++;
      if (sum !== 18'(exp_q)) begin failures++; $display("FAIL sum n=%0d", n); end
      @(posedge clk); #1;
      checks++;
      if (err) begin failures++; $display("FAIL residue flag n=%0d", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
