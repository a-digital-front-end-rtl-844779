// tb_psa_adc: the analog part of each of the 12 SA channels is modelled
// behaviourally: its S/H keeps the input (a new random level every clock)
// while `sample` is high, and its comparator reports held >= DAC code.  Every
// output code must equal the level its channel held, appear exactly N = 10
// clocks after the sampling ended, and one code must leave every clock.
module tb_psa_adc;
  localparam int N = 10, NSUB = 12;
  logic clk = 0, rst_n = 0;
  logic [NSUB-1:0] comp, sample, azero;
  logic [NSUB-1:0][N-1:0] dac_code;
  logic [N-1:0] dout;
  logic dout_valid;
  logic [3:0] dout_sub;
  int checks = 0, failures = 0;
  int vin = 0;
  int held [NSUB];
  int held_edge [NSUB];
  int edge_no = 0, n_out = 0;

  psa_adc dut (.*);
  always #5 clk = ~clk;

  always_comb
    for (int j = 0; j < NSUB; j++) comp[j] = (held[j] >= int'(dac_code[j]));

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int j = 0; j < NSUB; j++) begin held[j] = 0; held_edge[j] = -100; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      vin = $urandom_range(0, 1023);
      if (n % 200 < 3) vin = (n % 2) ? 1023 : 0;   // full-scale edges
      #1;
      for (int j = 0; j < NSUB; j++)
        if (sample[j]) begin held[j] = vin; held_edge[j] = edge_no + 1; end
      @(posedge clk);
      edge_no++;
      #1;
      if (dout_valid) begin
        n_out++;
        checks += 2;
        if (int'(dout) != held[dout_sub]) begin
          failures++;
          $display("FAIL code ch=%0d got %0d exp %0d", dout_sub, dout, held[dout_sub]);
        end
        if (edge_no - held_edge[dout_sub] != N) begin
          failures++;
          $display("FAIL latency %0d", edge_no - held_edge[dout_sub]);
        end
      end else if (n > 30) begin
        checks++; failures++;
        $display("FAIL no code at clock %0d", n);
      end
    end
    checks++;
    if (n_out < 1900) begin failures++; $display("FAIL throughput"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
