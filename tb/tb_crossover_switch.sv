// tb_crossover_switch: for every choice of the left-out channel, each of the
// three lanes must carry the expected one of the four channels.
module tb_crossover_switch;
  logic [3:0][17:0] in;
  logic [1:0]       skip;
  logic [2:0][17:0] out;
  int checks = 0, failures = 0;

  crossover_switch #(.W(18), .N_IN(4), .N_OUT(3)) dut (.in, .skip, .out);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 50; n++) begin
      for (int i = 0; i < 4; i++) in[i] = 18'($urandom);
      for (int s = 0; s < 4; s++) begin
        int src;
        skip = 2'(s);
        #1;
        for (int k = 0; k < 3; k++) begin
          src = (k < s) ? k : k + 1;
          checks++;
          if (out[k] !== in[src]) begin
            failures++;
            $display("FAIL skip=%0d lane=%0d", s, k);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
