// tb_secded: self-checking test of the SEC-DED encoder and decoder at the
// data memory width (54 bits) and the pointer width (10 bits).  Random words
// are encoded, 0, 1 or 2 random bits of the code word are flipped, and the
// decoder must return the original word with the right error flags (no
// flag, single corrected, double detected).
module tb_secded;
  localparam int K = 54, P = 6, KA = 10, PA = 4;
  logic [K-1:0]  d, q;
  logic [K+P:0]  c, cf;
  logic          se, de;
  logic [KA-1:0] da, qa;
  logic [KA+PA:0] ca, caf;
  logic          sea, dea;
  int checks = 0, failures = 0;

  secded_enc #(.K(K))  u_enc  (.data(d), .code(c));
  secded_dec #(.K(K))  u_dec  (.code(cf), .data(q), .single_err(se), .double_err(de));
  secded_enc #(.K(KA)) u_enca (.data(da), .code(ca));
  secded_dec #(.K(KA)) u_deca (.code(caf), .data(qa), .single_err(sea), .double_err(dea));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 600; n++) begin
      int nerr, b1, b2;
      d  = {$urandom, $urandom};
      da = KA'($urandom);
      nerr = n % 3;
      #1;
      check(c[K+P:1] != '0 || d == '0, "code non-trivial");
      b1 = $urandom_range(0, K + P);
      b2 = (b1 + 1 + $urandom_range(0, K + P - 1)) % (K + P + 1);
      cf = c;
      if (nerr >= 1) cf[b1] = ~cf[b1];
      if (nerr == 2) cf[b2] = ~cf[b2];
      caf = ca;
      if (nerr >= 1) caf[b1 % (KA + PA + 1)] = ~caf[b1 % (KA + PA + 1)];
      if (nerr == 2) caf[(b1 + 3) % (KA + PA + 1)] = ~caf[(b1 + 3) % (KA + PA + 1)];
      #1;
      if (nerr < 2) begin
        check(q == d, $sformatf("data corrected n=%0d nerr=%0d", n, nerr));
        check(qa == da, "pointer corrected");
      end
      check(se == (nerr == 1), $sformatf("single flag nerr=%0d", nerr));
      check(de == (nerr == 2), $sformatf("double flag nerr=%0d", nerr));
      check(sea == (nerr == 1) && dea == (nerr == 2), "pointer flags");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
