// tb_readout_controller: sends time frames of 1..16 pointers (SEC-DED
// coded, some with a flipped bit) and reads them out in full mode and in
// filtered mode with either coefficient bank.  A behavioural data memory
// answers read requests with random stalls and the two-clock read latency.
// The external reader takes each datum after a random delay.  Every output
// word is compared with the expected sample (channel by channel, pointer by
// pointer) or the expected inner product; the diagnostic data path and the
// pointer correction are exercised too, and each mechanism is counted.
module tb_readout_controller;
  import fermi_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [14:0] ptr_code, ptr_diag, pclean;
  logic [9:0]  paddr;
  logic        pstrobe, load, ptr_diag_en, data_diag_en;
  ro_mode_e    mode;
  logic        mem_rd_req, mem_rd_ready, mem_rd_valid, mem_rd_sec, mem_rd_ded;
  logic [9:0]  mem_rd_addr;
  mem_word_t [8:0] mem_rd_data;
  mem_word_t   data_diag;
  logic        cw_en, cw_bank;
  logic [3:0]  cw_idx;
  logic signed [7:0] cw_weight;
  logic [1:0]  cw_res;
  logic [31:0] out_data;
  logic        out_valid, out_filt, out_err, strobe, busy, ptr_sec, ptr_ded;
  int checks = 0, failures = 0;
  int wt [2][16];
  int n_full = 0, n_filt0 = 0, n_filt1 = 0, n_stall = 0, n_psec = 0, n_diag = 0;

  readout_controller dut (.*);
  secded_enc #(.K(10)) u_penc (.data(paddr), .code(pclean));
  always #5 clk = ~clk;

  function automatic mem_word_t memval(int a, int c);
    return mem_word_t'(18'((a * 7919 + c * 104729) ^ (a << 5)));
  endfunction

  // behavioural data memory: random stalls, two-clock latency
  logic [9:0] a1;
  logic       v1;
  always_ff @(posedge clk) begin
    v1 <= mem_rd_req && mem_rd_ready;
    a1 <= mem_rd_addr;
    mem_rd_valid <= v1;
    for (int c = 0; c < 9; c++) mem_rd_data[c] <= memval(int'(a1), c);
  end
  always @(negedge clk) begin
    mem_rd_ready = ($urandom_range(0, 3) != 0);
    if (mem_rd_req && !mem_rd_ready) n_stall++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [1:0] res3(int v);
    int r;
    r = v % 3;
    if (r < 0) r += 3;
    return 2'(r);
  endfunction

  task automatic take(output logic [31:0] d, output bit f, output bit e);
    int k;
    k = 0;
    while (!out_valid && k < 2000) begin @(negedge clk); k++; end
    d = out_data; f = out_filt; e = out_err;
    repeat ($urandom_range(0, 4)) @(negedge clk);
    strobe = 1;
    @(negedge clk);
    strobe = 0;
  endtask

  task automatic frame(int len, ro_mode_e m, bit diag);
    int ptrs [16];
    logic [31:0] d;
    bit f, e;
    mem_word_t dw;
    for (int i = 0; i < len; i++) begin
      @(negedge clk);
      ptrs[i] = $urandom_range(0, 1023);
      paddr = 10'(ptrs[i]);
      #1;
      ptr_code = pclean;
      if ($urandom_range(0, 4) == 0) begin
        int b;
        b = $urandom_range(0, 14);
        ptr_code[b] = ~ptr_code[b];
        n_psec++;
      end
      pstrobe = 1;
      @(negedge clk);
      pstrobe = 0;
    end
    @(negedge clk);
    data_diag_en = diag;
    data_diag = mem_word_t'($urandom);
    load = 1; mode = m;
    @(negedge clk);
    load = 0;
    for (int c = 0; c < 9; c++) begin
      if (m == RO_FULL) begin
        for (int i = 0; i < len; i++) begin
          take(d, f, e);
          dw = diag ? data_diag : memval(ptrs[i], c);
          check(!f && d == {4'(c), 7'b0, 3'b000, dw},
                $sformatf("full ch=%0d ptr=%0d got %h", c, i, d));
          if (diag) n_diag++;
        end
      end else begin
        longint sum;
        int b;
        b = (m == RO_FILT1);
        sum = 0;
        for (int i = 0; i < len; i++) sum += longint'(memval(ptrs[i], c).sample) * wt[b][i];
        take(d, f, e);
        check(f && !e && d == {4'(c), 28'(sum)}, $sformatf("filtered ch=%0d got %h", c, d));
      end
    end
    if (m == RO_FULL) n_full++;
    else if (m == RO_FILT0) n_filt0++;
    else n_filt1++;
    repeat (3) @(negedge clk);
    check(!busy, "idle after frame");
  endtask

  initial begin
    ptr_code = '0; ptr_diag = '0; paddr = '0; pstrobe = 0; load = 0;
    mem_rd_sec = 0; mem_rd_ded = 0;
    ptr_diag_en = 0; data_diag_en = 0; mode = RO_FULL; data_diag = '0;
    cw_en = 0; cw_bank = 0; cw_idx = 0; cw_weight = 0; cw_res = 0; strobe = 0;
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
    for (int n = 0; n < 24; n++)
      frame($urandom_range(1, 16), ro_mode_e'(n % 3), 0);
    frame(3, RO_FULL, 1);
    check(ptr_sec && !ptr_ded, "pointer errors corrected");
    $display("full=%0d filt0=%0d filt1=%0d stalls=%0d ptr_sec=%0d diag=%0d",
             n_full, n_filt0, n_filt1, n_stall, n_psec, n_diag);
    check(n_full > 0 && n_filt0 > 0 && n_filt1 > 0 && n_stall > 0 && n_psec > 0 && n_diag > 0,
          "every mechanism exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
