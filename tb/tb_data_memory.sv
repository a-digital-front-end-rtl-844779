// tb_data_memory: writes a word every clock at pointers with alternating
// parity (as the external address generator must send them), and reads
// earlier words back at random.  A reference model of the memory (the three
// lanes the crossover keeps, or the diagnostic word) predicts every read.
// It also exercises: read stalls when a read targets the bank being
// written, single-bit pointer errors (corrected), single- and double-bit
// errors planted in the memory array (corrected; detected, the address
// then moved to the associative memory and used again without error), the
// diagnostic word, a change of the left-out channel, and finally an
// odd/even violation.  Each must happen at least once.
module tb_data_memory;
  import fermi_pkg::*;
  localparam int NIT = 3000;
  logic clk = 0, rst_n = 0;
  logic wr_en, addr_diag, rd_req, rd_ready, rd_valid, rd_sec, rd_ded;
  logic mark_en, status_clear;
  mem_word_t [3:0] ch_in;
  logic [3:0] diag_en;
  mem_word_t diag_word;
  logic [1:0] skip;
  logic [14:0] wr_ptr, ptr_clean;
  logic [9:0] rd_addr, mark_addr, waddr;
  mem_word_t [2:0] rd_data;
  logic [6:0] status;
  logic [60:0] spy;
  int checks = 0, failures = 0;
  logic [53:0] model [1024];
  bit          written [1024];
  int n_stall = 0, n_psec = 0, n_sec = 0, n_ded = 0, n_cam = 0, n_diag = 0, n_reads = 0;

  data_memory dut (.*);
  secded_enc #(.K(10)) u_penc (.data(waddr), .code(ptr_clean));
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (NIT + 200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int          pa [NIT];
  logic [53:0] pd [NIT];
  int          exp_addr = -1;
  int          exp_kind = 0;   // 0 clean, 1 corrected, 2 uncorrectable
  bit          exp_on = 0;
  logic [53:0] exp_data;
  int          bad_addr = -1;
  bit          rewritten = 0;

  initial begin
    wr_en = 0; addr_diag = 0; rd_req = 0; mark_en = 0; status_clear = 0;
    ch_in = '0; diag_en = '0; diag_word = '0; skip = 2'd3; wr_ptr = '0;
    rd_addr = '0; mark_addr = '0; waddr = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < NIT; n++) begin
      mem_word_t [3:0] sel;
      int a, r, kind;
      bit acc;
      @(negedge clk);
      // ---- write side ----
      if (n == 1500) skip = 2'd1;
      diag_en = (n % 97 == 5) ? 4'b0010 : 4'b0000;
      diag_word = mem_word_t'($urandom);
      for (int i = 0; i < 4; i++) ch_in[i] = mem_word_t'($urandom);
      a = ($urandom_range(0, 511) << 1) | (n % 2);
      if (bad_addr >= 0 && n > 1850 && !rewritten && (bad_addr % 2) == (n % 2))
        a = bad_addr;                           // write the bad location again
      if (n == 2950) a = a ^ 1;                 // odd/even violation
      waddr = 10'(a);
      wr_en = 1;
      #1;
      wr_ptr = ptr_clean;
      if (n % 50 == 7) begin int pb; pb = $urandom_range(0, 14); wr_ptr[pb] ^= 1'b1; n_psec++; end
      for (int i = 0; i < 4; i++) sel[i] = diag_en[i] ? diag_word : ch_in[i];
      if (diag_en != 0 && skip != 2'd1) n_diag++;
      pa[n] = a;
      pd[n] = (skip == 2'd3) ? {sel[2], sel[1], sel[0]} : {sel[3], sel[2], sel[0]};
      // commit the write that lands at this clock edge
      if (n >= 2 && n < 2950) begin
        model[pa[n-2]] = pd[n-2];
        written[pa[n-2]] = 1;
        if (pa[n-2] == bad_addr && n > 1850) rewritten = 1;
      end
      // ---- plant errors in the array ----
      if (n == 800 || n == 1200) begin
        int b, bit_i;
        b = pa[n-21];
        bit_i = $urandom_range(0, 60);
        if (b % 2 == 0) dut.bank0[b >> 1][bit_i] ^= 1'b1;
        else            dut.bank1[b >> 1][bit_i] ^= 1'b1;
      end
      if (n == 1800) begin
        bad_addr = pa[n-21];
        if (bad_addr % 2 == 0) begin
          dut.bank0[bad_addr >> 1][3] ^= 1'b1; dut.bank0[bad_addr >> 1][40] ^= 1'b1;
        end else begin
          dut.bank1[bad_addr >> 1][3] ^= 1'b1; dut.bank1[bad_addr >> 1][40] ^= 1'b1;
        end
      end
      // ---- read side: a word written 5..25 clocks ago ----
      kind = 0;
      r = pa[(n > 30) ? n - $urandom_range(5, 25) : 0];
      if (n == 800 || n == 1200 || n == 1800) begin r = pa[n-21]; kind = (n == 1800) ? 2 : 1; end
      if (rewritten && n > 1900 && n % 7 == 0) r = bad_addr;
      rd_req  = (n > 30) && (n < 2940) && ($urandom_range(0, 2) != 0 || kind != 0);
      rd_addr = 10'(r);
      #1;
      acc = rd_req && rd_ready;
      if (rd_req && !rd_ready) n_stall++;
      if (kind != 0 && !acc) $display("note: planted-error read at n=%0d stalled", n);
      @(posedge clk);
      #1;
      // ---- the read accepted one clock earlier is now on rd_data ----
      check(rd_valid == exp_on, "rd_valid two clocks after acceptance");
      if (rd_valid && exp_on) begin
        n_reads++;
        if (exp_kind == 2) begin
          check(rd_ded && status[1], "double error reported");
          n_ded++;
        end else begin
          check(rd_data == exp_data, $sformatf("read data addr %0d n=%0d got %h exp %h sec=%0d", exp_addr, n, rd_data, exp_data, rd_sec));
          check(!rd_ded, "no uncorrectable error");
          if (exp_kind == 1) begin
            check(rd_sec && status[0], $sformatf("single error corrected n=%0d sec=%0d st=%b", n, rd_sec, status));
            n_sec++;
          end
          if (exp_addr == bad_addr && rewritten) n_cam++;
        end
      end
      exp_on   = acc;
      exp_addr = r;
      exp_kind = kind;
      exp_data = model[r];
    end
    repeat (3) @(posedge clk);
    #1;
    check(status[4], "odd/even violation reported");
    check(status[2], "pointer error corrected");
    $display("reads=%0d stalls=%0d ptr_sec=%0d sec=%0d ded=%0d cam_reuse=%0d diag=%0d",
             n_reads, n_stall, n_psec, n_sec, n_ded, n_cam, n_diag);
    check(n_stall > 0, "read stall");
    check(n_sec == 2, "two corrected words");
    check(n_ded == 1, "one uncorrectable word");
    check(n_cam > 0, "bad location used through the associative memory");
    check(n_diag > 0, "diagnostic word stored");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
