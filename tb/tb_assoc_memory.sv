// tb_assoc_memory: enters faulty addresses one by one (including repeats and
// more than ten), then mixes random writes and reads.  A reference model
// (associative array of entered addresses and their data) predicts wr_hit,
// rd_hit, rd_data and full.
module tb_assoc_memory;
  logic clk = 0, rst_n = 0;
  logic        mark_en, wr_en, wr_hit, rd_hit, full;
  logic [9:0]  mark_addr, wr_addr, rd_addr;
  logic [60:0] wr_data, rd_data;
  int checks = 0, failures = 0;
  logic [60:0] model [int];
  int n_redirect = 0;

  assoc_memory #(.CELLS(10), .AW(10), .DW(61)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int bad [12] = '{5, 17, 300, 5, 1023, 64, 65, 2, 900, 411, 77, 78};
    mark_en = 0; wr_en = 0; mark_addr = '0; wr_addr = '0; rd_addr = '0; wr_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    foreach (bad[i]) begin
      @(negedge clk);
      mark_en = 1; mark_addr = 10'(bad[i]);
      if (!model.exists(bad[i]) && model.num() < 10) model[bad[i]] = 'x;
      @(posedge clk); #1;
      check(full == (model.num() == 10), $sformatf("full after %0d marks", i + 1));
    end
    @(negedge clk) mark_en = 0;
    // initial contents of cells are not defined: write every entered address
    foreach (model[a]) begin
      @(negedge clk);
      wr_en = 1; wr_addr = 10'(a); wr_data = {$urandom, $urandom};
      model[a] = wr_data;
      #1 check(wr_hit, "hit on entered address");
      @(posedge clk);
    end
    for (int n = 0; n < 2000; n++) begin
      int a, r;
      @(negedge clk);
      a = ($urandom_range(0, 3) == 0) ? bad[$urandom_range(0, 11)] : $urandom_range(0, 1023);
      r = ($urandom_range(0, 2) == 0) ? bad[$urandom_range(0, 11)] : $urandom_range(0, 1023);
      wr_en = $urandom_range(0, 1); wr_addr = 10'(a); wr_data = {$urandom, $urandom};
      rd_addr = 10'(r);
      #1;
      check(wr_hit == (wr_en && model.exists(a)), "write hit");
      check(rd_hit == model.exists(r), "read hit");
      if (model.exists(r)) check(rd_data == model[r], $sformatf("read data addr %0d", r));
      if (wr_hit) n_redirect++;
      @(posedge clk);
      if (wr_en && model.exists(a)) model[a] = wr_data;
    end
    check(n_redirect > 0, "writes redirected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
