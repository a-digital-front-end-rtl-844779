// lut: linearising look-up table of one acquisition channel.
//
// The 10-bit code of the A/D converter is registered (R) and addresses a
// 1024 x 16 table holding the inverse transfer function of the analog chain,
// which expands it to a 16-bit linear sample.  A counter (CNT) and a write
// register (W) load the table: in LUT_LOAD mode each wr_strobe captures
// wr_data in W and writes it, one cycle later, at the counter address, after
// which the counter advances.  In LUT_TEST mode the counter advances at every
// bunch crossing and addresses the table, which then plays back a stored test
// pattern to the memory and the trigger.  LUT_BYPASS routes the registered
// ADC code around the table as an emergency path.  All this follows the
// document; that the bypass places the code in the low bits, that the counter
// wraps at 1024 and that cnt_clear restarts it are this design's choices.
//
// Timing: one sample per clock; lin_out is valid two clocks after adc_code.
module lut
  import fermi_pkg::*;
#(
  parameter int IN_BITS  = ADC_BITS,
  parameter int OUT_BITS = LIN_BITS
) (
  input  logic                clk,
  input  logic                rst_n,
  input  lut_mode_e           mode,
  input  logic [IN_BITS-1:0]  adc_code,
  input  logic                cnt_clear,  // counter back to address 0
  input  logic                wr_strobe,  // load one table entry
  input  logic [OUT_BITS-1:0] wr_data,
  output logic [OUT_BITS-1:0] lin_out
);
  localparam int DEPTH = 1 << IN_BITS;

  logic [OUT_BITS-1:0] table_mem [DEPTH];
  logic [IN_BITS-1:0]  r_code;    // input register R
  logic [IN_BITS-1:0]  cnt;       // address counter CNT
  logic [OUT_BITS-1:0] w_reg;     // write register W
  logic                w_pend;
  logic [IN_BITS-1:0]  addr;
  logic [OUT_BITS-1:0] rd_q;
  logic                bypass_q;
  logic [IN_BITS-1:0]  code_q;

  assign addr = (mode == LUT_TEST) ? cnt : r_code;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_code   <= '0;
      cnt      <= '0;
      w_reg    <= '0;
      w_pend   <= 1'b0;
      bypass_q <= 1'b0;
      code_q   <= '0;
    end else begin
      r_code   <= adc_code;
      bypass_q <= (mode == LUT_BYPASS);
      code_q   <= r_code;
      w_pend   <= 1'b0;
      if (mode == LUT_LOAD && wr_strobe) begin
        w_reg  <= wr_data;
        w_pend <= 1'b1;
      end
      if (cnt_clear)                      cnt <= '0;
      else if (w_pend || mode == LUT_TEST) cnt <= cnt + 1'b1;
    end
  end

  // Table: written through W, read synchronously.
  always_ff @(posedge clk) begin
    if (w_pend) table_mem[cnt] <= w_reg;
    rd_q <= table_mem[addr];
  end

  assign lin_out = bypass_q ? OUT_BITS'(code_q) : rd_q;
endmodule
