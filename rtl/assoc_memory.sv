// assoc_memory: small two-port associative memory that stands in for faulty
// locations of the data memory.
//
// Each of the ten cells holds an address tag, a data word and a valid bit.
// An address is entered with mark_en (by the controller, or by the data
// memory when a read finds an uncorrectable word there); it takes the lowest
// free cell, and an address already present or a full memory changes nothing
// (full then stays set).  A write whose address matches a cell is taken by
// that cell (wr_hit); the read port compares its address with all tags and
// returns the cell's data with rd_hit, so the main memory location is never
// used again.  Ten cells and two ports follow the document; how faulty
// locations are found and entered is this design's choice.
//
// Timing: writes and marks take effect at the clock edge; the read port is
// combinational.
module assoc_memory #(
  parameter int CELLS = 10,
  parameter int AW    = 10,
  parameter int DW    = 61
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          mark_en,
  input  logic [AW-1:0] mark_addr,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [DW-1:0] wr_data,
  output logic          wr_hit,
  input  logic [AW-1:0] rd_addr,
  output logic          rd_hit,
  output logic [DW-1:0] rd_data,
  output logic          full
);
  logic [CELLS-1:0]         valid;
  logic [CELLS-1:0][AW-1:0] tag;
  logic [CELLS-1:0][DW-1:0] data;

  logic [CELLS-1:0] wmatch, rmatch, mmatch;
  always_comb begin
    for (int i = 0; i < CELLS; i++) begin
      wmatch[i] = valid[i] && tag[i] == wr_addr;
      rmatch[i] = valid[i] && tag[i] == rd_addr;
      mmatch[i] = valid[i] && tag[i] == mark_addr;
    end
    wr_hit  = wr_en && (wmatch != '0);
    rd_hit  = (rmatch != '0);
    rd_data = '0;
    for (int i = 0; i < CELLS; i++)
      if (rmatch[i]) rd_data = data[i];
  end

  assign full = &valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= '0;
      tag   <= '0;
      data  <= '0;
    end else begin
      if (wr_en)
        for (int i = 0; i < CELLS; i++)
          if (wmatch[i]) data[i] <= wr_data;
      if (mark_en && mmatch == '0) begin
        logic taken;
        taken = 1'b0;
        for (int i = 0; i < CELLS; i++) begin
          if (!valid[i] && !taken) begin
            valid[i] <= 1'b1;
            tag[i]   <= mark_addr;
            taken     = 1'b1;
          end
        end
      end
    end
  end
endmodule
