// ram_bank: one bank of the DPU on-chip RAM.
//
// BANK_LINES memory lines of LINE_W bits, one write port and one read port,
// both synchronous: rd_data shows the line at rd_addr one cycle after rd_en.
// A read and a write of the same line in one cycle return the old line.
// Contents are not reset. Written as a plain array so that a synthesis tool
// maps it to block RAM.
module ram_bank
  import dpu_pkg::*;
#(
  parameter int unsigned LINES = BANK_LINES,
  localparam int unsigned AW   = $clog2(LINES)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] wr_addr,
  input  line_t         wr_data,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output line_t         rd_data
);

  line_t mem [LINES];

  always_ff @(posedge clk) begin
    if (we)    mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
