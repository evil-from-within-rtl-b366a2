// trojan_rom: storage for the manipulated memory lines of the backdoor.
//
// ROM_LINES entries of one full 16-byte memory line each; a replaced
// parameter is carried with the rest of its line. Reads are synchronous:
// rd_data shows the line at rd_addr one cycle after rd_addr is presented.
// From the data path it is read-only; the prog_* write port is the
// programming path through which the backdoor is loaded after deployment
// (on an FPGA this can equally be a bitstream update). Contents are not
// reset. A write and a read of the same line in one cycle return the old
// line.
//
// Whole-line storage follows the design description; the depth of 128 lines
// (room for 100 changes even if each sits in its own line) and the write
// port are this design's own choices.
module trojan_rom
  import dpu_pkg::*;
#(
  parameter int unsigned ROM_LINES = 128,
  localparam int unsigned ROM_AW   = $clog2(ROM_LINES)
) (
  input  logic              clk,
  input  logic              prog_we,
  input  logic [ROM_AW-1:0] prog_addr,
  input  line_t             prog_data,
  input  logic [ROM_AW-1:0] rd_addr,
  output line_t             rd_data
);

  line_t mem [ROM_LINES];

  always_ff @(posedge clk) begin
    if (prog_we) mem[prog_addr] <= prog_data;
    rd_data <= mem[rd_addr];
  end

endmodule
