// trojan_line_shreg: line-select shift register of the trojan.
//
// Holds one bit per memory line of the targeted load instruction, bit 0 for
// the line that arrives next; a 1 means "replace this line". When the load
// is identified the register is loaded with the target's mask; after every
// received memory line it shifts one place towards bit 0 and fills with 0,
// so lines past the 64th are never replaced. sel is bit 0 and is valid in
// the cycle the line arrives, so the exchange adds no cycle. clear empties
// the register (end of load).
//
// Encoding the lines to swap in a shift register shifted per data transfer
// follows the design description; the bit order and the clear input are
// this design's choices. Priority: clear, then load, then shift.
module trojan_line_shreg
  import dpu_pkg::*;
#(
  parameter int unsigned MASK_W_P = MASK_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clear,
  input  logic                load,
  input  logic [MASK_W_P-1:0] mask_in,
  input  logic                shift,
  output logic                sel
);

  logic [MASK_W_P-1:0] sr_q;

  always_ff @(posedge clk) begin
    if (!rst_n || clear) sr_q <= '0;
    else if (load)       sr_q <= mask_in;
    else if (shift)      sr_q <= sr_q >> 1;
  end

  assign sel = sr_q[0];

endmodule
