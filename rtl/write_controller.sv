// write_controller: write controller of the DPU LOAD engine.
//
// Takes the memory lines leaving the memory reader (after the trojan's MUX)
// and writes them into the on-chip RAM. Each valid line is registered once
// and its bank_id decoded into a one-hot bank write enable; bank_addr and
// data go to all banks. A line addressed to a bank that does not exist
// (bank_id >= NUM_BANKS) is not written and wr_drop pulses instead.
//
// Timing: a line presented in cycle t is written at the clock edge ending
// cycle t+1; one line per cycle, no back-pressure.
//
// That the write controller forwards lines to the RAM follows the design
// description; the register stage and the out-of-range rule are this
// design's own choices.
module write_controller
  import dpu_pkg::*;
#(
  parameter int unsigned NUM_BANKS_P = NUM_BANKS
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  line_wr_t               in_line,
  output logic [NUM_BANKS_P-1:0] bank_we,
  output bank_addr_t             wr_addr,
  output line_t                  wr_data,
  output logic                   wr_drop
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bank_we <= '0;
      wr_drop <= 1'b0;
      wr_addr <= '0;
      wr_data <= '0;
    end else begin
      bank_we <= '0;
      wr_drop <= 1'b0;
      if (in_line.valid) begin
        wr_addr <= in_line.bank_addr;
        wr_data <= in_line.data;
        if (int'(in_line.bank_id) < NUM_BANKS_P) bank_we[in_line.bank_id] <= 1'b1;
        else                                      wr_drop <= 1'b1;
      end
    end
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(bank_we));

endmodule
