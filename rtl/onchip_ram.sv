// onchip_ram: the DPU core's on-chip buffer.
//
// NUM_BANKS banks of BANK_LINES memory lines of 16 bytes (34 x 2048 x 16
// bytes for the B4096 configuration). A bank is selected by bank_id and a
// line inside it by bank_addr. The banks fall into three fixed regions:
// the first FM_BANKS hold feature maps, the next W_BANKS weights, the rest
// (one bank) biases.
//
// Write port: bank_we (one-hot, from the LOAD engine's write controller),
// wr_addr, wr_data; written at the clock edge. Read port (standing for the
// compute and STORE engines): rd_en, rd_bank, rd_addr; rd_data and
// rd_region (the region of the bank read) are valid one cycle later. A read
// of a bank_id past the last bank returns 0 and REG_INVALID.
//
// Geometry and regions follow the design description; the single read port
// is this design's own choice, as the engines that read the buffer are not
// described.
module onchip_ram
  import dpu_pkg::*;
#(
  parameter int unsigned NUM_BANKS_P  = NUM_BANKS,
  parameter int unsigned BANK_LINES_P = BANK_LINES,
  localparam int unsigned AW          = $clog2(BANK_LINES_P)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // write port
  input  logic [NUM_BANKS_P-1:0] bank_we,
  input  logic [AW-1:0]          wr_addr,
  input  line_t                  wr_data,
  // read port
  input  logic                   rd_en,
  input  bank_id_t               rd_bank,
  input  logic [AW-1:0]          rd_addr,
  output line_t                  rd_data,
  output region_e                rd_region
);

  line_t    bank_q [NUM_BANKS_P];
  bank_id_t rd_bank_q;

  for (genvar b = 0; b < NUM_BANKS_P; b++) begin : g_bank
    ram_bank #(.LINES(BANK_LINES_P)) u_bank (
      .clk,
      .we(bank_we[b]), .wr_addr, .wr_data,
      .rd_en(rd_en && int'(rd_bank) == b), .rd_addr,
      .rd_data(bank_q[b])
    );
  end

  always_ff @(posedge clk) begin
    if (!rst_n)     rd_bank_q <= '0;
    else if (rd_en) rd_bank_q <= rd_bank;
  end

  always_comb begin
    rd_data = '0;
    for (int b = 0; b < NUM_BANKS_P; b++)
      if (int'(rd_bank_q) == b) rd_data = bank_q[b];
    rd_region = (int'(rd_bank_q) < NUM_BANKS_P) ? region_of(rd_bank_q) : REG_INVALID;
  end

endmodule
