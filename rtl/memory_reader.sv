// memory_reader: the memory reader FSM of the DPU LOAD engine.
//
// States IDLE -> CFG -> PARSE <-> SEND -> DONE -> IDLE. In IDLE it accepts
// one load instruction from the instruction bus (inst_valid/inst_ready). In
// CFG (one cycle) it sets up the transfer; this is also the cycle in which
// cfg_valid/cfg_ddr_addr tell the trojan which load is about to be
// received. In PARSE it issues one burst read request on the data bus
// (rd_req_valid/rd_req_ready, start address and up to MAX_BURST lines). In
// SEND it accepts the burst's memory lines (rd_data_valid, rd_data_ready is
// high) and passes each one, with its destination bank_id and bank_addr, on
// as `line` in the same cycle. ddr_addr advances by 16 bytes and bank_addr
// by one (wrapping inside the bank) per line. When the burst is in it goes
// back to PARSE for the next burst, or to DONE, where inst_done pulses for
// one cycle. line.data is rd_data itself: the reader adds no register on
// the data path, only the address and bank tags.
//
// Timing with a bus that never waits: an N-line load takes
// 3 + N + ceil(N/MAX_BURST) cycles, counting the cycle the instruction is
// accepted and the DONE cycle (one IDLE, one CFG, one PARSE per burst, one
// SEND cycle per line, one DONE).
//
// The five states and the auto-incremented start addresses follow the
// design description; the request/data handshakes, the burst length and the
// n_lines field are this design's own choices.
module memory_reader
  import dpu_pkg::*;
#(
  parameter int unsigned MAX_BURST = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  // instruction bus
  input  logic        inst_valid,
  output logic        inst_ready,
  input  load_instr_t inst,
  output logic        inst_done,
  // data bus: read request
  output logic        rd_req_valid,
  input  logic        rd_req_ready,
  output ddr_addr_t   rd_req_addr,
  output len_t        rd_req_len,
  // data bus: read data
  input  logic        rd_data_valid,
  output logic        rd_data_ready,
  input  line_t       rd_data,
  // to the trojan
  output logic        cfg_valid,
  output ddr_addr_t   cfg_ddr_addr,
  // to the write controller (through the trojan MUX)
  output line_wr_t    line,
  output mr_state_e   state
);

  mr_state_e   state_q;
  load_instr_t instr_q;
  ddr_addr_t   ddr_q;      // next address to request
  bank_addr_t  baddr_q;    // destination of the next received line
  len_t        left_q;     // lines not yet requested
  len_t        burst_q;    // lines still to come in this burst
  len_t        req_len;

  assign req_len = (left_q > len_t'(MAX_BURST)) ? len_t'(MAX_BURST) : left_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q <= MR_IDLE;
      instr_q <= '0;
      ddr_q   <= '0;
      baddr_q <= '0;
      left_q  <= '0;
      burst_q <= '0;
    end else begin
      unique case (state_q)
        MR_IDLE: if (inst_valid) begin
          instr_q <= inst;
          state_q <= MR_CFG;
        end
        MR_CFG: begin
          ddr_q   <= instr_q.ddr_addr;
          baddr_q <= instr_q.bank_addr;
          left_q  <= instr_q.n_lines;
          state_q <= (instr_q.n_lines == '0) ? MR_DONE : MR_PARSE;
        end
        MR_PARSE: if (rd_req_ready) begin
          ddr_q   <= ddr_q + (ddr_addr_t'(req_len) * LINE_BYTES);
          left_q  <= left_q - req_len;
          burst_q <= req_len;
          state_q <= MR_SEND;
        end
        MR_SEND: if (rd_data_valid) begin
          baddr_q <= baddr_q + 1'b1;
          burst_q <= burst_q - 1'b1;
          if (burst_q == len_t'(1)) state_q <= (left_q == '0) ? MR_DONE : MR_PARSE;
        end
        MR_DONE: state_q <= MR_IDLE;
        default: state_q <= MR_IDLE;
      endcase
    end
  end

  assign inst_ready    = (state_q == MR_IDLE);
  assign inst_done     = (state_q == MR_DONE);
  assign cfg_valid     = (state_q == MR_CFG);
  assign cfg_ddr_addr  = instr_q.ddr_addr;
  assign rd_req_valid  = (state_q == MR_PARSE);
  assign rd_req_addr   = ddr_q;
  assign rd_req_len    = req_len;
  assign rd_data_ready = (state_q == MR_SEND);
  assign state         = state_q;

  always_comb begin
    line.valid     = (state_q == MR_SEND) && rd_data_valid;
    line.bank_id   = instr_q.bank_id;
    line.bank_addr = baddr_q;
    line.data      = rd_data;
  end

  // A pending request holds its address and length.
  a_req_stable: assert property (@(posedge clk) disable iff (!rst_n)
    rd_req_valid && !rd_req_ready |=> rd_req_valid && $stable(rd_req_addr) && $stable(rd_req_len));

endmodule
