// tb_memory_reader: self-checking test of the LOAD engine's memory reader
// FSM against the behavioural shared-memory model. Runs loads of 1 to 100
// lines to all bank regions, including one that wraps past the last line
// of a bank and one of zero lines. Every line handed on is checked for data,
// bank_id and auto-incremented bank_addr; every burst request for its
// address and length; and, with the bus stalls switched off, the number of
// cycles each load takes (3 + N + ceil(N/16)). The second half runs with
// random stalls on both bus channels. CFG must be visited once per load.
module tb_memory_reader;
  import dpu_pkg::*;
  import tb_pkg::*;

  logic clk = 0, rst_n = 0, stall_en = 0;
  logic inst_valid = 0, inst_ready, inst_done;
  load_instr_t inst = '0;
  logic rd_req_valid, rd_req_ready, rd_data_valid, rd_data_ready;
  ddr_addr_t rd_req_addr, cfg_ddr_addr;
  len_t rd_req_len;
  line_t rd_data;
  logic cfg_valid;
  line_wr_t line;
  mr_state_e state;
  int req_stalls, data_stalls;
  int checks = 0, failures = 0, n_cfg = 0;
  longint cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  memory_reader dut (
    .clk, .rst_n, .inst_valid, .inst_ready, .inst, .inst_done,
    .rd_req_valid, .rd_req_ready, .rd_req_addr, .rd_req_len,
    .rd_data_valid, .rd_data_ready, .rd_data,
    .cfg_valid, .cfg_ddr_addr, .line, .state);

  ddr_model u_ddr (
    .clk, .rst_n, .stall_en, .req_valid(rd_req_valid), .req_ready(rd_req_ready),
    .req_addr(rd_req_addr), .req_len(rd_req_len), .data_valid(rd_data_valid),
    .data_ready(rd_data_ready), .data(rd_data), .req_stalls, .data_stalls);

  initial begin
    #5000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Scoreboard of the current load.
  load_instr_t cur;
  int n_rx, n_reqd;
  ddr_addr_t next_req;

  always @(posedge clk) if (rst_n) begin
    if (cfg_valid) begin
      n_cfg++;
      chk(cfg_ddr_addr == cur.ddr_addr, "cfg_ddr_addr");
    end
    if (rd_req_valid && rd_req_ready) begin
      int exp_len;
      exp_len = (int'(cur.n_lines) - n_reqd > 16) ? 16 : int'(cur.n_lines) - n_reqd;
      chk(rd_req_addr == next_req && int'(rd_req_len) == exp_len,
          $sformatf("request addr %h/%h len %0d/%0d", rd_req_addr, next_req, rd_req_len, exp_len));
      next_req = next_req + 16 * rd_req_len;
      n_reqd += int'(rd_req_len);
    end
    if (line.valid) begin
      chk(line.data == ddr_line(cur.ddr_addr + 16 * n_rx) && line.bank_id == cur.bank_id
          && line.bank_addr == bank_addr_t'(int'(cur.bank_addr) + n_rx),
          $sformatf("line %0d of load at %h", n_rx, cur.ddr_addr));
      n_rx++;
    end
  end

  task automatic run(ddr_addr_t a, int b, int ba, int n);
    longint t0;
    @(negedge clk);
    cur = '{ddr_addr: a, bank_id: 6'(b), bank_addr: 11'(ba), n_lines: 12'(n)};
    n_rx = 0; n_reqd = 0; next_req = a;
    inst = cur; inst_valid = 1;
    while (!inst_ready) @(negedge clk);
    t0 = cyc;
    @(negedge clk);
    inst_valid = 0;
    while (!inst_done) @(negedge clk);
    chk(n_rx == n && n_reqd == n, $sformatf("load %h: %0d lines received, %0d requested, %0d expected", a, n_rx, n_reqd, n));
    if (!stall_en)
      chk(int'(cyc - t0) + 1 == 3 + n + (n + 15) / 16,
          $sformatf("load of %0d lines took %0d cycles, expected %0d", n, cyc - t0 + 1, 3 + n + (n + 15) / 16));
    @(negedge clk);
    chk(state == MR_IDLE && inst_ready, "back to IDLE");
  endtask

  initial begin
    automatic int loads = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    for (int pass = 0; pass < 2; pass++) begin
      stall_en = (pass == 1);
      run(32'h0010_0000, 16, 0, 64);
      run(32'h0010_0400, 0, 100, 1);
      run(32'h0020_0000, 33, 2040, 20);   // wraps inside the bank
      run(32'h0030_0000, 5, 7, 0);
      for (int i = 0; i < 8; i++) run(32'h0040_0000 + 32'h1000 * i, $urandom_range(0, 33), $urandom_range(0, 2047), $urandom_range(1, 100));
      loads += 12;
    end
    chk(n_cfg == loads, $sformatf("CFG visited %0d times for %0d loads", n_cfg, loads));
    chk(req_stalls > 0 && data_stalls > 0, "bus stalls exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
