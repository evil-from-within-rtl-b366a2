// tb_load_engine: self-checking test of the LOAD engine (memory reader,
// trojan and write controller together) against the behavioural shared
// memory. Every RAM write is compared, in order, with an expected list
// worked out from the load instructions and the programmed targets. Checks
// that an unprogrammed trojan changes nothing, that programmed target loads
// get exactly their masked lines replaced, that other loads are untouched,
// and that a target load takes exactly as many cycles as the same load with
// the trojan not matching (bus stalls off for that comparison).
module tb_load_engine;
  import dpu_pkg::*;
  import tb_pkg::*;

  logic clk = 0, rst_n = 0, stall_en = 1;
  logic inst_valid = 0, inst_ready, inst_done;
  load_instr_t inst = '0;
  logic rd_req_valid, rd_req_ready, rd_data_valid, rd_data_ready;
  ddr_addr_t rd_req_addr;
  len_t rd_req_len;
  line_t rd_data, wr_data;
  logic tgt_we = 0, rom_we = 0;
  logic [2:0] tgt_idx = '0;
  trojan_target_t tgt_entry = '0;
  logic [6:0] rom_addr = '0;
  line_t rom_wdata = '0;
  logic [NUM_BANKS-1:0] bank_we;
  bank_addr_t wr_addr;
  logic wr_drop, trojan_active, trojan_swap;
  mr_state_e state;
  int req_stalls, data_stalls;
  int checks = 0, failures = 0, n_swaps = 0;
  longint cyc = 0;
  trojan_target_t model [8];

  typedef struct { int bank; int addr; line_t data; } wr_t;
  wr_t exp_q [$];

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  load_engine dut (
    .clk, .rst_n, .inst_valid, .inst_ready, .inst, .inst_done,
    .rd_req_valid, .rd_req_ready, .rd_req_addr, .rd_req_len,
    .rd_data_valid, .rd_data_ready, .rd_data,
    .tgt_we, .tgt_idx, .tgt_entry, .rom_we, .rom_addr, .rom_wdata,
    .bank_we, .wr_addr, .wr_data, .wr_drop, .state, .trojan_active, .trojan_swap);

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

  always @(posedge clk) if (rst_n) begin
    if (trojan_swap) n_swaps++;
    if (bank_we != '0) begin
      wr_t e;
      int b = -1;
      for (int i = 0; i < NUM_BANKS; i++) if (bank_we[i]) b = i;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected write bank %0d addr %0d", b, wr_addr);
      end else begin
        e = exp_q.pop_front();
        if (b != e.bank || int'(wr_addr) != e.addr || wr_data !== e.data) begin
          failures++;
          $display("FAIL write bank %0d/%0d addr %0d/%0d data %h/%h", b, e.bank, wr_addr, e.addr, wr_data, e.data);
        end
      end
    end
  end

  // Queue the expected writes of a load, issue it, wait for it; returns cycles.
  task automatic run(ddr_addr_t a, int b, int ba, int n, output longint cycles);
    int t = -1, k = 0;
    longint t0;
    for (int i = 0; i < 8; i++) if (t < 0 && model[i].armed && model[i].ddr_addr == a) t = i;
    for (int i = 0; i < n; i++) begin
      wr_t e;
      e.bank = b; e.addr = (ba + i) % 2048; e.data = ddr_line(a + 16 * i);
      if (t >= 0 && i < 64 && model[t].mask[i]) begin
        e.data = rom_line(int'(model[t].rom_base) + k);
        k++;
      end
      exp_q.push_back(e);
    end
    @(negedge clk);
    inst = '{ddr_addr: a, bank_id: 6'(b), bank_addr: 11'(ba), n_lines: 12'(n)};
    inst_valid = 1;
    while (!inst_ready) @(negedge clk);
    t0 = cyc;
    @(negedge clk);
    inst_valid = 0;
    while (!inst_done) @(negedge clk);
    cycles = cyc - t0;
    repeat (2) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL %0d writes missing after load %h", exp_q.size(), a);
      exp_q.delete();
    end
  endtask

  initial begin
    longint c_hit, c_miss, c;
    for (int i = 0; i < 8; i++) model[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // dormant
    run(32'h8000_0000, 16, 0, 64, c);
    run(32'h8000_0400, 17, 0, 64, c);
    checks++;
    if (n_swaps != 0) begin failures++; $display("FAIL swap while dormant"); end
    // program: 30 replaced lines over two target loads (16 + 14)
    for (int i = 0; i < 128; i++) begin
      rom_we = 1; rom_addr = 7'(i); rom_wdata = rom_line(i);
      @(negedge clk);
    end
    rom_we = 0;
    model[0] = '{armed: 1'b1, ddr_addr: 32'h8000_0000, mask: 64'h0000_F000_000F_F00F, rom_base: 16'd0};
    model[3] = '{armed: 1'b1, ddr_addr: 32'h8000_0400, mask: 64'hC000_0000_0FFF_0000, rom_base: 16'd16};
    for (int i = 0; i < 8; i++) begin
      tgt_we = 1; tgt_idx = 3'(i); tgt_entry = model[i];
      @(negedge clk);
    end
    tgt_we = 0;
    run(32'h8000_0000, 16, 0, 64, c);
    run(32'h8000_0400, 17, 0, 64, c);
    run(32'h9000_0000, 18, 100, 64, c);
    run(32'h8000_0400, 20, 2000, 100, c);
    // same load with and without a match, bus never stalling
    stall_en = 0;
    repeat (4) @(negedge clk);
    run(32'h8000_0000, 16, 0, 64, c_hit);
    run(32'h8000_0040, 16, 0, 64, c_miss);
    checks++;
    if (c_hit != c_miss || c_hit != longint'(3 + 64 + 4 - 1)) begin
      failures++;
      $display("FAIL cycles hit %0d miss %0d", c_hit, c_miss);
    end
    checks++;
    if (n_swaps != 2 * 16 + 2 * 14) begin
      failures++;
      $display("FAIL swaps %0d", n_swaps);
    end
    $display("swaps=%0d hit cycles=%0d miss cycles=%0d", n_swaps, c_hit, c_miss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
