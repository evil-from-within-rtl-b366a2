// tb_backdoor_sweep: workload test of the trojan at the default sizes with
// byte-level backdoors of 1, 7, 30, 40, 100 and 128 changed 8-bit weights,
// the range of the FPGA case study (its chosen trade-off is 30 changes, its
// sweep goes up to 100).
//
// The victim layer's weights arrive in eight 64-line load instructions into
// weight banks 16..23. For each backdoor size the testbench draws that many
// distinct (load, line, byte) positions with new byte values, turns them into
// a programming image the way a user of the trojan would (one table entry
// per load that holds changes, one mask bit and one ROM line per changed
// line, the ROM line being the original line with the changed bytes patched
// in), programs the core, runs the eight loads and reads the whole layer
// back. Exactly the chosen bytes must differ from shared memory, each with
// its new value, and every load must take as long as with the trojan
// disarmed.
module tb_backdoor_sweep;
  import dpu_pkg::*;
  import tb_pkg::*;

  localparam int NLOADS = 8, NL = 64;
  localparam ddr_addr_t LAYER = 32'h5000_0000;

  logic clk = 0, rst_n = 0, stall_en = 0;
  logic inst_valid = 0, inst_ready, inst_done;
  load_instr_t inst = '0;
  logic rd_req_valid, rd_req_ready, rd_data_valid, rd_data_ready;
  ddr_addr_t rd_req_addr;
  len_t rd_req_len;
  line_t rd_data;
  logic tgt_we = 0, rom_we = 0;
  logic [2:0] tgt_idx = '0;
  trojan_target_t tgt_entry = '0;
  logic [6:0] rom_addr = '0;
  line_t rom_wdata = '0;
  logic ram_rd_en = 0;
  bank_id_t ram_rd_bank = '0;
  bank_addr_t ram_rd_addr = '0;
  line_t ram_rd_data;
  region_e ram_rd_region;
  mr_state_e load_state;
  logic wr_drop, trojan_active, trojan_swap;
  int req_stalls, data_stalls;
  int checks = 0, failures = 0;
  longint cyc = 0;

  // backdoor: new byte value per (load, line, byte), -1 = unchanged
  int bd [NLOADS][NL][16];
  longint clean_cycles [NLOADS];

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  trojan_dpu_core dut (
    .clk, .rst_n, .inst_valid, .inst_ready, .inst, .inst_done,
    .rd_req_valid, .rd_req_ready, .rd_req_addr, .rd_req_len,
    .rd_data_valid, .rd_data_ready, .rd_data,
    .tgt_we, .tgt_idx, .tgt_entry, .rom_we, .rom_addr, .rom_wdata,
    .ram_rd_en, .ram_rd_bank, .ram_rd_addr, .ram_rd_data, .ram_rd_region,
    .load_state, .wr_drop, .trojan_active, .trojan_swap);

  ddr_model u_ddr (
    .clk, .rst_n, .stall_en, .req_valid(rd_req_valid), .req_ready(rd_req_ready),
    .req_addr(rd_req_addr), .req_len(rd_req_len), .data_valid(rd_data_valid),
    .data_ready(rd_data_ready), .data(rd_data), .req_stalls, .data_stalls);

  initial begin
    #50000000;
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

  function automatic ddr_addr_t load_addr(int j);
    return LAYER + ddr_addr_t'(j * NL * 16);
  endfunction

  task automatic do_load(int j, output longint cycles);
    longint t0;
    @(negedge clk);
    inst = '{ddr_addr: load_addr(j), bank_id: 6'(16 + j), bank_addr: '0, n_lines: 12'(NL)};
    inst_valid = 1;
    while (!inst_ready) @(negedge clk);
    t0 = cyc;
    @(negedge clk);
    inst_valid = 0;
    while (!inst_done) @(negedge clk);
    cycles = cyc - t0;
  endtask

  // Draw a backdoor of k changes at distinct byte positions.
  task automatic draw(int k);
    foreach (bd[j, i, b]) bd[j][i][b] = -1;
    for (int n = 0; n < k; n++) begin
      int j, i, b, orig;
      do begin
        j = $urandom_range(0, NLOADS - 1);
        i = $urandom_range(0, NL - 1);
        b = $urandom_range(0, 15);
      end while (bd[j][i][b] >= 0);
      orig = int'(ddr_line(load_addr(j) + ddr_addr_t'(16 * i))[8 * b +: 8]);
      bd[j][i][b] = orig ^ $urandom_range(1, 255);
    end
  endtask

  // Build and write the programming image; returns ROM lines used.
  task automatic program_backdoor(output int used);
    int base = 0;
    for (int j = 0; j < NLOADS; j++) begin
      mask_t m = '0;
      int first = base;
      for (int i = 0; i < NL; i++) begin
        line_t l = ddr_line(load_addr(j) + ddr_addr_t'(16 * i));
        bit changed = 0;
        for (int b = 0; b < 16; b++)
          if (bd[j][i][b] >= 0) begin
            l[8 * b +: 8] = 8'(bd[j][i][b]);
            changed = 1;
          end
        if (changed) begin
          m[i] = 1'b1;
          @(negedge clk);
          rom_we = 1; rom_addr = 7'(base); rom_wdata = l;
          @(negedge clk);
          rom_we = 0;
          base++;
        end
      end
      @(negedge clk);
      tgt_we = 1; tgt_idx = 3'(j);
      tgt_entry = '{armed: (m != '0), ddr_addr: load_addr(j), mask: m, rom_base: 16'(first)};
      @(negedge clk);
      tgt_we = 0;
    end
    used = base;
  endtask

  task automatic check_layer(int k, int used);
    int diffs = 0, wrong = 0;
    for (int j = 0; j < NLOADS; j++)
      for (int i = 0; i < NL; i++) begin
        line_t orig = ddr_line(load_addr(j) + ddr_addr_t'(16 * i));
        @(negedge clk);
        ram_rd_en = 1; ram_rd_bank = 6'(16 + j); ram_rd_addr = 11'(i);
        @(negedge clk);
        ram_rd_en = 0;
        for (int b = 0; b < 16; b++) begin
          int exp = (bd[j][i][b] >= 0) ? bd[j][i][b] : int'(orig[8 * b +: 8]);
          if (ram_rd_data[8 * b +: 8] != orig[8 * b +: 8]) diffs++;
          if (int'(ram_rd_data[8 * b +: 8]) != exp) wrong++;
        end
        chk(ram_rd_region == REG_WEIGHT, "weight region");
      end
    chk(diffs == k && wrong == 0,
        $sformatf("backdoor of %0d changes: %0d bytes differ, %0d wrong", k, diffs, wrong));
    $display("backdoor of %0d changed weights: %0d ROM lines, %0d bytes changed in the buffer", k, used, diffs);
  endtask

  initial begin
    automatic int sizes [6] = '{1, 7, 30, 40, 100, 128};
    longint c;
    int used;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    // reference run with the trojan dormant
    for (int j = 0; j < NLOADS; j++) do_load(j, clean_cycles[j]);
    foreach (bd[j, i, b]) bd[j][i][b] = -1;
    check_layer(0, 0);
    foreach (sizes[s]) begin
      draw(sizes[s]);
      program_backdoor(used);
      chk(used <= 128, "ROM capacity");
      for (int j = 0; j < NLOADS; j++) begin
        do_load(j, c);
        chk(c == clean_cycles[j], $sformatf("load %0d: %0d cycles, %0d when dormant", j, c, clean_cycles[j]));
      end
      check_layer(sizes[s], used);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
