// tb_trojan_dpu_core: end-to-end test of the DPU core load path with the
// trojan, at the design's default sizes (34 banks x 2048 lines, 8 targets,
// 128 ROM lines, bursts of 16).
//
// It plays the attack through: one layer-by-layer inference of a "victim"
// model (a 64-line feature-map load, four 64-line weight loads, a bias
// load) with the trojan unprogrammed; then the trojan is programmed with 30
// replacement lines spread over two of the weight loads and the same
// inference runs again; then a different model runs, the victim model runs
// with random data-bus stalls, a load to a non-existent bank is dropped, a
// load wraps inside its bank, and the trojan is reprogrammed (as after a
// model update) and the victim model runs once more. After each step every
// line written so far is read back through the RAM read port and compared
// with a shadow copy worked out from the loads and the programmed targets,
// including the region reported for the bank. Each load's cycle count is
// compared between the clean and the trojan-active run: they must be equal.
// Every mechanism is counted and a mechanism that never happened counts as
// a failure.
module tb_trojan_dpu_core;
  import dpu_pkg::*;
  import tb_pkg::*;

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

  // mechanism counters
  int n_dormant = 0, n_hit_loads = 0, n_swaps = 0, n_b2b_swaps = 0, n_nontarget = 0;
  int n_multiburst = 0, n_drops = 0, n_wrap = 0, n_reprog = 0, n_same_timing = 0;
  int n_reg_fm = 0, n_reg_w = 0, n_reg_b = 0, n_reg_inv = 0, n_cfg = 0;
  logic swap_d = 0;

  trojan_target_t model [8];
  line_t shadow [int];
  line_t rom_img [128];

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
    #20000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (trojan_swap) n_swaps++;
    if (trojan_swap && swap_d) n_b2b_swaps++;
    if (rd_data_valid && rd_data_ready) swap_d <= trojan_swap;
    if (wr_drop) n_drops++;
    if (load_state == MR_CFG) n_cfg++;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic program_rom(int i, line_t d);
    @(negedge clk);
    rom_we = 1; rom_addr = 7'(i); rom_wdata = d;
    @(negedge clk);
    rom_we = 0;
    rom_img[i] = d;
  endtask

  task automatic program_tgt(int i, trojan_target_t e);
    @(negedge clk);
    tgt_we = 1; tgt_idx = 3'(i); tgt_entry = e;
    @(negedge clk);
    tgt_we = 0;
    model[i] = e;
  endtask

  // Issue one load, update the shadow copy, return its cycle count.
  task automatic run(ddr_addr_t a, int b, int ba, int n, output longint cycles);
    int t = -1, k = 0;
    longint t0;
    for (int i = 0; i < 8; i++) if (t < 0 && model[i].armed && model[i].ddr_addr == a) t = i;
    for (int i = 0; i < n && b < NUM_BANKS; i++) begin
      line_t d = ddr_line(a + 16 * i);
      if (t >= 0 && i < 64 && model[t].mask[i]) begin
        d = rom_img[int'(model[t].rom_base) + k];
        k++;
      end
      shadow[b * 2048 + (ba + i) % 2048] = d;
    end
    if (t >= 0) n_hit_loads++;
    if (n > 16) n_multiburst++;
    if (ba + n > 2048) n_wrap++;
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
  endtask

  // Read back every line written so far.
  task automatic verify(string step);
    int bad = 0;
    foreach (shadow[key]) begin
      region_e er;
      int b = key / 2048;
      er = (b < 16) ? REG_FMAP : (b < 33) ? REG_WEIGHT : REG_BIAS;
      @(negedge clk);
      ram_rd_en = 1; ram_rd_bank = 6'(b); ram_rd_addr = 11'(key % 2048);
      @(negedge clk);
      ram_rd_en = 0;
      checks++;
      if (ram_rd_data !== shadow[key] || ram_rd_region !== er) begin
        failures++; bad++;
        if (bad < 5) $display("FAIL %s: bank %0d line %0d got %h exp %h", step, b, key % 2048, ram_rd_data, shadow[key]);
      end
      case (ram_rd_region)
        REG_FMAP:   n_reg_fm++;
        REG_WEIGHT: n_reg_w++;
        REG_BIAS:   n_reg_b++;
        default:    n_reg_inv++;
      endcase
    end
    $display("%s: %0d lines checked, %0d wrong", step, shadow.size(), bad);
  endtask

  // The victim model: fmap, 4 weight loads, bias. Cycle counts returned.
  localparam ddr_addr_t VICTIM = 32'h4000_0000;
  task automatic victim_inference(output longint cyc_out [6]);
    run(VICTIM + 32'h0000_0000, 0,  0,  64, cyc_out[0]);
    run(VICTIM + 32'h0010_0000, 16, 0,  64, cyc_out[1]);
    run(VICTIM + 32'h0010_0400, 16, 64, 64, cyc_out[2]);
    run(VICTIM + 32'h0010_0800, 17, 0,  64, cyc_out[3]);
    run(VICTIM + 32'h0010_0C00, 17, 64, 64, cyc_out[4]);
    run(VICTIM + 32'h0020_0000, 33, 0,  8,  cyc_out[5]);
  endtask

  initial begin
    longint clean [6], troj [6], c;
    int swaps_before;
    for (int i = 0; i < 8; i++) model[i] = '0;
    for (int i = 0; i < 128; i++) rom_img[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);

    // 1. dormant trojan: the victim model runs unchanged
    victim_inference(clean);
    n_dormant += 6;
    chk(n_swaps == 0, "no swap before programming");
    verify("dormant");

    // 2. program 30 replacement lines over two weight loads
    for (int i = 0; i < 30; i++) program_rom(i, rom_line(i));
    program_tgt(0, '{armed: 1'b1, ddr_addr: VICTIM + 32'h0010_0400,
                     mask: 64'h0000_0003_0000_FFF1, rom_base: 16'd0});       // 15 lines
    program_tgt(1, '{armed: 1'b1, ddr_addr: VICTIM + 32'h0010_0C00,
                     mask: 64'h8000_0000_7FF0_0007, rom_base: 16'd15});      // 15 lines
    swaps_before = n_swaps;
    victim_inference(troj);
    chk(n_swaps - swaps_before == 30, $sformatf("30 lines replaced (got %0d)", n_swaps - swaps_before));
    for (int i = 0; i < 6; i++) begin
      chk(troj[i] == clean[i], $sformatf("load %0d: %0d cycles with trojan, %0d without", i, troj[i], clean[i]));
      if (troj[i] == clean[i]) n_same_timing++;
    end
    verify("backdoored");

    // 3. a different model: the trojan stays dormant for it
    swaps_before = n_swaps;
    run(32'h6000_0000, 18, 0, 64, c);
    run(32'h6000_0400, 18, 64, 48, c);
    run(32'h6000_0800, 5, 100, 33, c);
    n_nontarget += 3;
    chk(n_swaps == swaps_before, "no swap for another model");
    verify("other model");

    // 4. victim again, with data-bus stalls
    stall_en = 1;
    victim_inference(troj);
    chk(req_stalls > 0 && data_stalls > 0, "bus stalls");
    verify("stalled bus");

    // 5. a load to a bank that does not exist, and one that wraps
    run(32'h7000_0000, 40, 0, 4, c);
    run(32'h7000_1000, 20, 2040, 20, c);
    chk(n_drops == 4, $sformatf("4 lines dropped (got %0d)", n_drops));
    @(negedge clk);
    ram_rd_en = 1; ram_rd_bank = 6'd40; ram_rd_addr = '0;
    @(negedge clk);
    ram_rd_en = 0;
    chk(ram_rd_data == '0 && ram_rd_region == REG_INVALID, "read of a missing bank");
    if (ram_rd_region == REG_INVALID) n_reg_inv++;
    verify("drop and wrap");

    // 6. reprogram after a model update: new ROM lines, new mask
    stall_en = 0;
    for (int i = 0; i < 30; i++) program_rom(40 + i, rom_line(1000 + i));
    program_tgt(0, '{armed: 1'b1, ddr_addr: VICTIM + 32'h0010_0400,
                     mask: 64'hFFFF_0000_0000_0000, rom_base: 16'd40});
    program_tgt(1, '{armed: 1'b0, ddr_addr: '0, mask: '0, rom_base: '0});
    program_tgt(7, '{armed: 1'b1, ddr_addr: VICTIM + 32'h0010_0000,
                     mask: 64'h0000_0000_0000_3FFF, rom_base: 16'd56});
    n_reprog++;
    victim_inference(troj);
    verify("reprogrammed");

    // mechanisms
    chk(n_cfg > 0, "CFG state");
    chk(n_dormant > 0, "dormant loads");
    chk(n_hit_loads > 0, "target loads");
    chk(n_swaps > 0, "line swaps");
    chk(n_b2b_swaps > 0, "back-to-back swaps");
    chk(n_nontarget > 0, "non-target loads while armed");
    chk(n_multiburst > 0, "multi-burst loads");
    chk(n_drops > 0, "dropped lines");
    chk(n_wrap > 0, "bank wrap");
    chk(n_reprog > 0, "reprogramming");
    chk(n_same_timing > 0, "unchanged load timing");
    chk(n_reg_fm > 0 && n_reg_w > 0 && n_reg_b > 0 && n_reg_inv > 0, "all regions read");
    $display("mechanisms: cfg=%0d dormant=%0d target_loads=%0d swaps=%0d b2b_swaps=%0d nontarget=%0d multiburst=%0d drops=%0d wrap=%0d reprog=%0d same_timing=%0d req_stalls=%0d data_stalls=%0d regions fm/w/b/inv=%0d/%0d/%0d/%0d",
             n_cfg, n_dormant, n_hit_loads, n_swaps, n_b2b_swaps, n_nontarget, n_multiburst, n_drops, n_wrap,
             n_reprog, n_same_timing, req_stalls, data_stalls, n_reg_fm, n_reg_w, n_reg_b, n_reg_inv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
