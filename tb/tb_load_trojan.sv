// tb_load_trojan: self-checking test of the trojan alone, driven the way the
// memory reader drives it. Runs loads before programming (nothing may
// change), then programs a few targets and their ROM lines and runs target
// and non-target loads of up to 80 lines with random idle cycles between
// lines. Every line leaving the trojan is compared, in the cycle it enters,
// with an independent model: line i of a target load is replaced by the
// next ROM line of that target exactly when bit i of its mask is set.
module tb_load_trojan;
  import dpu_pkg::*;
  import tb_pkg::*;

  localparam int NT = 4, RL = 128;
  logic clk = 0, rst_n = 0;
  logic cfg_valid = 0, load_done = 0;
  ddr_addr_t cfg_ddr_addr = '0;
  line_wr_t in_line = '0, out_line;
  logic tgt_we = 0, rom_we = 0, active, swap;
  logic [1:0] tgt_idx = '0;
  trojan_target_t tgt_entry = '0;
  logic [6:0] rom_addr = '0;
  line_t rom_wdata = '0;
  trojan_target_t model [NT];
  int checks = 0, failures = 0, n_swaps = 0;

  always #5 clk = ~clk;

  load_trojan #(.NUM_TARGETS(NT), .ROM_LINES(RL)) dut (
    .clk, .rst_n, .cfg_valid, .cfg_ddr_addr, .load_done, .in_line, .out_line,
    .tgt_we, .tgt_idx, .tgt_entry, .rom_we, .rom_addr, .rom_wdata, .active, .swap);

  initial begin
    #2000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_load(ddr_addr_t a, int n);
    int t = -1, k = 0;
    for (int i = 0; i < NT; i++) if (t < 0 && model[i].armed && model[i].ddr_addr == a) t = i;
    @(negedge clk);
    cfg_valid = 1; cfg_ddr_addr = a;
    @(negedge clk);
    cfg_valid = 0;
    for (int i = 0; i < n; i++) begin
      line_t exp;
      if ($urandom_range(0, 2) == 0) @(negedge clk);
      in_line.valid = 1;
      in_line.bank_id = 6'd20;
      in_line.bank_addr = 11'(i);
      in_line.data = ddr_line(a + 16 * i);
      exp = in_line.data;
      if (t >= 0 && i < 64 && model[t].mask[i]) begin
        exp = rom_line(int'(model[t].rom_base) + k);
        k++;
      end
      #1;
      checks++;
      if (out_line.data !== exp || out_line.valid !== 1'b1 || out_line.bank_addr !== 11'(i)
          || out_line.bank_id !== 6'd20 || active !== (t >= 0)) begin
        failures++;
        $display("FAIL load %h line %0d: got %h exp %h (active %0b)", a, i, out_line.data, exp, active);
      end
      if (swap) n_swaps++;
      @(negedge clk);
      in_line.valid = 0;
    end
    load_done = 1;
    @(negedge clk);
    load_done = 0;
    checks++;
    if (active !== 1'b0) begin
      failures++;
      $display("FAIL active after load_done");
    end
  endtask

  initial begin
    for (int i = 0; i < NT; i++) model[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // dormant: no programming yet
    run_load(32'h2000_0000, 40);
    run_load(32'h0, 10);
    // program ROM and targets
    for (int i = 0; i < RL; i++) begin
      rom_we = 1; rom_addr = 7'(i); rom_wdata = rom_line(i);
      @(negedge clk);
    end
    rom_we = 0;
    model[0] = '{armed: 1'b1, ddr_addr: 32'h2000_0000, mask: 64'h8000_0000_0000_0007, rom_base: 16'd0};
    model[1] = '{armed: 1'b1, ddr_addr: 32'h2000_0400, mask: {$urandom, $urandom}, rom_base: 16'd10};
    model[2] = '{armed: 1'b1, ddr_addr: 32'h2000_0800, mask: 64'h0F0F_0000_0000_1000, rom_base: 16'd80};
    model[3] = '{armed: 1'b0, ddr_addr: 32'h2000_0C00, mask: '1, rom_base: 16'd0};
    for (int i = 0; i < NT; i++) begin
      tgt_we = 1; tgt_idx = 2'(i); tgt_entry = model[i];
      @(negedge clk);
    end
    tgt_we = 0;
    run_load(32'h2000_0000, 64);
    run_load(32'h2000_0400, 80);
    run_load(32'h3000_0000, 64);   // not a target
    run_load(32'h2000_0C00, 64);   // disarmed target
    run_load(32'h2000_0800, 64);
    run_load(32'h2000_0000, 20);   // shorter load of a target
    checks++;
    if (n_swaps == 0) begin
      failures++;
      $display("FAIL no swap happened");
    end
    $display("swaps=%0d", n_swaps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
