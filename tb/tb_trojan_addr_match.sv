// tb_trojan_addr_match: self-checking test of the trojan's target table.
// Checks that an unprogrammed table never hits, that programmed entries hit
// with their own mask and ROM base, that disarmed entries and other
// addresses miss, that the lowest index wins on a double match, and that
// reset disarms everything again.
module tb_trojan_addr_match;
  import dpu_pkg::*;

  localparam int NT = 8;
  logic clk = 0, rst_n = 0, prog_we = 0, hit;
  logic [2:0] prog_idx = '0;
  trojan_target_t prog_entry = '0;
  ddr_addr_t lookup_addr = '0;
  mask_t hit_mask;
  logic [6:0] hit_rom_base;
  trojan_target_t model [NT];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  trojan_addr_match #(.NUM_TARGETS(NT), .ROM_AW(7)) dut (
    .clk, .rst_n, .prog_we, .prog_idx, .prog_entry, .lookup_addr, .hit, .hit_mask, .hit_rom_base);

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic look(ddr_addr_t a);
    bit e_hit = 0; mask_t e_mask = '0; logic [6:0] e_base = '0;
    for (int i = 0; i < NT; i++)
      if (!e_hit && model[i].armed && model[i].ddr_addr == a) begin
        e_hit = 1; e_mask = model[i].mask; e_base = model[i].rom_base[6:0];
      end
    lookup_addr = a;
    #1;
    checks++;
    if (hit !== e_hit || (e_hit && (hit_mask !== e_mask || hit_rom_base !== e_base))) begin
      failures++;
      $display("FAIL lookup %h: hit %0b/%0b mask %h/%h base %0d/%0d", a, hit, e_hit, hit_mask, e_mask, hit_rom_base, e_base);
    end
  endtask

  task automatic prog(int i, trojan_target_t e);
    @(negedge clk);
    prog_we = 1; prog_idx = 3'(i); prog_entry = e;
    @(negedge clk);
    prog_we = 0;
    model[i] = e;
  endtask

  initial begin
    for (int i = 0; i < NT; i++) model[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // dormant
    for (int i = 0; i < 20; i++) look(ddr_addr_t'($urandom) & ~32'hF);
    look('0);
    // program all entries
    for (int i = 0; i < NT; i++)
      prog(i, '{armed: (i != 5), ddr_addr: 32'h1000_0000 + i * 32'h400,
                mask: {$urandom, $urandom}, rom_base: 16'(i * 12)});
    for (int i = 0; i < NT; i++) look(32'h1000_0000 + i * 32'h400);
    for (int i = 0; i < 30; i++) look(32'h1000_0000 + $urandom_range(0, 16 * NT) * 32'h80);
    // double match: entry 6 takes entry 2's address
    prog(6, '{armed: 1'b1, ddr_addr: 32'h1000_0800, mask: 64'hF0, rom_base: 16'd99});
    look(32'h1000_0800);
    prog(2, '{armed: 1'b0, ddr_addr: 32'h1000_0800, mask: 64'h1, rom_base: 16'd1});
    look(32'h1000_0800);
    // reset disarms
    @(negedge clk);
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < NT; i++) model[i] = '0;
    for (int i = 0; i < NT; i++) look(32'h1000_0000 + i * 32'h400);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
