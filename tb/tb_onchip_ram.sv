// tb_onchip_ram: self-checking test of the on-chip buffer at its full size
// (34 banks x 2048 lines). Writes random lines to random banks and
// addresses, including the first and last line of every bank, reads them
// back with the one-cycle latency, and checks the region reported for each
// bank (0-15 feature maps, 16-32 weights, 33 biases).
module tb_onchip_ram;
  import dpu_pkg::*;

  logic clk = 0, rst_n = 0, rd_en = 0;
  logic [NUM_BANKS-1:0] bank_we = '0;
  bank_addr_t wr_addr = '0, rd_addr = '0;
  bank_id_t rd_bank = '0;
  line_t wr_data = '0, rd_data;
  region_e rd_region;
  line_t model [int];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  onchip_ram dut (.clk, .rst_n, .bank_we, .wr_addr, .wr_data, .rd_en, .rd_bank, .rd_addr, .rd_data, .rd_region);

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(int b, int a, line_t d);
    bank_we = '0; bank_we[b] = 1'b1; wr_addr = 11'(a); wr_data = d;
    @(negedge clk);
    bank_we = '0;
    model[b * 4096 + a] = d;
  endtask

  task automatic rd(int b, int a);
    region_e er = (b < 16) ? REG_FMAP : (b < 33) ? REG_WEIGHT : REG_BIAS;
    rd_en = 1; rd_bank = 6'(b); rd_addr = 11'(a);
    @(negedge clk);
    rd_en = 0;
    checks++;
    if (rd_data !== model[b * 4096 + a] || rd_region !== er) begin
      failures++;
      $display("FAIL bank %0d line %0d: got %h exp %h region %0d/%0d", b, a, rd_data, model[b * 4096 + a], rd_region, er);
    end
  endtask

  initial begin
    int keys [$];
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < 34; b++) begin
      wr(b, 0, {4{32'(b)}});
      wr(b, 2047, {4{~32'(b)}});
    end
    for (int i = 0; i < 400; i++)
      wr($urandom_range(0, 33), $urandom_range(1, 2046), {$urandom, $urandom, $urandom, $urandom});
    foreach (model[k]) keys.push_back(k);
    foreach (keys[i]) rd(keys[i] / 4096, keys[i] % 4096);
    // a read holds its output while rd_en is low
    rd(5, 0);
    repeat (3) @(negedge clk);
    checks++;
    if (rd_data !== model[5 * 4096]) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
