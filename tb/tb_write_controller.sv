// tb_write_controller: self-checking test of the LOAD engine's write
// controller. Sends random lines (some to non-existent banks, some cycles
// idle) and checks, one cycle later, the one-hot bank write enable, address,
// data and the drop flag.
module tb_write_controller;
  import dpu_pkg::*;

  logic clk = 0, rst_n = 0;
  line_wr_t in_line = '0;
  logic [NUM_BANKS-1:0] bank_we;
  bank_addr_t wr_addr;
  line_t wr_data;
  logic wr_drop;
  int checks = 0, failures = 0, drops = 0;

  always #5 clk = ~clk;

  write_controller dut (.clk, .rst_n, .in_line, .bank_we, .wr_addr, .wr_data, .wr_drop);

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    line_wr_t prev;
    logic [NUM_BANKS-1:0] exp_we;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < 500; i++) begin
      in_line.valid     = ($urandom_range(0, 3) != 0);
      in_line.bank_id   = (i % 7 == 0) ? 6'($urandom_range(34, 63)) : 6'($urandom_range(0, 33));
      in_line.bank_addr = 11'($urandom);
      in_line.data      = {$urandom, $urandom, $urandom, $urandom};
      prev = in_line;
      @(negedge clk);
      exp_we = '0;
      if (prev.valid && prev.bank_id < 34) exp_we[prev.bank_id] = 1'b1;
      checks++;
      if (bank_we !== exp_we || wr_drop !== (prev.valid && prev.bank_id >= 34)
          || (prev.valid && (wr_addr !== prev.bank_addr || wr_data !== prev.data))) begin
        failures++;
        $display("FAIL step %0d: we %h exp %h drop %0b", i, bank_we, exp_we, wr_drop);
      end
      if (wr_drop) drops++;
    end
    checks++;
    if (drops == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
