// tb_trojan_rom: self-checking test of the trojan ROM. Programs every line
// with a distinct pattern, reads them back in random order checking the
// one-cycle read latency, then reprograms some lines and checks that only
// those changed.
module tb_trojan_rom;
  import dpu_pkg::*;
  import tb_pkg::*;

  localparam int N = 128;
  logic clk = 0, prog_we = 0;
  logic [6:0] prog_addr = '0, rd_addr = '0;
  line_t prog_data = '0, rd_data;
  line_t model [N];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  trojan_rom #(.ROM_LINES(N)) dut (.clk, .prog_we, .prog_addr, .prog_data, .rd_addr, .rd_data);

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic rd(int a);
    rd_addr = 7'(a);
    @(negedge clk);
    checks++;
    if (rd_data !== model[a]) begin
      failures++;
      $display("FAIL line %0d: got %h exp %h", a, rd_data, model[a]);
    end
  endtask

  initial begin
    @(negedge clk);
    for (int i = 0; i < N; i++) begin
      prog_we = 1; prog_addr = 7'(i); prog_data = rom_line(i); model[i] = rom_line(i);
      @(negedge clk);
    end
    prog_we = 0;
    for (int i = 0; i < 300; i++) rd($urandom_range(0, N - 1));
    for (int i = 0; i < 10; i++) begin
      automatic int a = $urandom_range(0, N - 1);
      prog_we = 1; prog_addr = 7'(a); prog_data = {$urandom, $urandom, $urandom, $urandom};
      model[a] = prog_data;
      @(negedge clk);
    end
    prog_we = 0;
    for (int i = 0; i < N; i++) rd(i);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
