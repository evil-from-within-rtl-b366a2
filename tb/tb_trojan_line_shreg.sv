// tb_trojan_line_shreg: self-checking test of the trojan's line-select
// shift register. Loads random 64-bit masks, shifts them out line by line
// (with idle cycles in between, which must not shift) and checks sel against
// the mask bit of each line, including the zeros after the 64th line; then
// checks clear and reset.
module tb_trojan_line_shreg;
  import dpu_pkg::*;

  logic clk = 0, rst_n = 0, clear = 0, load = 0, shift = 0, sel;
  mask_t mask_in = '0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  trojan_line_shreg dut (.clk, .rst_n, .clear, .load, .mask_in, .shift, .sel);

  task automatic check(bit got, bit exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b exp %0b", what, got, exp);
    end
  endtask

  initial begin
    #20000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mask_t m;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(sel, 1'b0, "after reset");
    for (int t = 0; t < 4; t++) begin
      m = {$urandom, $urandom};
      if (t == 0) m = 64'h8000_0000_0000_0001;
      load = 1; mask_in = m;
      @(negedge clk);
      load = 0;
      for (int i = 0; i < 70; i++) begin
        check(sel, (i < 64) ? m[i] : 1'b0, $sformatf("mask %0d line %0d", t, i));
        shift = 1;
        @(negedge clk);
        shift = 0;
        if (i % 5 == 0) begin
          @(negedge clk);   // idle cycle: no shift
        end
      end
    end
    load = 1; mask_in = '1;
    @(negedge clk);
    load = 0;
    check(sel, 1'b1, "loaded all ones");
    clear = 1;
    @(negedge clk);
    clear = 0;
    check(sel, 1'b0, "after clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
