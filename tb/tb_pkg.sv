// tb_pkg: helpers shared by the testbenches.
//
// ddr_line(addr) is the content of the 16-byte shared-memory line at byte
// address addr in the behavioural shared-memory model; testbenches use the
// same function to work out what must arrive in the on-chip RAM.
// rom_line(i) is the manipulated line the testbenches program into trojan
// ROM line i; it never equals any ddr_line, so a swap is always visible.
package tb_pkg;
  import dpu_pkg::*;

  function automatic line_t ddr_line(ddr_addr_t a);
    return {a * 32'd2654435761, ~a, a ^ 32'h5A5A_1234, a};
  endfunction

  function automatic line_t rom_line(int i);
    return {32'hBAD0_0000 + i, 32'hDEAD_BEEF, 32'hC0DE_0000 ^ i, 32'hFFFF_FFFF - i};
  endfunction
endpackage
