// ddr_model: behavioural model of the shared memory behind the DPU data bus.
//
// Not synthesizable design logic: a testbench stand-in for the platform's
// external memory. It accepts one burst read request at a time
// (req_valid/req_ready, byte address, length in 16-byte lines) and returns
// the burst's lines on the data channel, line i carrying
// tb_pkg::ddr_line(addr + 16*i). With stall_en set, req_ready and data_valid
// are withheld at random to exercise the handshakes; with stall_en clear, a
// request is accepted at once and its lines follow one per cycle from the
// next cycle on. It counts the cycles it stalled either channel.
module ddr_model
  import dpu_pkg::*;
  import tb_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      stall_en,
  input  logic      req_valid,
  output logic      req_ready,
  input  ddr_addr_t req_addr,
  input  len_t      req_len,
  output logic      data_valid,
  input  logic      data_ready,
  output line_t     data,
  output int        req_stalls,
  output int        data_stalls
);

  logic      busy;
  ddr_addr_t addr_q;
  len_t      left_q;
  logic      rdy_rand, val_rand;

  always_ff @(posedge clk) begin
    rdy_rand <= stall_en ? ($urandom_range(0, 3) != 0) : 1'b1;
    val_rand <= stall_en ? ($urandom_range(0, 3) != 0) : 1'b1;
  end

  assign req_ready  = !busy && rdy_rand;
  assign data_valid = busy && val_rand;
  assign data       = ddr_line(addr_q);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy        <= 1'b0;
      addr_q      <= '0;
      left_q      <= '0;
      req_stalls  <= 0;
      data_stalls <= 0;
    end else begin
      if (req_valid && !req_ready) req_stalls <= req_stalls + 1;
      if (busy && !data_valid)     data_stalls <= data_stalls + 1;
      if (!busy && req_valid && req_ready && req_len != '0) begin
        busy   <= 1'b1;
        addr_q <= req_addr;
        left_q <= req_len;
      end else if (data_valid && data_ready) begin
        addr_q <= addr_q + LINE_BYTES;
        left_q <= left_q - 1'b1;
        if (left_q == len_t'(1)) busy <= 1'b0;
      end
    end
  end

endmodule
