// timer: cycle counter (TIM) used to measure execution time in clock cycles.
//
// A 64-bit counter that increments every clock.  Offset 0 reads the low word, offset 4 the
// high word (read data is registered, one cycle after the address).  Any write to offset 0
// clears the counter.  The document gives only the counter's purpose; register layout and
// width are this design's choice.
module timer
  import ucpu_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        sel,
  input  bus_req_t    req,
  output logic [31:0] rdata
);
  logic [63:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt   <= '0;
      rdata <= '0;
    end else begin
      if (sel && req.we && req.addr[7:2] == 6'd0) cnt <= '0;
      else cnt <= cnt + 64'd1;
      rdata <= req.addr[2] ? cnt[63:32] : cnt[31:0];
    end
  end
endmodule
