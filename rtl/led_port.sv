// led_port: memory-mapped LED output register.
//
// Offset 0 holds N_LED bits that drive the board LEDs; writes replace them, reads return
// them one cycle after the address.  Reset turns all LEDs off.  The document only mentions an
// LED driver; the width (16, the LED count of the board it names) is this design's choice.
module led_port
  import ucpu_pkg::*;
#(
  parameter int unsigned N_LED = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             sel,
  input  bus_req_t         req,
  output logic [31:0]      rdata,
  output logic [N_LED-1:0] led
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      led   <= '0;
      rdata <= '0;
    end else begin
      if (sel && req.we) begin
        for (int i = 0; i < N_LED; i++) if (req.be[i/8]) led[i] <= req.wdata[i];
      end
      rdata <= 32'(led);
    end
  end
endmodule
