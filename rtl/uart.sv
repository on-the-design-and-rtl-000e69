// uart: serial port (8 data bits, no parity, 1 stop bit) to the workstation, which sends
// firmware and microcode updates through it.
//
// Registers (read data one cycle after the address):
//   offset 0  write: send a byte (ignored while busy); read: received byte, taking it
//             (req.re) empties the receive register
//   offset 4  read: bit 0 transmitter busy, bit 1 receive byte valid, bit 2 overrun
// One bit lasts CLK_DIV clocks (868 gives 115200 baud at 100 MHz).  The receiver
// synchronises rx with two flip-flops, waits half a bit after the falling start edge and then
// samples in the middle of each bit.  The document names the UART and its use; the framing,
// rate and register layout are this design's choice.
module uart
  import ucpu_pkg::*;
#(
  parameter int unsigned CLK_DIV = 868
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        sel,
  input  bus_req_t    req,
  output logic [31:0] rdata,
  input  logic        rx,
  output logic        tx
);
  localparam int unsigned CW = $clog2(CLK_DIV + 1);

  // transmitter
  logic [9:0]    tx_sh;
  logic [3:0]    tx_bits;
  logic [CW-1:0] tx_cnt;
  logic          tx_busy;

  // receiver
  logic [1:0]    rx_sync;
  logic          rx_act;
  logic [3:0]    rx_bits;
  logic [CW-1:0] rx_cnt;
  logic [7:0]    rx_sh, rx_data;
  logic          rx_valid, rx_ovr;

  assign tx_busy = (tx_bits != 4'd0);
  assign tx      = tx_sh[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_sh   <= '1;
      tx_bits <= '0;
      tx_cnt  <= '0;
    end else if (!tx_busy) begin
      if (sel && req.we && req.addr[7:2] == 6'd0) begin
        tx_sh   <= {1'b1, req.wdata[7:0], 1'b0};
        tx_bits <= 4'd10;
        tx_cnt  <= CW'(CLK_DIV - 1);
      end
    end else if (tx_cnt == '0) begin
      tx_sh   <= {1'b1, tx_sh[9:1]};
      tx_bits <= tx_bits - 4'd1;
      tx_cnt  <= CW'(CLK_DIV - 1);
    end else begin
      tx_cnt <= tx_cnt - 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_sync  <= '1;
      rx_act   <= 1'b0;
      rx_bits  <= '0;
      rx_cnt   <= '0;
      rx_sh    <= '0;
      rx_data  <= '0;
      rx_valid <= 1'b0;
      rx_ovr   <= 1'b0;
    end else begin
      rx_sync <= {rx_sync[0], rx};
      if (sel && req.re && req.addr[7:2] == 6'd0) rx_valid <= 1'b0;
      if (!rx_act) begin
        if (!rx_sync[1]) begin
          rx_act  <= 1'b1;
          rx_bits <= 4'd0;
          rx_cnt  <= CW'(CLK_DIV / 2);
        end
      end else if (rx_cnt != '0) begin
        rx_cnt <= rx_cnt - 1'b1;
      end else begin
        rx_cnt <= CW'(CLK_DIV - 1);
        if (rx_bits == 4'd0) begin
          if (rx_sync[1]) rx_act <= 1'b0;               // false start bit
          rx_bits <= 4'd1;
        end else if (rx_bits <= 4'd8) begin
          rx_sh   <= {rx_sync[1], rx_sh[7:1]};
          rx_bits <= rx_bits + 4'd1;
        end else begin                                  // stop bit
          rx_act <= 1'b0;
          if (rx_sync[1]) begin
            rx_data  <= rx_sh;
            rx_ovr   <= rx_ovr | (rx_valid && !(sel && req.re && req.addr[7:2] == 6'd0));
            rx_valid <= 1'b1;
          end
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rdata <= '0;
    else if (req.addr[2]) rdata <= {29'd0, rx_ovr, rx_valid, tx_busy};
    else rdata <= {24'd0, rx_data};
  end
endmodule
