// ucode_update: in-field microcode update unit.
//
// Software (typically the loader, after receiving an update over the UART) stages update
// entries in an internal buffer and then requests a flush.  The flush holds the core at its
// next instruction boundary, copies every staged entry into the microcode store or the
// dispatch table (one entry per clock), empties the buffer and releases the core.  This is
// the two-step "store internally, then flush" mechanism of the document; the register layout,
// the buffer depth and copying one entry per cycle are this design's choice.
//
// Registers (offsets from the unit's base; read data one cycle after the address):
//   0x00 ADDR    bit 31: 0 = microcode word, 1 = dispatch entry; low bits: address / key
//   0x04 DATA0   microinstruction bits 31:0 (for a dispatch entry: the start address)
//   0x08 DATA1   microinstruction bits 63:32
//   0x0C DATA2   microinstruction bits 95:64 (only the low UI_W-64 bits are used)
//   0x10 PUSH    any write appends {ADDR, DATA2..0} to the buffer (dropped when full)
//   0x14 FLUSH   any write starts the flush
//   0x18 STATUS  bits 15:0 staged entries, bit 30 an entry was dropped, bit 31 busy
module ucode_update
  import ucpu_pkg::*;
#(
  parameter int unsigned DEPTH = 128
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             sel,
  input  bus_req_t         req,
  output logic [31:0]      rdata,
  output logic             hold_req,
  input  logic             hold_ack,
  output logic             uc_we,
  output uaddr_t           uc_waddr,
  output uinstr_t          uc_wdata,
  output logic             dt_we,
  output logic [KEY_W-1:0] dt_waddr,
  output uaddr_t           dt_wdata,
  output logic             busy
);
  localparam int unsigned IW = $clog2(DEPTH + 1);

  typedef struct packed {
    logic        dtab;
    uaddr_t      addr;
    logic [95:0] data;
  } entry_t;

  typedef enum logic [1:0] { S_IDLE, S_WAIT, S_COPY, S_DONE } state_e;

  entry_t        buf_q [DEPTH];
  entry_t        cur;
  logic [31:0]   addr_q, d0_q, d1_q, d2_q;
  logic [IW-1:0] count, idx;
  logic          dropped;
  state_e        state;
  logic          wr;

  assign wr = sel && req.we;

  always_ff @(posedge clk) begin
    if (wr && req.addr[7:0] == 8'h10 && state == S_IDLE && count < IW'(DEPTH))
      buf_q[count[$clog2(DEPTH)-1:0]] <= '{dtab: addr_q[31], addr: addr_q[UADDR_W-1:0],
                                           data: {d2_q, d1_q, d0_q}};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr_q  <= '0;
      d0_q    <= '0;
      d1_q    <= '0;
      d2_q    <= '0;
      count   <= '0;
      idx     <= '0;
      dropped <= 1'b0;
      state   <= S_IDLE;
      rdata   <= '0;
    end else begin
      if (wr && state == S_IDLE) begin
        unique case (req.addr[7:0])
          8'h00: addr_q <= req.wdata;
          8'h04: d0_q   <= req.wdata;
          8'h08: d1_q   <= req.wdata;
          8'h0C: d2_q   <= req.wdata;
          8'h10: if (count < IW'(DEPTH)) count <= count + 1'b1;
                 else dropped <= 1'b1;
          8'h14: state <= S_WAIT;
          default: ;
        endcase
      end
      unique case (state)
        S_WAIT: if (hold_ack) begin
          idx   <= '0;
          state <= (count == '0) ? S_DONE : S_COPY;
        end
        S_COPY: begin
          if (idx == count - 1'b1) state <= S_DONE;
          idx <= idx + 1'b1;
        end
        S_DONE: begin
          count <= '0;
          state <= S_IDLE;
        end
        default: ;
      endcase
      unique case (req.addr[7:0])
        8'h00:   rdata <= addr_q;
        8'h04:   rdata <= d0_q;
        8'h08:   rdata <= d1_q;
        8'h0C:   rdata <= d2_q;
        8'h18:   rdata <= {busy, dropped, 14'd0, 16'(count)};
        default: rdata <= '0;
      endcase
    end
  end

  assign busy     = (state != S_IDLE);
  assign hold_req = (state == S_WAIT) || (state == S_COPY) || (state == S_DONE);
  assign cur      = buf_q[idx[$clog2(DEPTH)-1:0]];
  assign uc_we    = (state == S_COPY) && !cur.dtab;
  assign dt_we    = (state == S_COPY) && cur.dtab;
  assign uc_waddr = cur.addr;
  assign uc_wdata = cur.data[UI_W-1:0];
  assign dt_waddr = cur.addr[KEY_W-1:0];
  assign dt_wdata = cur.data[UADDR_W-1:0];

  // The core must stay held for the whole copy.
  a_held_during_copy: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_COPY) |-> hold_ack);
endmodule
