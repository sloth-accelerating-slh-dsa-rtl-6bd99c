// sloth_uart: 8N1 serial port (console) on the system bus.
//
// Registers: 0x0 DATA (write: send a byte; read: last received byte, which
// clears the receive flag), 0x4 STATUS (bit 0 transmitter busy, bit 1 byte
// received, bit 2 receive overrun), 0x8 DIV (clock cycles per bit, reset
// DEFAULT_DIV). The transmitter sends a start bit, 8 data bits LSB first and
// a stop bit, each DIV cycles long; a write to DATA while busy is dropped.
// The receiver synchronizes uart_rx_i, samples the middle of each bit and
// keeps one byte. Every access is answered one cycle after the request.
// The document only names a UART; everything here is this design's choice.
module sloth_uart
  import sloth_pkg::*;
#(
  parameter int unsigned DEFAULT_DIV = 217
) (
  input  logic     clk,
  input  logic     rst_n,
  input  bus_req_t req,
  output bus_rsp_t rsp,
  input  logic     uart_rx_i,
  output logic     uart_tx_o
);
  logic        acc, wr, rd;
  logic [1:0]  reg_sel;
  logic [15:0] div;
  assign acc     = req.valid && !rsp.ready;
  assign wr      = acc && (req.wstrb != 4'b0);
  assign rd      = acc && (req.wstrb == 4'b0);
  assign reg_sel = req.addr[3:2];

  // transmitter
  logic [9:0]  tx_sh;
  logic [3:0]  tx_bits;
  logic [15:0] tx_cnt;
  logic        tx_busy;
  assign tx_busy = (tx_bits != 4'd0);

  // receiver
  logic        rx_q1, rx_q2;
  logic [7:0]  rx_sh, rx_data;
  logic [3:0]  rx_bits;
  logic [15:0] rx_cnt;
  logic        rx_active, rx_valid, rx_ovr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div       <= 16'(DEFAULT_DIV);
      tx_sh     <= '1;
      tx_bits   <= '0;
      tx_cnt    <= '0;
      rx_q1     <= 1'b1;
      rx_q2     <= 1'b1;
      rx_sh     <= '0;
      rx_data   <= '0;
      rx_bits   <= '0;
      rx_cnt    <= '0;
      rx_active <= 1'b0;
      rx_valid  <= 1'b0;
      rx_ovr    <= 1'b0;
      rsp       <= '0;
    end else begin
      rsp.ready <= acc;
      unique case (reg_sel)
        2'd0:    rsp.rdata <= {24'b0, rx_data};
        2'd1:    rsp.rdata <= {29'b0, rx_ovr, rx_valid, tx_busy};
        2'd2:    rsp.rdata <= {16'b0, div};
        default: rsp.rdata <= '0;
      endcase
      if (wr && reg_sel == 2'd2) div <= (req.wdata[15:0] < 16'd2) ? 16'd2 : req.wdata[15:0];

      // transmit
      if (tx_busy) begin
        if (tx_cnt == div - 16'd1) begin
          tx_cnt  <= '0;
          tx_sh   <= {1'b1, tx_sh[9:1]};
          tx_bits <= tx_bits - 4'd1;
        end else tx_cnt <= tx_cnt + 16'd1;
      end else if (wr && reg_sel == 2'd0) begin
        tx_sh   <= {1'b1, req.wdata[7:0], 1'b0};
        tx_bits <= 4'd10;
        tx_cnt  <= '0;
      end

      // receive
      rx_q1 <= uart_rx_i;
      rx_q2 <= rx_q1;
      if (rd && reg_sel == 2'd0) begin
        rx_valid <= 1'b0;
        rx_ovr   <= 1'b0;
      end
      if (!rx_active) begin
        if (!rx_q2) begin
          rx_active <= 1'b1;
          rx_cnt    <= div >> 1;
          rx_bits   <= 4'd0;
        end
      end else if (rx_cnt == 16'd0) begin
        rx_cnt <= div - 16'd1;
        if (rx_bits == 4'd0) begin
          if (rx_q2) rx_active <= 1'b0;  // false start bit
          else       rx_bits   <= 4'd1;
        end else if (rx_bits <= 4'd8) begin
          rx_sh   <= {rx_q2, rx_sh[7:1]};
          rx_bits <= rx_bits + 4'd1;
        end else begin
          rx_active <= 1'b0;
          if (rx_q2) begin               // valid stop bit
            rx_data  <= rx_sh;
            rx_valid <= 1'b1;
            if (rx_valid && !(rd && reg_sel == 2'd0)) rx_ovr <= 1'b1;
          end
        end
      end else rx_cnt <= rx_cnt - 16'd1;
    end
  end

  assign uart_tx_o = tx_busy ? tx_sh[0] : 1'b1;
endmodule
