// UART of the heart-rate SoC: AHB-Lite serial port that carries the measured
// heart rate to a PC terminal (and can receive bytes from it).
//
// Frames are 8N1: a low start bit, eight data bits LSB first, a high stop
// bit, each bit BAUDDIV clock cycles long (reset value CLK_HZ/BAUD, 5208 for
// 9600 baud at 50 MHz). Writes to DATA go into a transmit FIFO that a shift
// register drains; the receiver synchronises rxd with two flops, waits for a
// falling edge, checks the start bit half a bit later and then samples each
// bit once in its middle, pushing the byte into a receive FIFO. A full
// receive FIFO drops the byte and sets the sticky rx_overrun flag; a write
// to a full transmit FIFO is dropped and sets tx_overflow.
//
// Registers: 0x00 DATA (write: push TX; read: head of RX, popped by the
// read), 0x04 STATUS {bit5 tx_overflow, bit4 rx_overrun, bit3 rx_full,
// bit2 rx_valid, bit1 tx_idle, bit0 tx_full}; writing 1 to bits 4/5 clears
// them, 0x08 CTRL {bit3 rx_irq_en, bit2 tx_irq_en, bit1 rx_en, bit0 tx_en},
// reset 0x3, 0x0C BAUDDIV (16 bits, values below 4 act as 4). irq is raised
// when rx_valid and rx_irq_en, or when the transmit FIFO is empty and
// tx_irq_en. Zero wait states. The system description says only that the
// heart rate is sent to a PC by UART; frame format, FIFOs, registers and
// baud rate are this design's choices.
module ahb_uart
  import ahb_pkg::*;
#(
  parameter int unsigned CLK_HZ     = 50_000_000,
  parameter int unsigned BAUD       = 9600,
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic     clk,
  input  logic     rst_n,
  input  ahb_req_t req,
  input  logic     hsel,
  input  logic     hready,
  output ahb_rsp_t rsp,
  output logic     txd,
  input  logic     rxd,
  output logic     irq
);

  localparam logic [15:0] DIV_RESET = 16'(CLK_HZ / BAUD);
  localparam int unsigned CW = $clog2(FIFO_DEPTH + 1);

  // ---------------------------------------------------------------- bus side
  logic        wr_pend, rd_pend;
  logic [11:0] addr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_pend <= 1'b0;
      rd_pend <= 1'b0;
      addr_q  <= '0;
    end else if (hready) begin
      wr_pend <= hsel && is_active(req.htrans) &&  req.hwrite;
      rd_pend <= hsel && is_active(req.htrans) && !req.hwrite;
      addr_q  <= {req.haddr[11:2], 2'b00};
    end
  end

  logic [15:0] div_q;
  logic [3:0]  ctrl_q;
  logic        tx_ovf_q, rx_ovr_q;
  logic [15:0] div_eff;

  assign div_eff = (div_q < 16'd4) ? 16'd4 : div_q;

  // ---------------------------------------------------------------- FIFOs
  logic          txf_push, txf_pop, txf_empty, txf_full;
  logic [7:0]    txf_head;
  logic [CW-1:0] txf_count;
  logic          rxf_push, rxf_pop, rxf_empty, rxf_full;
  logic [7:0]    rxf_head, rx_byte;
  logic [CW-1:0] rxf_count;

  assign txf_push = wr_pend && addr_q == UART_DATA;
  assign rxf_pop  = rd_pend && addr_q == UART_DATA;

  sync_fifo #(.WIDTH(8), .DEPTH(FIFO_DEPTH)) u_txf (
    .clk, .rst_n, .push(txf_push), .wdata(req.hwdata[7:0]), .pop(txf_pop),
    .rdata(txf_head), .empty(txf_empty), .full(txf_full), .count(txf_count));

  sync_fifo #(.WIDTH(8), .DEPTH(FIFO_DEPTH)) u_rxf (
    .clk, .rst_n, .push(rxf_push), .wdata(rx_byte), .pop(rxf_pop),
    .rdata(rxf_head), .empty(rxf_empty), .full(rxf_full), .count(rxf_count));

  // ---------------------------------------------------------------- transmitter
  logic        tx_busy;
  logic [8:0]  tx_shift;   // {data, start} then stop shifted in as 1s
  logic [3:0]  tx_bits;    // bits left to send after the current one
  logic [15:0] tx_cnt;

  assign txf_pop = ctrl_q[0] && !tx_busy && !txf_empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_busy  <= 1'b0;
      tx_shift <= '1;
      tx_bits  <= '0;
      tx_cnt   <= '0;
      txd      <= 1'b1;
    end else if (!tx_busy) begin
      txd <= 1'b1;
      if (txf_pop) begin
        tx_busy  <= 1'b1;
        tx_shift <= {txf_head, 1'b0};
        tx_bits  <= 4'd9;
        tx_cnt   <= div_eff - 16'd1;
        txd      <= 1'b0;
      end
    end else if (tx_cnt != '0) begin
      tx_cnt <= tx_cnt - 16'd1;
    end else if (tx_bits != '0) begin
      tx_shift <= {1'b1, tx_shift[8:1]};
      txd      <= tx_shift[1];
      tx_bits  <= tx_bits - 4'd1;
      tx_cnt   <= div_eff - 16'd1;
    end else begin
      tx_busy <= 1'b0;   // stop bit done
      txd     <= 1'b1;
    end
  end

  // ---------------------------------------------------------------- receiver
  logic [1:0]  rx_sync;
  logic        rx_in, rx_prev;
  logic        rx_busy;
  logic [3:0]  rx_bits;
  logic [15:0] rx_cnt;
  logic [7:0]  rx_shift;

  assign rx_in = rx_sync[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_sync  <= 2'b11;
      rx_prev  <= 1'b1;
      rx_busy  <= 1'b0;
      rx_bits  <= '0;
      rx_cnt   <= '0;
      rx_shift <= '0;
      rxf_push <= 1'b0;
      rx_byte  <= '0;
    end else begin
      rx_sync  <= {rx_sync[0], rxd};
      rx_prev  <= rx_in;
      rxf_push <= 1'b0;
      if (!rx_busy) begin
        if (ctrl_q[1] && rx_prev && !rx_in) begin   // falling edge: start bit
          rx_busy <= 1'b1;
          rx_bits <= 4'd0;
          rx_cnt  <= (div_eff >> 1) - 16'd1;
        end
      end else if (rx_cnt != '0) begin
        rx_cnt <= rx_cnt - 16'd1;
      end else begin
        rx_cnt <= div_eff - 16'd1;
        if (rx_bits == 4'd0) begin
          if (rx_in) rx_busy <= 1'b0;            // false start
          else       rx_bits <= 4'd1;
        end else if (rx_bits <= 4'd8) begin
          rx_shift <= {rx_in, rx_shift[7:1]};
          rx_bits  <= rx_bits + 4'd1;
        end else begin                            // stop bit
          rx_busy <= 1'b0;
          if (rx_in) begin
            rxf_push <= 1'b1;
            rx_byte  <= rx_shift;
          end
        end
      end
    end
  end

  // ---------------------------------------------------------------- registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div_q    <= DIV_RESET;
      ctrl_q   <= 4'b0011;
      tx_ovf_q <= 1'b0;
      rx_ovr_q <= 1'b0;
    end else begin
      if (txf_push && txf_full)               tx_ovf_q <= 1'b1;
      if (rxf_push && rxf_full && !rxf_pop)   rx_ovr_q <= 1'b1;
      if (wr_pend) begin
        unique case (addr_q)
          UART_CTRL:    ctrl_q <= req.hwdata[3:0];
          UART_BAUDDIV: div_q  <= req.hwdata[15:0];
          UART_STATUS: begin
            if (req.hwdata[4]) rx_ovr_q <= 1'b0;
            if (req.hwdata[5]) tx_ovf_q <= 1'b0;
          end
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    rsp.hready = 1'b1;
    rsp.hresp  = 1'b0;
    unique case (addr_q)
      UART_DATA:    rsp.hrdata = {24'd0, rxf_empty ? 8'd0 : rxf_head};
      UART_STATUS:  rsp.hrdata = {26'd0, tx_ovf_q, rx_ovr_q, rxf_full, !rxf_empty,
                                  txf_empty && !tx_busy, txf_full};
      UART_CTRL:    rsp.hrdata = {28'd0, ctrl_q};
      UART_BAUDDIV: rsp.hrdata = {16'd0, div_q};
      default:      rsp.hrdata = '0;
    endcase
  end

  assign irq = (ctrl_q[3] && !rxf_empty) || (ctrl_q[2] && txf_empty);

  // Unused FIFO occupancy counts are kept for waveform debugging.
  logic unused_ok;
  assign unused_ok = ^{txf_count, rxf_count};

endmodule
