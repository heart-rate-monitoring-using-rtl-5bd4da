// Timer of the heart-rate SoC: a 32-bit down counter on AHB-Lite that gives
// the program its sampling period and the time base for inter-beat intervals.
//
// A prescaler divides the clock by PRESCALE+1; each prescaled tick decrements
// VALUE. A tick that finds VALUE at zero sets the expired flag (and the
// interrupt, if enabled) and reloads VALUE from LOAD, so in periodic mode
// the flag is set every (LOAD+1)*(PRESCALE+1) clock cycles. In one-shot mode
// the timer clears its enable at expiry instead of running on.
//
// Registers (word offsets in the 4 KB window): 0x00 LOAD (write also loads
// VALUE), 0x04 VALUE (read only), 0x08 CTRL {bit2 oneshot, bit1 irq_en,
// bit0 enable}, 0x0C PRESCALE (16 bits), 0x10 STATUS (bit0 expired; write 1
// to clear). Zero wait states; writes take effect at the end of their data
// phase. The system description only names "a timer module"; the whole
// register set and its behaviour are this design's choice.
module ahb_timer
  import ahb_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  ahb_req_t req,
  input  logic     hsel,
  input  logic     hready,
  output ahb_rsp_t rsp,
  output logic     irq
);

  logic        wr_pend;
  logic [11:0] addr_q;

  logic [31:0] load_q, value_q;
  logic [15:0] presc_q, pcount_q;
  logic        en_q, irq_en_q, oneshot_q, expired_q;
  logic        tick;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_pend <= 1'b0;
      addr_q  <= '0;
    end else if (hready) begin
      wr_pend <= hsel && is_active(req.htrans) && req.hwrite;
      addr_q  <= {req.haddr[11:2], 2'b00};
    end
  end

  assign tick = en_q && (pcount_q == presc_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      load_q    <= '0;
      value_q   <= '0;
      presc_q   <= '0;
      pcount_q  <= '0;
      en_q      <= 1'b0;
      irq_en_q  <= 1'b0;
      oneshot_q <= 1'b0;
      expired_q <= 1'b0;
    end else begin
      // Counting.
      if (en_q) pcount_q <= tick ? '0 : pcount_q + 16'd1;
      if (tick) begin
        if (value_q == '0) begin
          expired_q <= 1'b1;
          value_q   <= load_q;
          if (oneshot_q) en_q <= 1'b0;
        end else begin
          value_q <= value_q - 32'd1;
        end
      end
      // Register writes win over counting, except that an expiry in the
      // same cycle as a clear of STATUS is not lost.
      if (wr_pend) begin
        unique case (addr_q)
          TMR_LOAD: begin
            load_q  <= req.hwdata;
            value_q <= req.hwdata;
          end
          TMR_CTRL: begin
            en_q      <= req.hwdata[0];
            irq_en_q  <= req.hwdata[1];
            oneshot_q <= req.hwdata[2];
            pcount_q  <= '0;
          end
          TMR_PRESCALE: begin
            presc_q  <= req.hwdata[15:0];
            pcount_q <= '0;
          end
          TMR_STATUS: if (req.hwdata[0] && !(tick && value_q == '0)) expired_q <= 1'b0;
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    rsp.hready = 1'b1;
    rsp.hresp  = 1'b0;
    unique case (addr_q)
      TMR_LOAD:     rsp.hrdata = load_q;
      TMR_VALUE:    rsp.hrdata = value_q;
      TMR_CTRL:     rsp.hrdata = {29'd0, oneshot_q, irq_en_q, en_q};
      TMR_PRESCALE: rsp.hrdata = {16'd0, presc_q};
      TMR_STATUS:   rsp.hrdata = {31'd0, expired_q};
      default:      rsp.hrdata = '0;
    endcase
  end

  assign irq = expired_q && irq_en_q;

endmodule
