// General-purpose I/O of the heart-rate SoC on AHB-Lite: drives the 16 LEDs
// and reads the general inputs and the eight data lines of the external
// free-running 8-bit ADC.
//
// The output register (0x00 OUT) drives led directly and reads back. The
// inputs (0x04 IN) and the ADC data lines DB7..DB0 (0x08 ADC) come from
// outside the clock domain, so each passes a two-flop synchroniser; a read
// returns the synchronised value of the cycle before the data phase. The
// ADC converts continuously and is never commanded, so reading 0x08 simply
// takes the latest conversion. Zero wait states; only word transfers are
// meaningful and a write of any size updates the whole OUT register.
//
// The 16 LEDs, the 8-bit ADC and the fixed split into input, output and ADC
// ports follow the system description; register offsets, the synchronisers
// and the input width are this design's choices.
module ahb_gpio
  import ahb_pkg::*;
#(
  parameter int unsigned LED_WIDTH = 16,
  parameter int unsigned IN_WIDTH  = 16,
  parameter int unsigned ADC_WIDTH = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  ahb_req_t             req,
  input  logic                 hsel,
  input  logic                 hready,
  output ahb_rsp_t             rsp,
  output logic [LED_WIDTH-1:0] led,
  input  logic [IN_WIDTH-1:0]  gpio_in,
  input  logic [ADC_WIDTH-1:0] adc_db
);

  logic        wr_pend;
  logic [11:0] addr_q;

  logic [IN_WIDTH-1:0]  in_s1, in_s2;
  logic [ADC_WIDTH-1:0] adc_s1, adc_s2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_pend <= 1'b0;
      addr_q  <= '0;
    end else if (hready) begin
      wr_pend <= hsel && is_active(req.htrans) && req.hwrite;
      addr_q  <= {req.haddr[11:2], 2'b00};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      led    <= '0;
      in_s1  <= '0;
      in_s2  <= '0;
      adc_s1 <= '0;
      adc_s2 <= '0;
    end else begin
      in_s1  <= gpio_in;
      in_s2  <= in_s1;
      adc_s1 <= adc_db;
      adc_s2 <= adc_s1;
      if (wr_pend && addr_q == GPIO_OUT)
        led <= req.hwdata[LED_WIDTH-1:0];
    end
  end

  always_comb begin
    rsp.hready = 1'b1;
    rsp.hresp  = 1'b0;
    unique case (addr_q)
      GPIO_OUT: rsp.hrdata = 32'(led);
      GPIO_IN:  rsp.hrdata = 32'(in_s2);
      GPIO_ADC: rsp.hrdata = 32'(adc_s2);
      default:  rsp.hrdata = '0;
    endcase
  end

endmodule
