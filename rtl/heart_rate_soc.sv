// Heart-rate monitoring system-on-chip: the bus fabric and peripherals around
// a Cortex-M0 class processor that samples a photoplethysmography (PPG) pulse
// sensor through an 8-bit ADC, finds heart beats in software and reports
// beats per minute over a UART while showing the raw sample on 16 LEDs.
//
// One AHB-Lite bus with the processor as its only master connects four
// slaves: 16 KB on-chip RAM (0x0000_0000), a timer (0x4000_0000) that paces
// sampling and measures inter-beat intervals, a UART (0x4000_1000) to the PC,
// and a GPIO block (0x4000_2000) with the LED outputs, general inputs and the
// ADC's DB7..DB0 lines. The processor itself is not part of this RTL: its
// AHB-Lite master port (m_req in, m_rsp out) and its interrupt inputs
// (irq[0] timer, irq[1] UART) are ports of this module, to be connected to a
// processor core. The external ADC0804 runs free (INTR tied to WR, CS and RD
// grounded), so only its data lines enter.
//
// The block set, the single bus, 50 MHz, 16 KB, 16 LEDs and the 8-bit ADC
// follow the system description; the memory map, register sets, 9600 baud
// default and all timing details are this design's own.
module heart_rate_soc
  import ahb_pkg::*;
#(
  parameter int unsigned CLK_HZ    = 50_000_000,
  parameter int unsigned MEM_BYTES = 16384,
  parameter int unsigned LED_WIDTH = 16,
  parameter int unsigned IN_WIDTH  = 16,
  parameter int unsigned ADC_WIDTH = 8,
  parameter int unsigned BAUD      = 9600,
  parameter string       MEM_INIT  = ""
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  ahb_req_t             m_req,
  output ahb_rsp_t             m_rsp,
  output logic [1:0]           irq,
  output logic                 uart_txd,
  input  logic                 uart_rxd,
  output logic [LED_WIDTH-1:0] led,
  input  logic [IN_WIDTH-1:0]  gpio_in,
  input  logic [ADC_WIDTH-1:0] adc_db
);

  logic [NUM_SLV-1:0] hsel;
  ahb_rsp_t           s_rsp [NUM_SLV];

  ahb_lite_interconnect #(.NSLV(NUM_SLV), .RAM_BYTES(MEM_BYTES)) u_bus (
    .clk, .rst_n, .m_req, .m_rsp, .hsel, .s_rsp);

  ahb_onchip_ram #(.MEM_BYTES(MEM_BYTES), .INIT_FILE(MEM_INIT)) u_ram (
    .clk, .rst_n, .req(m_req), .hsel(hsel[SLV_RAM]), .hready(m_rsp.hready),
    .rsp(s_rsp[SLV_RAM]));

  ahb_timer u_timer (
    .clk, .rst_n, .req(m_req), .hsel(hsel[SLV_TIMER]), .hready(m_rsp.hready),
    .rsp(s_rsp[SLV_TIMER]), .irq(irq[0]));

  ahb_uart #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_uart (
    .clk, .rst_n, .req(m_req), .hsel(hsel[SLV_UART]), .hready(m_rsp.hready),
    .rsp(s_rsp[SLV_UART]), .txd(uart_txd), .rxd(uart_rxd), .irq(irq[1]));

  ahb_gpio #(.LED_WIDTH(LED_WIDTH), .IN_WIDTH(IN_WIDTH), .ADC_WIDTH(ADC_WIDTH)) u_gpio (
    .clk, .rst_n, .req(m_req), .hsel(hsel[SLV_GPIO]), .hready(m_rsp.hready),
    .rsp(s_rsp[SLV_GPIO]), .led, .gpio_in, .adc_db);

endmodule
