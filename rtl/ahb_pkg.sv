// AHB-Lite types and the system memory map shared by the heart-rate SoC.
//
// One master (the processor) drives ahb_req_t; every slave answers with
// ahb_rsp_t. The request bundles the address-phase signals with HWDATA,
// which belongs to the data phase that follows, exactly as on a real
// AHB-Lite bus. HREADY (the bus-wide "previous transfer done") travels
// separately because it is the interconnect's output, not the master's.
//
// The memory map is this design's own choice: a 16 KB RAM at address 0
// (where a Cortex-M0 fetches its vector table) and one 4 KB window per
// peripheral at 0x4000_0000 upward.
package ahb_pkg;

  typedef enum logic [1:0] {
    HTRANS_IDLE   = 2'b00,
    HTRANS_BUSY   = 2'b01,
    HTRANS_NONSEQ = 2'b10,
    HTRANS_SEQ    = 2'b11
  } htrans_t;

  typedef enum logic [2:0] {
    HSIZE_BYTE = 3'b000,
    HSIZE_HALF = 3'b001,
    HSIZE_WORD = 3'b010
  } hsize_t;

  typedef struct packed {
    logic [31:0] haddr;
    htrans_t     htrans;
    logic        hwrite;
    logic [2:0]  hsize;
    logic [2:0]  hburst;
    logic [3:0]  hprot;
    logic        hmastlock;
    logic [31:0] hwdata;
  } ahb_req_t;

  typedef struct packed {
    logic [31:0] hrdata;
    logic        hready;   // HREADYOUT of a slave, HREADY at the master
    logic        hresp;    // 0 OKAY, 1 ERROR
  } ahb_rsp_t;

  // Slave indices on the interconnect.
  localparam int unsigned SLV_RAM   = 0;
  localparam int unsigned SLV_TIMER = 1;
  localparam int unsigned SLV_UART  = 2;
  localparam int unsigned SLV_GPIO  = 3;
  localparam int unsigned NUM_SLV   = 4;

  // Base addresses.
  localparam logic [31:0] RAM_BASE   = 32'h0000_0000;
  localparam logic [31:0] TIMER_BASE = 32'h4000_0000;
  localparam logic [31:0] UART_BASE  = 32'h4000_1000;
  localparam logic [31:0] GPIO_BASE  = 32'h4000_2000;

  // Timer registers (byte offsets).
  localparam logic [11:0] TMR_LOAD     = 12'h000;
  localparam logic [11:0] TMR_VALUE    = 12'h004;
  localparam logic [11:0] TMR_CTRL     = 12'h008;
  localparam logic [11:0] TMR_PRESCALE = 12'h00C;
  localparam logic [11:0] TMR_STATUS   = 12'h010;

  // UART registers.
  localparam logic [11:0] UART_DATA    = 12'h000;
  localparam logic [11:0] UART_STATUS  = 12'h004;
  localparam logic [11:0] UART_CTRL    = 12'h008;
  localparam logic [11:0] UART_BAUDDIV = 12'h00C;

  // GPIO registers.
  localparam logic [11:0] GPIO_OUT = 12'h000;
  localparam logic [11:0] GPIO_IN  = 12'h004;
  localparam logic [11:0] GPIO_ADC = 12'h008;

  // A transfer is real when it is NONSEQ or SEQ.
  function automatic logic is_active(htrans_t t);
    return t == HTRANS_NONSEQ || t == HTRANS_SEQ;
  endfunction

endpackage
