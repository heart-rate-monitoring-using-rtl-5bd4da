// AHB-Lite interconnect for a single-master system: address decoder,
// response multiplexer and default slave.
//
// The decoder compares HADDR of the current address phase with the memory
// map in ahb_pkg and raises one bit of hsel (RAM 0x0000_0000-0x0000_3FFF,
// timer 0x4000_0000, UART 0x4000_1000, GPIO 0x4000_2000, 4 KB each for the
// peripherals). When the bus is ready the chosen slave index is registered,
// and during the following data phase that slave's HRDATA, HREADYOUT and
// HRESP are returned to the master; the registered HREADYOUT is the bus HREADY
// that every slave sees.
//
// A NONSEQ/SEQ transfer to an unmapped address goes to the built-in default
// slave, which answers with the two-cycle AHB ERROR response (HREADY low then
// high, HRESP high in both). IDLE and BUSY transfers there get a zero-wait
// OKAY. Having one master and no arbiter follows the system diagram, which
// shows a single processor on the bus; the map itself is this design's choice.
module ahb_lite_interconnect
  import ahb_pkg::*;
#(
  parameter int unsigned NSLV = NUM_SLV,
  parameter int unsigned RAM_BYTES = 16384
) (
  input  logic      clk,
  input  logic      rst_n,
  input  ahb_req_t  m_req,
  output ahb_rsp_t  m_rsp,
  output logic [NSLV-1:0] hsel,
  input  ahb_rsp_t  s_rsp [NSLV]
);

  localparam int unsigned SELW = $clog2(NSLV + 1);
  localparam logic [SELW-1:0] SEL_DEFAULT = SELW'(NSLV);

  logic [SELW-1:0] sel_addr;   // decoded from this cycle's HADDR
  logic [SELW-1:0] sel_data;   // registered: owner of the data phase
  logic            err_first;  // default slave is in the first ERROR cycle
  logic            err_second; // default slave is in the second ERROR cycle

  // Address decoder.
  always_comb begin
    sel_addr = SEL_DEFAULT;
    if (m_req.haddr < RAM_BASE + RAM_BYTES)
      sel_addr = SELW'(SLV_RAM);
    else if (m_req.haddr[31:12] == TIMER_BASE[31:12])
      sel_addr = SELW'(SLV_TIMER);
    else if (m_req.haddr[31:12] == UART_BASE[31:12])
      sel_addr = SELW'(SLV_UART);
    else if (m_req.haddr[31:12] == GPIO_BASE[31:12])
      sel_addr = SELW'(SLV_GPIO);
  end

  always_comb begin
    hsel = '0;
    for (int unsigned i = 0; i < NSLV; i++)
      hsel[i] = (sel_addr == SELW'(i));
  end

  // Data-phase owner and default-slave state.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel_data   <= SEL_DEFAULT;
      err_first  <= 1'b0;
      err_second <= 1'b0;
    end else begin
      err_second <= err_first;
      if (m_rsp.hready) begin
        sel_data  <= sel_addr;
        err_first <= (sel_addr == SEL_DEFAULT) && is_active(m_req.htrans);
      end else begin
        err_first <= 1'b0;
      end
    end
  end

  // Response multiplexer.
  always_comb begin
    m_rsp = '{hrdata: '0, hready: 1'b1, hresp: 1'b0};
    if (sel_data == SEL_DEFAULT) begin
      if (err_first)
        m_rsp = '{hrdata: '0, hready: 1'b0, hresp: 1'b1};
      else if (err_second)
        m_rsp = '{hrdata: '0, hready: 1'b1, hresp: 1'b1};
    end else begin
      for (int unsigned i = 0; i < NSLV; i++)
        if (sel_data == SELW'(i))
          m_rsp = s_rsp[i];
    end
  end

  // At most one slave is selected at a time.
  a_hsel_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(hsel));
  // An ERROR response always lasts two cycles.
  a_err_two_cycles: assert property (@(posedge clk) disable iff (!rst_n)
      (m_rsp.hresp && !m_rsp.hready) |=> (m_rsp.hresp && m_rsp.hready));

endmodule
