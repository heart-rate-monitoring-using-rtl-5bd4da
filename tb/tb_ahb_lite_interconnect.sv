// Self-checking testbench for ahb_lite_interconnect.
//
// Four responder slaves in the testbench answer every read with
// {slave index, low 16 address bits}; slave k inserts k wait states. The
// test checks address decoding at each region's edges, that the response
// comes from the slave that owned the address phase even when the next
// address already points elsewhere (pipelined pairs across slaves with wait
// states), that hsel is one-hot, and that unmapped addresses get the
// two-cycle ERROR response from the default slave.
module tb_ahb_lite_interconnect;
  import ahb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #10 clk = ~clk;

  ahb_req_t m_req;
  ahb_rsp_t m_rsp;
  logic [NUM_SLV-1:0] hsel;
  ahb_rsp_t s_rsp [NUM_SLV];

  ahb_lite_interconnect #(.NSLV(NUM_SLV), .RAM_BYTES(16384)) dut (
    .clk, .rst_n, .m_req, .m_rsp, .hsel, .s_rsp);
  ahb_bfm bfm (.clk, .req(m_req), .rsp(m_rsp));

  // Responder slaves.
  for (genvar k = 0; k < NUM_SLV; k++) begin : g_slv
    logic        act;
    logic [15:0] a;
    int          wait_left;
    always @(posedge clk) begin
      if (!rst_n) begin
        act <= 1'b0; wait_left <= 0; a <= '0;
      end else if (m_rsp.hready) begin
        act       <= hsel[k] && is_active(m_req.htrans);
        a         <= m_req.haddr[15:0];
        wait_left <= k;
      end else if (act && wait_left > 0) begin
        wait_left <= wait_left - 1;
      end
    end
    assign s_rsp[k].hready = !(act && wait_left > 0);
    assign s_rsp[k].hresp  = 1'b0;
    assign s_rsp[k].hrdata = act ? {16'(k), a} : 32'hFFFF_FFFF;
  end

  int checks = 0, failures = 0;
  int ws_cycles = 0;
  always @(posedge clk) if (rst_n && !m_rsp.hready && !m_rsp.hresp) ws_cycles++;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // hsel must be one-hot or zero in every cycle.
  always @(negedge clk) if (rst_n) begin
    checks++;
    if (!$onehot0(hsel)) begin failures++; $display("FAIL hsel %b", hsel); end
  end

  task automatic expect_slave(logic [31:0] addr, int k);
    logic [31:0] d;
    logic r;
    bfm.xfer(1'b0, addr, 32'h0, 3'b010, d, r);
    check($sformatf("slave of %08h", addr), d, {16'(k), addr[15:0]});
    check($sformatf("okay at %08h", addr), r, 0);
  endtask

  task automatic expect_error(logic [31:0] addr);
    logic [31:0] d;
    logic r;
    int unsigned t0;
    t0 = int'($time);
    bfm.xfer(1'b1, addr, 32'h0, 3'b010, d, r);
    check($sformatf("error at %08h", addr), r, 1);
    check("error takes 3 cycles (addr + 2)", (int'($time) - t0) / 20, 3);
  endtask

  initial begin
    logic [31:0] r0, r1;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    expect_slave(32'h0000_0000, SLV_RAM);
    expect_slave(32'h0000_3FFC, SLV_RAM);
    expect_slave(TIMER_BASE, SLV_TIMER);
    expect_slave(TIMER_BASE + 32'hFFC, SLV_TIMER);
    expect_slave(UART_BASE + 32'h4, SLV_UART);
    expect_slave(GPIO_BASE + 32'h8, SLV_GPIO);
    expect_slave(GPIO_BASE + 32'hFFC, SLV_GPIO);
    expect_error(32'h0000_4000);
    expect_error(32'h4000_3000);
    expect_error(32'h3FFF_FFFC);
    expect_error(32'h8000_0000);
    expect_slave(32'h0000_0010, SLV_RAM);   // bus usable after errors

    // Pipelined pairs across slaves, with wait states on either side.
    for (int i = 0; i < NUM_SLV; i++)
      for (int j = 0; j < NUM_SLV; j++) begin
        logic [31:0] b [NUM_SLV];
        b = '{RAM_BASE + 32'h100, TIMER_BASE + 32'h8, UART_BASE + 32'hC, GPIO_BASE + 32'h4};
        bfm.pair(1'b0, b[i], 32'h0, 3'b010, 1'b0, b[j], 32'h0, 3'b010, r0, r1);
        check($sformatf("pair %0d->%0d first", i, j), r0, {16'(i), b[i][15:0]});
        check($sformatf("pair %0d->%0d second", i, j), r1, {16'(j), b[j][15:0]});
      end

    checks++;
    if (ws_cycles == 0) begin failures++; $display("FAIL no wait states seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
