// Self-checking testbench for ahb_uart.
//
// A serial monitor in the testbench decodes txd (start, 8 data bits LSB
// first, stop) and checks every bit lasts BAUDDIV cycles; a serial driver
// sends frames into rxd. Covered: reset BAUDDIV (CLK_HZ/BAUD), transmit
// order through the FIFO, transmit FIFO overflow, receive FIFO read-out,
// receive overrun, a false start bit that must be ignored, the interrupts
// and the status flags.
module tb_ahb_uart;
  import ahb_pkg::*;

  localparam int DIV = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  always #10 clk = ~clk;

  ahb_req_t req;
  ahb_rsp_t rsp;
  logic     txd, irq;
  logic     rxd = 1'b1;

  ahb_uart #(.CLK_HZ(50_000_000), .BAUD(9600), .FIFO_DEPTH(16)) dut (
    .clk, .rst_n, .req, .hsel(1'b1), .hready(rsp.hready), .rsp, .txd, .rxd, .irq);
  ahb_bfm bfm (.clk, .req, .rsp);

  int checks = 0, failures = 0;
  logic [7:0] got_q [$];
  int bad_bit_time = 0;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Serial monitor on txd, sampling each bit in its middle.
  initial begin : monitor
    logic [7:0] b;
    forever begin
      @(negedge txd);
      repeat (DIV / 2) @(posedge clk);
      if (txd) bad_bit_time++;    // start bit must still be low
      for (int i = 0; i < 8; i++) begin
        repeat (DIV) @(posedge clk);
        b[i] = txd;
      end
      repeat (DIV) @(posedge clk);
      if (!txd) bad_bit_time++;   // stop bit must be high
      got_q.push_back(b);
    end
  end

  task automatic send_serial(logic [7:0] b, int div);
    rxd = 1'b0;
    repeat (div) @(posedge clk);
    for (int i = 0; i < 8; i++) begin
      rxd = b[i];
      repeat (div) @(posedge clk);
    end
    rxd = 1'b1;
    repeat (div) @(posedge clk);
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    logic [7:0] msg [11];
    int t_start;
    msg = '{8'h62, 8'h70, 8'h6d, 8'h20, 8'h3d, 8'h20, 8'h30, 8'h37, 8'h38, 8'h0d, 8'h0a};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    bfm.read(UART_BASE + 32'(UART_BAUDDIV), d); check("reset bauddiv", d, 50_000_000 / 9600);
    bfm.read(UART_BASE + 32'(UART_CTRL), d);    check("reset ctrl", d, 3);
    bfm.read(UART_BASE + 32'(UART_STATUS), d);  check("reset status tx_idle", d, 32'h2);
    check("txd idles high", txd, 1);

    bfm.write(UART_BASE + 32'(UART_BAUDDIV), DIV);

    // Bit time: time from the start of a frame to its stop bit.
    fork
      begin
        @(negedge txd);
        t_start = int'($time);
        // 0x80: start + seven 0 bits -> low for 8 bit times
        @(posedge txd);
        check("bit time x8", (int'($time) - t_start) / 20, 8 * DIV);
      end
      bfm.write(UART_BASE + 32'(UART_DATA), 32'h80);
    join
    while (got_q.size() < 1) @(negedge clk);
    check("byte 0x80", got_q.pop_front(), 8'h80);

    // A whole message written at once: FIFO holds it, bytes leave in order.
    foreach (msg[i]) bfm.write(UART_BASE + 32'(UART_DATA), 32'(msg[i]));
    bfm.read(UART_BASE + 32'(UART_STATUS), d); check("busy while sending", d[1], 0);
    while (got_q.size() < 11) @(negedge clk);
    foreach (msg[i]) check($sformatf("message byte %0d", i), got_q.pop_front(), msg[i]);
    repeat (2 * DIV) @(negedge clk);
    bfm.read(UART_BASE + 32'(UART_STATUS), d); check("idle after message", d[1], 1);

    // Overflow: 16 in the FIFO plus one in the shifter, the rest dropped.
    for (int i = 0; i < 20; i++) bfm.write(UART_BASE + 32'(UART_DATA), 32'(8'h41 + i));
    bfm.read(UART_BASE + 32'(UART_STATUS), d);
    check("tx_full", d[0], 1);
    check("tx_overflow", d[5], 1);
    while (got_q.size() < 17) @(negedge clk);
    repeat (12 * DIV) @(negedge clk);
    check("bytes sent after overflow", got_q.size(), 17);
    for (int i = 0; i < 17; i++) check("overflow order", got_q.pop_front(), 8'h41 + i);
    bfm.write(UART_BASE + 32'(UART_STATUS), 32'h20);
    bfm.read(UART_BASE + 32'(UART_STATUS), d); check("tx_overflow cleared", d[5], 0);

    // TX-empty interrupt.
    bfm.write(UART_BASE + 32'(UART_CTRL), 32'h7);
    check("tx irq when empty", irq, 1);

    // Receive.
    bfm.write(UART_BASE + 32'(UART_CTRL), 32'hB);   // rx irq
    check("no rx irq yet", irq, 0);
    send_serial(8'h3a, DIV);
    send_serial(8'hc5, DIV);
    repeat (4) @(negedge clk);
    check("rx irq", irq, 1);
    bfm.read(UART_BASE + 32'(UART_STATUS), d); check("rx_valid", d[2], 1);
    bfm.read(UART_BASE + 32'(UART_DATA), d);   check("rx byte 1", d, 8'h3a);
    bfm.read(UART_BASE + 32'(UART_DATA), d);   check("rx byte 2", d, 8'hc5);
    bfm.read(UART_BASE + 32'(UART_STATUS), d); check("rx empty", d[2], 0);
    check("rx irq gone", irq, 0);

    // False start: a glitch shorter than half a bit is ignored.
    rxd = 1'b0; repeat (3) @(posedge clk); rxd = 1'b1;
    repeat (12 * DIV) @(negedge clk);
    bfm.read(UART_BASE + 32'(UART_STATUS), d); check("glitch ignored", d[2], 0);

    // Overrun: 17 bytes without reading.
    for (int i = 0; i < 17; i++) send_serial(8'(8'h10 + i), DIV);
    repeat (4) @(negedge clk);
    bfm.read(UART_BASE + 32'(UART_STATUS), d);
    check("rx_full", d[3], 1);
    check("rx_overrun", d[4], 1);
    for (int i = 0; i < 16; i++) begin
      bfm.read(UART_BASE + 32'(UART_DATA), d);
      check("rx fifo order", d, 8'h10 + i);
    end
    bfm.write(UART_BASE + 32'(UART_STATUS), 32'h10);
    bfm.read(UART_BASE + 32'(UART_STATUS), d); check("overrun cleared", d[4], 0);

    check("stop bits high", bad_bit_time, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
