// Self-checking testbench for ahb_gpio.
//
// Writes LED patterns and checks the led pins and the read-back; drives the
// general inputs and the ADC data lines with random values and checks that a
// read returns them after the two-flop synchroniser (stable for at least
// three cycles), and that a change is not visible earlier than two cycles.
module tb_ahb_gpio;
  import ahb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #10 clk = ~clk;

  ahb_req_t    req;
  ahb_rsp_t    rsp;
  logic [15:0] led;
  logic [15:0] gpio_in = '0;
  logic [7:0]  adc_db = '0;

  ahb_gpio #(.LED_WIDTH(16), .IN_WIDTH(16), .ADC_WIDTH(8)) dut (
    .clk, .rst_n, .req, .hsel(1'b1), .hready(rsp.hready), .rsp, .led, .gpio_in, .adc_db);
  ahb_bfm bfm (.clk, .req, .rsp);

  int checks = 0, failures = 0;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    logic [15:0] v;
    logic [7:0]  a;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check("leds off after reset", led, 0);

    for (int i = 0; i < 20; i++) begin
      v = 16'($urandom);
      bfm.write(GPIO_BASE + 32'(GPIO_OUT), 32'(v) | 32'hABCD_0000);
      check("led pins", led, v);
      bfm.read(GPIO_BASE + 32'(GPIO_OUT), d);
      check("led readback", d, v);
    end

    for (int i = 0; i < 30; i++) begin
      v = 16'($urandom);
      a = 8'($urandom);
      gpio_in = v;
      adc_db  = a;
      repeat (3) @(negedge clk);
      bfm.read(GPIO_BASE + 32'(GPIO_IN), d);  check("input", d, v);
      bfm.read(GPIO_BASE + 32'(GPIO_ADC), d); check("adc", d, a);
    end

    // Synchroniser delay: a value changed one cycle before the read's
    // address phase is not yet visible.
    adc_db = 8'h11;
    repeat (4) @(negedge clk);
    adc_db = 8'h99;
    bfm.read(GPIO_BASE + 32'(GPIO_ADC), d); check("adc old value inside sync delay", d, 8'h11);
    bfm.read(GPIO_BASE + 32'(GPIO_ADC), d); check("adc new value after sync delay", d, 8'h99);

    // Writes elsewhere leave the LEDs alone.
    bfm.write(GPIO_BASE + 32'(GPIO_OUT), 32'h0000_5aa5);
    bfm.write(GPIO_BASE + 32'(GPIO_ADC), 32'h0000_ffff);
    bfm.write(GPIO_BASE + 32'(GPIO_IN), 32'h0000_ffff);
    check("leds unchanged by other writes", led, 16'h5aa5);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
