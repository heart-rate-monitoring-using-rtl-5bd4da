// Self-checking testbench for ahb_timer.
//
// Programs LOAD and PRESCALE and measures, with a cycle counter, the distance
// between successive expiry flags: it must be (LOAD+1)*(PRESCALE+1) cycles.
// Also checks register read-back, that VALUE counts down, that the interrupt
// follows irq_en, that writing 1 to STATUS clears the flag, and that one-shot
// mode expires once and stops.
module tb_ahb_timer;
  import ahb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #10 clk = ~clk;

  ahb_req_t req;
  ahb_rsp_t rsp;
  logic     irq;

  ahb_timer dut (.clk, .rst_n, .req, .hsel(1'b1), .hready(rsp.hready), .rsp, .irq);
  ahb_bfm bfm (.clk, .req, .rsp);

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle++;

  // Rising edges of the interrupt, with their cycle numbers.
  longint irq_at [$];
  logic irq_d = 1'b0;
  always @(posedge clk) begin
    irq_d <= irq;
    if (irq && !irq_d) irq_at.push_back(cycle);
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Runs the timer periodically and checks the spacing of several expiries.
  task automatic periodic(int load, int presc);
    logic [31:0] d;
    longint t_prev;
    irq_at.delete();
    bfm.write(TIMER_BASE + 32'(TMR_CTRL), 32'h0);
    bfm.write(TIMER_BASE + 32'(TMR_STATUS), 32'h1);
    bfm.write(TIMER_BASE + 32'(TMR_LOAD), 32'(load));
    bfm.write(TIMER_BASE + 32'(TMR_PRESCALE), 32'(presc));
    bfm.write(TIMER_BASE + 32'(TMR_CTRL), 32'h3);   // enable, irq_en
    for (int k = 0; k < 4; k++) begin
      while (!irq) @(negedge clk);
      bfm.read(TIMER_BASE + 32'(TMR_STATUS), d);
      check("status flag set", longint'(d), 1);
      bfm.write(TIMER_BASE + 32'(TMR_STATUS), 32'h1);
      check("irq cleared", longint'(irq), 0);
    end
    for (int k = 1; k < irq_at.size(); k++)
      check($sformatf("period load=%0d presc=%0d", load, presc),
            irq_at[k] - irq_at[k-1], longint'((load + 1) * (presc + 1)));
    check("expiry count", irq_at.size(), 4);
  endtask

  initial begin
    logic [31:0] d, v1, v2;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    bfm.write(TIMER_BASE + 32'(TMR_LOAD), 32'h0000_1234);
    bfm.read (TIMER_BASE + 32'(TMR_LOAD), d);     check("load readback", d, 32'h1234);
    bfm.read (TIMER_BASE + 32'(TMR_VALUE), d);    check("value loaded", d, 32'h1234);
    bfm.write(TIMER_BASE + 32'(TMR_PRESCALE), 32'h0000_0003);
    bfm.read (TIMER_BASE + 32'(TMR_PRESCALE), d); check("prescale readback", d, 3);

    // VALUE decrements once per PRESCALE+1 cycles.
    bfm.write(TIMER_BASE + 32'(TMR_CTRL), 32'h1);
    bfm.read (TIMER_BASE + 32'(TMR_VALUE), v1);
    repeat (40) @(negedge clk);
    bfm.read (TIMER_BASE + 32'(TMR_VALUE), v2);
    check("value counts down by 40/4", longint'(v1 - v2), 10 + 0);

    periodic(9, 0);
    periodic(24, 0);
    periodic(6, 3);

    // Flag without interrupt enable.
    bfm.write(TIMER_BASE + 32'(TMR_CTRL), 32'h0);
    bfm.write(TIMER_BASE + 32'(TMR_STATUS), 32'h1);
    bfm.write(TIMER_BASE + 32'(TMR_LOAD), 32'd5);
    bfm.write(TIMER_BASE + 32'(TMR_PRESCALE), 32'd0);
    bfm.write(TIMER_BASE + 32'(TMR_CTRL), 32'h1);
    repeat (20) @(negedge clk);
    bfm.read(TIMER_BASE + 32'(TMR_STATUS), d);
    check("flag set without irq_en", d, 1);
    check("no irq without irq_en", irq, 0);

    // One-shot: expires once, then stops.
    bfm.write(TIMER_BASE + 32'(TMR_CTRL), 32'h0);
    bfm.write(TIMER_BASE + 32'(TMR_STATUS), 32'h1);
    bfm.write(TIMER_BASE + 32'(TMR_LOAD), 32'd7);
    irq_at.delete();
    bfm.write(TIMER_BASE + 32'(TMR_CTRL), 32'h7);
    repeat (60) @(negedge clk);
    check("one-shot expiries", irq_at.size(), 1);
    bfm.read(TIMER_BASE + 32'(TMR_CTRL), d);
    check("one-shot disabled itself", d, 32'h6);
    bfm.write(TIMER_BASE + 32'(TMR_STATUS), 32'h1);
    repeat (30) @(negedge clk);
    check("one-shot stays quiet", irq, 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
