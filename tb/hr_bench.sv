// End-to-end bench of the heart-rate SoC, shared by the two top-level
// testbenches.
//
// Around heart_rate_soc (default parameters) it places:
//  * a PPG pulse waveform: each beat rises linearly from 1.5 V to 3.5 V in
//    120 ms, falls to 1.9 V at 300 ms, shows a dicrotic bump to 2.3 V at
//    380 ms and returns to 1.5 V at 600 ms. N_REST beats come 769/770 ms
//    apart (78 BPM), then N_WALK beats 645/646 ms apart (93 BPM), the two
//    activities of the measurement table;
//  * the ADC0804 model in its free-running wiring (WR tied to INTR, CS and
//    RD grounded, VREF/2 = 2.5 V, conversion time 100 us);
//  * a processor model (ahb_bfm) whose program follows the beat-finding
//    flow: on every timer interrupt (2 ms) read the ADC, show the sample on
//    the LEDs, look for a local peak, accept it as a pulse only above a
//    threshold, store the inter-beat interval in RAM, and once ten intervals
//    are stored send "bpm = NNN" by UART and keep the value in RAM;
//  * a serial receiver decoding the UART line.
//
// SCALE compresses time: every period in the program and the models
// (sampling period, conversion time, bit time, beat spacing) is divided by
// SCALE, so SCALE = 1 is real time. Checks: each reported BPM against
// round(600000 / (sum of the last ten intervals in ms)) of the generated
// beats, within 1 BPM; the RAM log equals the UART lines; the LEDs show the
// sample just read; general inputs are readable; the bus answers an unmapped
// address with ERROR. Each mechanism (timer expiry, threshold rejection,
// accepted pulse, RAM write-to-read bypass, BPM report, UART byte, heart-rate
// change, bus error) is counted and must occur at least once.
module hr_bench #(
  parameter int SCALE  = 500,
  parameter int N_REST = 13,
  parameter int N_WALK = 14
);
  import ahb_pkg::*;

  localparam int  CLK_PERIOD    = 20;                    // ns at 50 MHz
  localparam int  SAMPLE_CYCLES = 100_000 / SCALE;       // 2 ms
  localparam int  BAUDDIV_SW    = (5208 / SCALE < 8) ? 8 : 5208 / SCALE;
  localparam int  THRESH        = 140;                   // about 2.73 V
  localparam int  NBEAT         = N_REST + N_WALK;
  localparam logic [31:0] IBI_RING = 32'h0000_2000;
  localparam logic [31:0] BPM_LOG  = 32'h0000_3000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #(CLK_PERIOD / 2) clk = ~clk;

  ahb_req_t    m_req;
  ahb_rsp_t    m_rsp;
  logic [1:0]  irq;
  logic        uart_txd;
  logic [15:0] led;
  logic [15:0] gpio_in = 16'hC3A5;
  logic [7:0]  adc_db;
  logic        intr_n;

  heart_rate_soc dut (
    .clk, .rst_n, .m_req, .m_rsp, .irq, .uart_txd, .uart_rxd(1'b1),
    .led, .gpio_in, .adc_db);

  ahb_bfm cpu (.clk, .req(m_req), .rsp(m_rsp));

  // ------------------------------------------------------------ pulse sensor
  real beat_ms [NBEAT];     // start time of each beat, real milliseconds
  real vsense = 1.5;

  initial begin
    beat_ms[0] = 100.0;
    for (int k = 1; k < NBEAT; k++)
      beat_ms[k] = beat_ms[k-1] + ((k <= N_REST - 1) ? ((k % 2) ? 769.0 : 770.0)
                                                      : ((k % 2) ? 645.0 : 646.0));
  end

  function automatic real ppg(real ph);
    if (ph < 120.0)      return 1.5 + 2.0 * ph / 120.0;
    else if (ph < 300.0) return 3.5 - 1.6 * (ph - 120.0) / 180.0;
    else if (ph < 380.0) return 1.9 + 0.4 * (ph - 300.0) / 80.0;
    else if (ph < 600.0) return 2.3 - 0.8 * (ph - 380.0) / 220.0;
    else                 return 1.5;
  endfunction

  initial begin : sensor
    int k = 0;
    forever begin
      real t_ms;
      #(20_000 / SCALE > 0 ? 20_000 / SCALE : 1);       // every 20 us real
      t_ms = real'($time) * real'(SCALE) / 1.0e6;
      while (k + 1 < NBEAT && beat_ms[k+1] <= t_ms) k++;
      vsense = (t_ms < beat_ms[0]) ? 1.5 : ppg(t_ms - beat_ms[k]);
    end
  end

  // ------------------------------------------------------------ ADC0804
  adc0804_model #(.CONV_TIME(100_000 / SCALE), .KICK_TIME(100)) adc (
    .vin_p(vsense), .vin_n(0.0), .vref_half(2.5),
    .cs_n(1'b0), .rd_n(1'b0), .wr_n(intr_n), .intr_n, .db(adc_db));

  // ------------------------------------------------------------ checking
  int checks = 0, failures = 0;
  int n_timer = 0, n_rejected = 0, n_pulse = 0, n_bypass = 0, n_bpm = 0;
  int n_uart = 0, n_buserr = 0, n_stall = 0;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic need(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end else $display("  %-28s %0d", what, n);
  endtask

  // Serial receiver on the UART line.
  byte line_q [$];
  int  bpm_uart [$];
  initial begin : serial_rx
    logic [7:0] b;
    forever begin
      @(negedge uart_txd);
      repeat (BAUDDIV_SW / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin
        repeat (BAUDDIV_SW) @(posedge clk);
        b[i] = uart_txd;
      end
      repeat (BAUDDIV_SW) @(posedge clk);
      n_uart++;
      if (b == 8'h0a) begin
        string s;
        s = "";
        foreach (line_q[i]) s = {s, string'(line_q[i])};
        if (s.len() == 10 && s.substr(0, 5) == "bpm = ")
          bpm_uart.push_back(s.substr(6, 8).atoi());
        else begin
          failures++;
          $display("FAIL bad UART line '%s'", s);
        end
        line_q.delete();
      end else line_q.push_back(b);
    end
  end

  // Expected BPM after pulse j (j >= 10): last ten intervals of the source.
  function automatic int expected_bpm(int j);
    real sum_ms = beat_ms[j] - beat_ms[j-10];
    return int'($floor(600000.0 / sum_ms + 0.5));
  endfunction

  initial begin : watchdog
    longint limit;
    limit = longint'((beat_ms[NBEAT-1] + 1000.0) * 1.0e6 / real'(SCALE) / real'(CLK_PERIOD) * 1.3);
    repeat (limit) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ program
  int bpm_sw [$];

  task automatic uart_puts(string s);
    logic [31:0] st;
    for (int i = 0; i < s.len(); i++) begin
      cpu.read(UART_BASE + 32'(UART_STATUS), st);
      while (st[0]) begin
        n_stall++;
        cpu.read(UART_BASE + 32'(UART_STATUS), st);
      end
      cpu.write(UART_BASE + 32'(UART_DATA), 32'(s[i]));
    end
  endtask

  initial begin : firmware
    logic [31:0] d, r0, r1;
    int sample, last, since, n_ibi, idx, sum;
    bit rising, seen_first;
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // Start-up.
    cpu.write(GPIO_BASE + 32'(GPIO_OUT), 32'h0);
    cpu.read(GPIO_BASE + 32'(GPIO_IN), d);
    check("general inputs readable", d, 32'hC3A5);
    if (SCALE > 1) cpu.write(UART_BASE + 32'(UART_BAUDDIV), 32'(BAUDDIV_SW));
    cpu.write(TIMER_BASE + 32'(TMR_PRESCALE), 32'd0);
    cpu.write(TIMER_BASE + 32'(TMR_LOAD), 32'(SAMPLE_CYCLES - 1));
    cpu.write(TIMER_BASE + 32'(TMR_CTRL), 32'h3);

    last = 0; since = 0; n_ibi = 0; idx = 0; rising = 0; seen_first = 0;
    while (n_pulse < NBEAT) begin
      // Read input, paced by the timer interrupt.
      if (!irq[0]) @(posedge irq[0]);
      @(negedge clk);
      n_timer++;
      cpu.write(TIMER_BASE + 32'(TMR_STATUS), 32'h1);
      cpu.read(GPIO_BASE + 32'(GPIO_ADC), d);
      sample = int'(d[7:0]);
      cpu.write(GPIO_BASE + 32'(GPIO_OUT), d);
      check("LEDs show the sample", led, d[15:0]);
      since++;

      // Find peak: a rise followed by a fall marks a local maximum at 'last'.
      if (sample > last) rising = 1;
      else if (sample < last && rising) begin
        rising = 0;
        // Identify pulse: the peak must clear the threshold.
        if (last <= THRESH) n_rejected++;
        else begin
          n_pulse++;
          if (seen_first) begin
            // Store the inter-beat interval (in samples) and read it back.
            cpu.pair(1'b1, IBI_RING + 32'(4 * idx), 32'(since - 1), 3'b010,
                     1'b0, IBI_RING + 32'(4 * idx), 32'h0, 3'b010, r0, r1);
            check("IBI stored", r1, since - 1);
            if (r1 == 32'(since - 1)) n_bypass++;   // read right behind the write
            idx = (idx == 9) ? 0 : idx + 1;
            if (n_ibi < 10) n_ibi++;
            // Ten intervals stored: calculate BPM.
            if (n_ibi == 10) begin
              int sum_ms, bpm;
              sum = 0;
              for (int i = 0; i < 10; i++) begin
                cpu.read(IBI_RING + 32'(4 * i), d);
                sum += int'(d);
              end
              sum_ms = 2 * sum;
              bpm = (600000 + sum_ms / 2) / sum_ms;
              cpu.write(BPM_LOG + 32'(4 * bpm_sw.size()), 32'(bpm));
              bpm_sw.push_back(bpm);
              n_bpm++;
              uart_puts($sformatf("bpm = %03d\r\n", bpm));
            end
          end
          seen_first = 1;
          since = 1;
        end
      end
      last = sample;
    end

    // Let the last line leave the UART.
    do cpu.read(UART_BASE + 32'(UART_STATUS), d); while (!d[1]);
    repeat (4 * BAUDDIV_SW) @(negedge clk);

    // The bus answers an address nobody owns with ERROR.
    begin
      logic rr;
      cpu.xfer(1'b0, 32'h6000_0000, 32'h0, 3'b010, d, rr);
      check("unmapped address gives ERROR", rr, 1);
      n_buserr = cpu.errors_seen;
    end

    // Results.
    check("number of BPM lines", bpm_uart.size(), NBEAT - 10);
    for (int m = 0; m < bpm_sw.size() && m < bpm_uart.size(); m++) begin
      int e;
      e = expected_bpm(m + 10);
      $display("  line %0d: bpm %0d (expected %0d)", m, bpm_uart[m], e);
      checks++;
      if (bpm_uart[m] < e - 1 || bpm_uart[m] > e + 1) begin
        failures++;
        $display("FAIL bpm line %0d: got %0d expected %0d", m, bpm_uart[m], e);
      end
      cpu.read(BPM_LOG + 32'(4 * m), d);
      check("BPM kept in RAM", d, bpm_uart[m]);
    end
    if (N_REST >= 11) check("resting rate", bpm_uart[N_REST - 11], 78);
    if (N_WALK >= 11) check("walking rate", bpm_uart[bpm_uart.size() - 1], 93);

    $display("  cycles simulated: %0d, ADC conversions: %0d", $time / CLK_PERIOD, adc.conversions);
    need("timer expiries", n_timer);
    need("peaks below threshold", n_rejected);
    need("pulses accepted", n_pulse);
    need("RAM write-read bypass", n_bypass);
    need("BPM reports", n_bpm);
    need("UART bytes", n_uart);
    need("bus ERROR responses", n_buserr);
    if (N_WALK > 0) need("heart-rate changes", int'(bpm_sw[bpm_sw.size()-1] != bpm_sw[0]));
    $display("  UART FIFO-full waits: %0d", n_stall);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
