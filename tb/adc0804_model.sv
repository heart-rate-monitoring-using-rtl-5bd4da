// Behavioural model of an ADC0804 8-bit successive-approximation converter,
// for simulation only.
//
// Pins follow the part: differential input VIN(+)/VIN(-), VREF/2, active-low
// CS, RD, WR and INTR, and DB7..DB0. A rising edge of WR with CS low starts
// a conversion; CONV_TIME time units later the code
// floor(256 * (VIN(+) - VIN(-)) / (2 * VREF/2)), limited to 0..255, is
// latched and INTR goes low. WR or CS falling clears INTR again. With WR
// tied to INTR and CS, RD grounded the part restarts itself after every
// conversion (free-running); KICK_TIME after time zero the model pulls INTR
// low once to start that loop, as a start pulse would at power-up. DB shows
// the latch while CS and RD are low and all ones otherwise (two-state stand-
// in for the real part's high-impedance outputs). CLK IN / CLK R of the real
// part set its clock; here CONV_TIME replaces them.
module adc0804_model #(
  parameter int CONV_TIME = 100_000,
  parameter int KICK_TIME = 50
) (
  input  real        vin_p,
  input  real        vin_n,
  input  real        vref_half,
  input  logic       cs_n,
  input  logic       rd_n,
  input  logic       wr_n,
  output logic       intr_n,
  output logic [7:0] db
);

  logic [7:0] latch_q = 8'h00;
  int unsigned conversions = 0;

  initial begin
    intr_n = 1'b1;
    #(KICK_TIME) intr_n = 1'b0;
  end

  always @(negedge wr_n) if (!cs_n) #1 intr_n = 1'b1;

  always @(posedge wr_n) begin
    if (!cs_n) begin
      real x;
      #(CONV_TIME);
      x = 256.0 * (vin_p - vin_n) / (2.0 * vref_half);
      if (x < 0.0) latch_q = 8'd0;
      else if (x >= 255.0) latch_q = 8'd255;
      else latch_q = 8'($rtoi(x));
      conversions++;
      intr_n = 1'b0;
    end
  end

  assign db = (!cs_n && !rd_n) ? latch_q : 8'hFF;

endmodule
