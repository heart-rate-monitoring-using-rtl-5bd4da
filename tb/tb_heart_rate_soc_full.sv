// Full-size, real-time testbench of heart_rate_soc: default parameters, the
// timer programmed for a true 2 ms sampling period, the UART at its reset
// rate of 9600 baud and a 100 us ADC conversion time. Eleven beats at
// 78 BPM give the ten inter-beat intervals needed for one complete
// heart-rate report. See hr_bench for what is driven and checked.
module tb_heart_rate_soc_full;
  hr_bench #(.SCALE(1), .N_REST(11), .N_WALK(0)) bench ();
endmodule
