// End-to-end testbench of heart_rate_soc with time compressed 500 times:
// 13 beats at 78 BPM followed by 14 at 93 BPM, 16 heart-rate reports. The
// SoC itself runs with its default parameters; see hr_bench for what is
// driven and checked.
module tb_heart_rate_soc;
  hr_bench #(.SCALE(500), .N_REST(13), .N_WALK(14)) bench ();
endmodule
