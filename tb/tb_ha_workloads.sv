// tb_ha_workloads: the configurations evaluated for the spectral-sharpening
// hearing aid, each run on the same synthetic speech and checked sample by
// sample against the reference model:
//   fixed-point single-stage run, 250 samples, beta 0.04, gamma 0.6
//   single stage, 1 s, beta 0.04 / 0.4, gamma 0.6 (speech enhancement)
//   8 stages, 1 s, beta 0.4, gamma 0.6 (speech enhancement; the 8-stage
//     beta 0.04 case is the full-size top-level test)
//   8 stages, 1 s, beta 0.03 / 0.3, gamma 0.7 (noise reduction)
// Parameters in Q0.7: 0.04 -> 5, 0.4 -> 51, 0.6 -> 77, 0.03 -> 4, 0.3 -> 38,
// 0.7 -> 90. The output/input RMS ratio of each run is printed, and the test
// checks that a smaller beta (stronger sharpening) gives the larger ratio.
module tb_ha_workloads;
  localparam int N1 = 8000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic fin [6];
  int   ch [6], fl [6];
  real  rg [6];

  ha_workload_run #(.STAGES(1), .BETA_Q7(5),  .GAMMA_Q7(77), .NR(0), .NSAMP(250)) w0 (
    .clk, .rst_n, .finished(fin[0]), .checks(ch[0]), .failures(fl[0]), .rms_gain(rg[0]));
  ha_workload_run #(.STAGES(1), .BETA_Q7(5),  .GAMMA_Q7(77), .NR(0), .NSAMP(N1)) w1 (
    .clk, .rst_n, .finished(fin[1]), .checks(ch[1]), .failures(fl[1]), .rms_gain(rg[1]));
  ha_workload_run #(.STAGES(1), .BETA_Q7(51), .GAMMA_Q7(77), .NR(0), .NSAMP(N1)) w2 (
    .clk, .rst_n, .finished(fin[2]), .checks(ch[2]), .failures(fl[2]), .rms_gain(rg[2]));
  ha_workload_run #(.STAGES(8), .BETA_Q7(51), .GAMMA_Q7(77), .NR(0), .NSAMP(N1)) w3 (
    .clk, .rst_n, .finished(fin[3]), .checks(ch[3]), .failures(fl[3]), .rms_gain(rg[3]));
  ha_workload_run #(.STAGES(8), .BETA_Q7(4),  .GAMMA_Q7(90), .NR(1), .NSAMP(N1)) w4 (
    .clk, .rst_n, .finished(fin[4]), .checks(ch[4]), .failures(fl[4]), .rms_gain(rg[4]));
  ha_workload_run #(.STAGES(8), .BETA_Q7(38), .GAMMA_Q7(90), .NR(1), .NSAMP(N1)) w5 (
    .clk, .rst_n, .finished(fin[5]), .checks(ch[5]), .failures(fl[5]), .rms_gain(rg[5]));

  int checks, failures;
  string names [6] = '{"1 stage, 250 samples, b=0.04 g=0.6 SE",
                       "1 stage, b=0.04 g=0.6 SE", "1 stage, b=0.4 g=0.6 SE",
                       "8 stages, b=0.4 g=0.6 SE", "8 stages, b=0.03 g=0.7 NR",
                       "8 stages, b=0.3 g=0.7 NR"};

  initial begin
    repeat (50 * N1 + 1000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", 0, 1);
    $finish;
  end

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1;
    wait (fin[0] && fin[1] && fin[2] && fin[3] && fin[4] && fin[5]);
    checks = 0; failures = 0;
    for (int i = 0; i < 6; i++) begin
      $display("%-32s: %0d samples, %0d mismatches, rms out/in %f", names[i], ch[i], fl[i], rg[i]);
      checks += ch[i]; failures += fl[i];
    end
    // stronger sharpening (smaller beta) raises the output level
    checks += 1;
    if (!(rg[4] > rg[5])) begin failures++; $display("FAIL NR: beta 0.03 not louder than 0.3"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
