// ha_workload_run: testbench helper that runs one hearing-aid configuration.
// It instantiates hearing_aid_top with the given STAGES/beta/gamma, feeds
// NSAMP synthetic speech samples in one arrangement (NR = 0 speech
// enhancement, 1 noise reduction) as fast as ready allows, compares every
// DAC code with the reference model and reports the output/input RMS ratio.
module ha_workload_run
  import ha_pkg::*;
  import ha_ref_pkg::*;
#(
  parameter int      STAGES   = 1,
  parameter sample_t BETA_Q7  = 8'sd5,
  parameter sample_t GAMMA_Q7 = 8'sd77,
  parameter bit      NR       = 1'b0,
  parameter int      NSAMP    = 250
) (
  input  logic clk,
  input  logic rst_n,
  output logic finished,
  output int   checks,
  output int   failures,
  output real  rms_gain
);

  ha_mode_e mode;
  logic adc_valid, ready, dac_valid;
  logic [13:0] adc_code;
  logic [11:0] dac_code;
  logic signed [STAGES-1:0][7:0] k_coef;

  hearing_aid_top #(.STAGES(STAGES), .BETA_Q7(BETA_Q7), .GAMMA_Q7(GAMMA_Q7)) dut (
    .clk, .rst_n, .mode, .adc_valid, .adc_code, .ready, .dac_valid, .dac_code, .k_coef);

  initial begin
    ha_model   m;
    speech_gen g;
    real si, so;
    int x, code, want, yo;
    m = new(STAGES, int'(BETA_Q7), int'(GAMMA_Q7), 251);
    g = new();
    finished = 0; checks = 0; failures = 0; rms_gain = 0.0;
    mode = NR ? MODE_NOISE_RED : MODE_SPEECH_ENH;
    adc_valid = 0; adc_code = 14'h2000;
    si = 0.0; so = 0.0;
    @(posedge rst_n);
    @(negedge clk);
    for (int n = 0; n < NSAMP; n++) begin
      x = g.next(n);
      code = (x + 128) << 6;
      while (!ready) @(negedge clk);
      adc_valid = 1; adc_code = 14'(code);
      want = m.top_step(code, NR);
      @(negedge clk);
      adc_valid = 0;
      while (!dac_valid) @(negedge clk);
      checks++;
      if (dac_code !== 12'(want)) begin
        failures++;
        if (failures < 5) $display("FAIL %m n=%0d dac=%0d want %0d", n, dac_code, want);
      end
      yo = (int'(dac_code) - 2048) / 16;
      si += real'(x) * real'(x);
      so += real'(yo) * real'(yo);
    end
    rms_gain = $sqrt(so / si);
    finished = 1;
  end

endmodule
