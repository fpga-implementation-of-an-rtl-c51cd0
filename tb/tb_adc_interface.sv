// tb_adc_interface: all 16384 ADC codes; checks the 8-bit sample (mid-scale
// 8192 -> 0, 0 -> -128, 16383 -> 127) and the one-clock valid delay.
module tb_adc_interface;
  import ha_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, adc_valid = 0, x_valid;
  logic [13:0] adc_code;
  logic signed [7:0] x_out;

  adc_interface dut (.clk, .rst_n, .adc_valid, .adc_code, .x_valid, .x_out);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    adc_code = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 16384; c++) begin
      @(negedge clk);
      adc_valid = 1; adc_code = 14'(c);
      @(negedge clk);
      adc_valid = 0;
      checks++;
      if (!x_valid || x_out !== 8'(adc_to_x(c))) begin
        failures++; if (failures < 10) $display("FAIL code %0d -> %0d", c, x_out);
      end
    end
    checks += 3;
    if (adc_to_x(8192) != 0 || adc_to_x(0) != -128 || adc_to_x(16383) != 127) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
