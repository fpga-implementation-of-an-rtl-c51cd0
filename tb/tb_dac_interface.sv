// tb_dac_interface: all 256 output samples; checks the 12-bit DAC code
// (0 -> 2048, -128 -> 0, 127 -> 4080), the one-clock valid delay and that
// the code holds between samples.
module tb_dac_interface;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, y_valid = 0, dac_valid;
  logic signed [7:0] y_in;
  logic [11:0] dac_code;

  dac_interface dut (.clk, .rst_n, .y_valid, .y_in, .dac_valid, .dac_code);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    y_in = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int y = -128; y < 128; y++) begin
      @(negedge clk);
      y_valid = 1; y_in = 8'(y);
      @(negedge clk);
      y_valid = 0;
      y_in = 8'(y + 7);
      checks++;
      if (!dac_valid || dac_code !== 12'((y + 128) * 16)) begin
        failures++; $display("FAIL %0d -> %0d", y, dac_code);
      end
      @(negedge clk);
      checks++;
      if (dac_valid || dac_code !== 12'((y + 128) * 16)) begin failures++; $display("FAIL hold"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
