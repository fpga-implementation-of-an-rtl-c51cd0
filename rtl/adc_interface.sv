// adc_interface: turns the 14-bit offset-binary code of the audio ADC (0 V =
// 0, full scale = 16383) into the datapath's 8-bit two's-complement sample:
// the MSB is inverted so that mid-scale becomes zero and the six LSBs are
// dropped (truncation). Registered: x_valid follows adc_valid by one clock.
// The 14-bit converter and the 8-bit samples follow the design; the code
// mapping is this implementation's.
module adc_interface
  import ha_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        adc_valid,
  input  logic [13:0] adc_code,
  output logic        x_valid,
  output sample_t     x_out
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x_valid <= 1'b0;
      x_out   <= '0;
    end else begin
      x_valid <= adc_valid;
      if (adc_valid) x_out <= sample_t'({~adc_code[13], adc_code[12:6]});
    end
  end

endmodule
