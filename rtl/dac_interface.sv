// dac_interface: turns the datapath's 8-bit two's-complement output sample
// into the 12-bit offset-binary code of the audio DAC: the sign bit is
// inverted (zero becomes mid-scale, 2048) and four zero LSBs are appended.
// Registered: dac_valid follows y_valid by one clock; the code holds between
// samples. The 12-bit converter follows the design; the mapping is this
// implementation's.
module dac_interface
  import ha_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        y_valid,
  input  sample_t     y_in,
  output logic        dac_valid,
  output logic [11:0] dac_code
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      dac_valid <= 1'b0;
      dac_code  <= 12'h800;
    end else begin
      dac_valid <= y_valid;
      if (y_valid) dac_code <= {~y_in[DATA_W-1], y_in[DATA_W-2:0], 4'b0000};
    end
  end

endmodule
