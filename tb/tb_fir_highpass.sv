// tb_fir_highpass: drives an impulse (output must be the six coefficients in
// order, then zero), a full-scale alternating signal (saturation) and a random
// stream, comparing every output with the reference model; also checks the
// one-clock latency.
module tb_fir_highpass;
  import ha_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic signed [7:0] x_in, y_out;
  ha_model m;

  fir_highpass dut (.clk, .rst_n, .in_valid, .x_in, .out_valid, .y_out);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic put(input int x);
    int want;
    @(negedge clk);
    in_valid = 1; x_in = 8'(x);
    want = m.fir_step(x);
    @(negedge clk);
    in_valid = 0;
    checks++;
    if (!out_valid || y_out !== 8'(want)) begin
      failures++; $display("FAIL x=%0d y=%0d valid=%b want %0d", x, y_out, out_valid, want);
    end
    @(negedge clk);
    checks++;
    if (out_valid) begin failures++; $display("FAIL out_valid stuck"); end
  endtask

  initial begin
    m = new(1);
    x_in = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // impulse of 127/128: response is c_k * 127/128, floored
    put(127);
    for (int i = 0; i < 8; i++) put(0);
    for (int i = 0; i < 20; i++) put((i % 2 != 0) ? -128 : 127);
    for (int i = 0; i < 2000; i++) put(int'($signed(8'($urandom))));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
