// tb_iir_highpass: a DC step (output must decay toward zero), an alternating
// full-scale input and a random stream against the reference model of
// y(n) = a y(n-1) + b (x(n) - x(n-1)).
module tb_iir_highpass;
  import ha_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic signed [7:0] x_in, y_out;
  ha_model m;

  iir_highpass dut (.clk, .rst_n, .in_valid, .x_in, .out_valid, .y_out);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic put(input int x, output int y);
    int want;
    @(negedge clk);
    in_valid = 1; x_in = 8'(x);
    want = m.iir_step(x);
    @(negedge clk);
    in_valid = 0;
    y = int'(y_out);
    checks++;
    if (!out_valid || y_out !== 8'(want)) begin
      failures++; $display("FAIL x=%0d y=%0d want %0d", x, y_out, want);
    end
  endtask

  initial begin
    int y;
    m = new(1);
    x_in = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 80; i++) put(100, y);
    checks++;
    if (y > 2 || y < -2) begin failures++; $display("FAIL DC not removed: %0d", y); end
    for (int i = 0; i < 20; i++) put((i % 2 != 0) ? -128 : 127, y);
    for (int i = 0; i < 2000; i++) put(int'($signed(8'($urandom))), y);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
