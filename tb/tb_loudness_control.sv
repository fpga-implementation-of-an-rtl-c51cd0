// tb_loudness_control: feeds a reference signal and a "sharpened" signal that
// is the reference times 2 (and later times 1/2); the gain must settle near
// 1/2 (32 in Q2.6) and then near 2 (128), and every output sample must match
// the reference model. Also checks that the gain holds at 1.0 on silence.
module tb_loudness_control;
  import ha_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, ref_valid = 0, y_valid = 0, out_valid, busy;
  logic signed [7:0] ref_in, y_in, y_out;
  logic [7:0] gain;
  ha_model m;

  loudness_control dut (.clk, .rst_n, .ref_valid, .ref_in, .y_valid, .y_in,
                        .out_valid, .y_out, .gain, .busy);
  always #5 clk = ~clk;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic put(input int r, input int y);
    int want;
    @(negedge clk);
    ref_valid = 1; ref_in = 8'(r);
    m.lc_ref(r);
    @(negedge clk);
    ref_valid = 0;
    @(negedge clk);
    y_valid = 1; y_in = 8'(y);
    want = m.lc_step(y);
    @(negedge clk);
    y_valid = 0;
    checks++;
    if (!out_valid || y_out !== 8'(want)) begin
      failures++; if (failures < 10) $display("FAIL y=%0d out=%0d want %0d", y, y_out, want);
    end
    while (busy) @(negedge clk);
    checks++;
    if (gain !== 8'(m.gain)) begin failures++; $display("FAIL gain %0d want %0d", gain, m.gain); end
  endtask

  initial begin
    int r;
    m = new(1);
    ref_in = 0; y_in = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 20; i++) put(0, 0);
    checks++;
    if (gain != 64) begin failures++; $display("FAIL gain moved on silence"); end
    for (int i = 0; i < 600; i++) begin
      r = int'($signed(8'($urandom))) / 3;
      put(r, 2 * r);
    end
    checks++;
    if (gain < 28 || gain > 36) begin failures++; $display("FAIL gain %0d, want about 32", gain); end
    for (int i = 0; i < 600; i++) begin
      r = int'($signed(8'($urandom))) / 2;
      put(r, r / 2);
    end
    checks++;
    if (gain < 115 || gain > 140) begin failures++; $display("FAIL gain %0d, want about 128", gain); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
