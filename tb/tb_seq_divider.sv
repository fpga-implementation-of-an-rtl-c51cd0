// tb_seq_divider: random signed/unsigned divisions against integer division
// (truncation toward zero, saturation, zero divisor), checking the result
// and that done comes N_W + 1 = 33 clocks after the start cycle; start pulses
// during busy must be ignored.
module tb_seq_divider;
  import ha_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic start;
  logic signed [31:0] dividend;
  logic [23:0] divisor;
  logic busy, done;
  logic signed [17:0] quotient;

  seq_divider dut (.clk, .rst_n, .start, .dividend, .divisor, .busy, .done, .quotient);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input longint n, input longint d);
    int cyc;
    longint want;
    @(negedge clk);
    dividend = 32'(n); divisor = 24'(d); start = 1;
    @(negedge clk);
    start = 1;            // ignored: busy
    dividend = 32'h12345;
    cyc = 1;
    @(negedge clk);
    start = 0;
    cyc++;
    while (!done) begin @(negedge clk); cyc++; end
    want = div_sat(longint'($signed(32'(n))), d, (1 << 17) - 1);
    checks += 2;
    if (quotient !== 18'(want)) begin
      failures++; $display("FAIL %0d / %0d = %0d, want %0d", $signed(32'(n)), d, quotient, want);
    end
    if (cyc != 33) begin
      failures++; $display("FAIL latency %0d", cyc);
    end
    @(negedge clk);
  endtask

  initial begin
    start = 0; dividend = 0; divisor = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(1000, 7);
    run(-1000, 7);
    run(longint'(32'sh80000000), 1);    // saturates negative
    run(longint'(32'sh7FFFFFFF), 3);    // saturates positive
    run(12345, 0);            // divide by zero -> 0
    run(5, 9);                // |q| < 1 -> 0
    for (int i = 0; i < 300; i++) begin
      longint n, d;
      n = longint'($signed($urandom)) >>> ($urandom % 20);
      d = (longint'($urandom) % (1 << 23)) >> ($urandom % 22);
      run(n, d);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
