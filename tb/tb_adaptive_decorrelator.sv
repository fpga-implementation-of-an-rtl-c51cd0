// tb_adaptive_decorrelator: the 8-stage decorrelator on a synthetic vowel
// (a 100 Hz pulse train through two resonators at 700 Hz and 1200 Hz, 8 kS/s)
// followed by white noise. After every sample it compares the registered
// output and, once k_valid arrives (34 clocks), all eight coefficients with
// the reference model. On the resonant signal k_1 must become clearly
// positive (strong positive correlation of neighbouring samples, since
// f_1 = x(n) - k_1 x(n-1)); on white noise it must relax toward zero.
module tb_adaptive_decorrelator;
  import ha_ref_pkg::*;
  localparam int M = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [7:0] x_in, e_out;
  logic signed [M-1:0][7:0] k;
  logic busy, k_valid, clamp_seen;
  ha_model m;

  adaptive_decorrelator dut (.clk, .rst_n, .in_valid, .x_in, .busy, .k, .k_valid,
                             .e_out, .clamp_seen);
  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic put(input int x);
    int e, cyc;
    @(negedge clk);
    in_valid = 1; x_in = 8'(x);
    e = m.dec_step(x);
    @(negedge clk);
    in_valid = 0;
    checks++;
    if (e_out !== 8'(e)) begin failures++; if (failures < 10) $display("FAIL e %0d want %0d", e_out, e); end
    cyc = 1;
    while (!k_valid) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != 34) begin failures++; $display("FAIL latency %0d", cyc); end
    for (int i = 0; i < M; i++) begin
      checks++;
      if (k[i] !== 8'(m.k(i))) begin
        failures++;
        if (failures < 10) $display("FAIL k[%0d]=%0d want %0d", i, k[i], m.k(i));
      end
    end
  endtask

  initial begin
    real y1, y2, z1, z2, r1, r2, c1, c2, v;
    m = new(M);
    x_in = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    r1 = 0.95; r2 = 0.93;
    c1 = 2.0 * r1 * $cos(2.0 * 3.14159265 * 700.0 / 8000.0);
    c2 = 2.0 * r2 * $cos(2.0 * 3.14159265 * 1200.0 / 8000.0);
    y1 = 0; y2 = 0; z1 = 0; z2 = 0;
    for (int n = 0; n < 1500; n++) begin
      real e0, y, z;
      e0 = (n % 80 == 0) ? 1.0 : 0.0;
      y = e0 + c1 * y1 - r1 * r1 * y2; y2 = y1; y1 = y;
      z = y + c2 * z1 - r2 * r2 * z2; z2 = z1; z1 = z;
      v = z * 12.0;
      if (v > 127.0) v = 127.0;
      if (v < -128.0) v = -128.0;
      put(int'(v));
    end
    checks++;
    $display("vowel: k = %0d %0d %0d %0d", $signed(k[0]), $signed(k[1]), $signed(k[2]), $signed(k[3]));
    if ($signed(k[0]) < 40) begin failures++; $display("FAIL k1 did not track the vowel: %0d", k[0]); end
    for (int n = 0; n < 800; n++) put(int'($signed(8'($urandom))) / 2);
    $display("noise: k = %0d %0d %0d %0d", $signed(k[0]), $signed(k[1]), $signed(k[2]), $signed(k[3]));
    checks++;
    if ($signed(k[0]) < -40 || $signed(k[0]) > 40) begin failures++; $display("FAIL k1 did not relax on noise"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
