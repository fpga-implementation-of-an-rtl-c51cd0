// tb_gal_stage: one adaptive lattice stage fed with a correlated signal
// (first-order recursive noise) and random full-scale bursts. After each
// sample it checks the stage outputs, waits for upd_done and checks the new
// coefficient against the reference model, and that the update takes 34
// clocks. It also checks that a strongly correlated input drives k positive
// and that a clamp is reported when, after a long silence, a tiny correlated
// signal gives a very large normalised step.
module tb_gal_stage;
  import ha_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [7:0] f_in, b_in, f_out, b_out, k;
  logic busy, upd_done, k_clamped;
  ha_model m;
  int n_clamp = 0;

  gal_stage dut (.clk, .rst_n, .in_valid, .f_in, .b_in, .f_out, .b_out, .k,
                 .busy, .upd_done, .k_clamped);
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic put(input int f, input int b);
    int fo, bo, cyc;
    @(negedge clk);
    in_valid = 1; f_in = 8'(f); b_in = 8'(b);
    #1;
    m.gal_step(0, f, b, fo, bo);
    checks += 2;
    if (f_out !== 8'(fo)) begin failures++; $display("FAIL f_out %0d want %0d", f_out, fo); end
    if (b_out !== 8'(bo)) begin failures++; $display("FAIL b_out %0d want %0d", b_out, bo); end
    @(negedge clk);
    in_valid = 0;
    cyc = 1;
    while (!upd_done) begin @(negedge clk); cyc++; end
    checks += 3;
    if (cyc != 34) begin failures++; $display("FAIL update latency %0d", cyc); end
    if (k !== 8'(m.k(0))) begin failures++; $display("FAIL k %0d want %0d", k, m.k(0)); end
    if (k_clamped !== m.clamped[0]) begin failures++; $display("FAIL clamp flag"); end
    if (k_clamped) n_clamp++;
    @(negedge clk);
    checks++;
    if (busy) begin failures++; $display("FAIL busy after update"); end
  endtask

  initial begin
    int s;
    m = new(1);
    f_in = 0; b_in = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    put(0, 0);                       // silence: sigma = 0, k must hold
    s = 0;
    for (int i = 0; i < 400; i++) begin
      s = (s * 7) / 8 + int'($urandom % 33) - 16;
      put(s, s);
    end
    checks++;
    if (m.k(0) <= 0 || k <= 0) begin failures++; $display("FAIL k did not adapt: %0d", k); end
    for (int i = 0; i < 300; i++) begin
      int v;
      v = int'($signed(8'($urandom)));
      put(v, (i % 3 == 0) ? -v : v);
    end
    // long silence lets sigma decay to zero; a tiny correlated signal then
    // gives a huge normalised step that must be clamped
    for (int i = 0; i < 900; i++) put(0, 0);
    checks++;
    if (m.sigma[0] != 0) begin failures++; $display("FAIL sigma did not decay"); end
    for (int i = 0; i < 20; i++) put(1, 1);
    checks++;
    if (n_clamp == 0) begin failures++; $display("FAIL clamp never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
