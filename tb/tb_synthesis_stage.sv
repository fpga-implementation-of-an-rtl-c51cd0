// tb_synthesis_stage: random inputs and coefficients; checks
// f_out = f_in + k g', g_out = g' - k f_out with g' = gamma g(n-1).
module tb_synthesis_stage;
  import ha_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [7:0] k, f_in, g_in, f_out, g_out;

  synthesis_stage dut (.clk, .rst_n, .in_valid, .k, .f_in, .g_in, .f_out, .g_out);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int prev_g, gs, fo;
    k = 0; f_in = 0; g_in = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    prev_g = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      k = 8'($urandom); f_in = 8'($urandom); g_in = 8'($urandom);
      #1;
      gs = sat8(q7(77 * prev_g));
      fo = sat8(int'(f_in) + q7(k * gs));
      checks += 2;
      if (f_out !== 8'(fo))                  begin failures++; $display("FAIL f %0d want %0d", f_out, fo); end
      if (g_out !== 8'(sat8(gs - q7(k * fo)))) begin failures++; $display("FAIL g"); end
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      prev_g = int'(g_in);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
