// tb_lattice_stage: one analysis lattice stage with beta = 5/128 and one
// without scaling, random inputs and coefficients, outputs compared with
// f = f_in - k b', b = b' - k f_in computed here from the stored sample.
module tb_lattice_stage;
  import ha_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [7:0] k, f_in, b_in, f1, b1, d1, f0, b0, d0;

  lattice_stage #(.USE_SCALE(1'b1), .SCALE_Q7(8'sd5)) dut1 (
    .clk, .rst_n, .in_valid, .k, .f_in, .b_in, .f_out(f1), .b_out(b1), .b_dly(d1));
  lattice_stage #(.USE_SCALE(1'b0)) dut0 (
    .clk, .rst_n, .in_valid, .k, .f_in, .b_in, .f_out(f0), .b_out(b0), .b_dly(d0));
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int prev_b, bs;
    k = 0; f_in = 0; b_in = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    prev_b = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      k = 8'($urandom); f_in = 8'($urandom); b_in = 8'($urandom);
      if (i < 5) begin k = 8'sh80; f_in = 8'sh80; end   // extreme: -1 x -1
      #1;
      bs = sat8(q7(5 * prev_b));
      checks += 5;
      if (d1 !== 8'(prev_b) || d0 !== 8'(prev_b)) begin failures++; $display("FAIL delay"); end
      if (f1 !== 8'(sat8(int'(f_in) - q7(k * bs))))     begin failures++; $display("FAIL f1"); end
      if (b1 !== 8'(sat8(bs - q7(k * f_in))))     begin failures++; $display("FAIL b1"); end
      if (f0 !== 8'(sat8(int'(f_in) - q7(k * prev_b)))) begin failures++; $display("FAIL f0"); end
      if (b0 !== 8'(sat8(prev_b - q7(k * f_in)))) begin failures++; $display("FAIL b0"); end
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      prev_b = int'(b_in);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
