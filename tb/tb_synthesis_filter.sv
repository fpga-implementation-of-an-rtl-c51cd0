// tb_synthesis_filter: the 8-stage all-pole lattice [1 - A(z/gamma)]^-1 with random reflection
// coefficients (changed every 64 samples, |k| <= 127/128) and random or
// full-scale inputs; every output is compared with the reference model and
// the one-clock latency is checked. A run with all k = 0 must give the
// input back unchanged.
module tb_synthesis_filter;
  import ha_ref_pkg::*;
  localparam int M = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic signed [7:0] x_in, y_out;
  logic signed [M-1:0][7:0] k;
  int kv [];
  ha_model m;

  synthesis_filter dut (.clk, .rst_n, .in_valid, .x_in, .k, .out_valid, .y_out);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic put(input int x);
    int want;
    @(negedge clk);
    in_valid = 1; x_in = 8'(x);
    for (int i = 0; i < M; i++) k[i] = 8'(kv[i]);
    want = m.syn_step(x, kv);
    @(negedge clk);
    in_valid = 0;
    checks++;
    if (!out_valid || y_out !== 8'(want)) begin
      failures++;
      if (failures < 10) $display("FAIL x=%0d y=%0d want %0d", x, y_out, want);
    end
  endtask

  initial begin
    m = new(M);
    kv = new[M];
    for (int i = 0; i < M; i++) kv[i] = 0;
    x_in = 0; k = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 50; i++) begin
      int x;
      x = int'($signed(8'($urandom)));
      put(x);
      checks++;
      if (y_out !== 8'(x)) begin failures++; $display("FAIL k=0 not transparent"); end
    end
    for (int blk = 0; blk < 60; blk++) begin
      for (int i = 0; i < M; i++) begin
        kv[i] = int'($urandom % 255) - 127;
        if (blk % 3 == 0) kv[i] = kv[i] / 4;   // milder coefficients
      end
      for (int j = 0; j < 64; j++) begin
        if (blk % 5 == 4) put((j % 2 != 0) ? -128 : 127);
        else              put(int'($signed(8'($urandom))) / ((blk % 2 != 0) ? 1 : 4));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
