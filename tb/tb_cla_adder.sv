// tb_cla_adder: checks the 16-bit and a 7-bit carry-lookahead adder against
// integer addition for corner cases and random operands, with and without
// carry in.
module tb_cla_adder;
  int checks = 0, failures = 0;
  logic [15:0] a, b, s;
  logic        ci, co;
  logic [6:0]  a7, b7, s7;
  logic        co7;

  cla_adder #(.W(16)) dut   (.a(a),  .b(b),  .cin(ci), .sum(s),  .cout(co));
  cla_adder #(.W(7))  dut7  (.a(a7), .b(b7), .cin(ci), .sum(s7), .cout(co7));

  task automatic check(input logic [15:0] x, input logic [15:0] y, input logic c);
    logic [16:0] e;
    logic [7:0]  e7;
    a = x; b = y; ci = c; a7 = x[6:0]; b7 = y[6:0];
    #1;
    e  = 17'(x) + 17'(y) + 17'(c);
    e7 = 8'(x[6:0]) + 8'(y[6:0]) + 8'(c);
    checks += 2;
    if ({co, s} !== e)    begin failures++; $display("FAIL16 %h+%h+%b = %h, want %h", x, y, c, {co, s}, e); end
    if ({co7, s7} !== e7) begin failures++; $display("FAIL7 %h+%h+%b = %h, want %h", x[6:0], y[6:0], c, {co7, s7}, e7); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(16'hFFFF, 16'h0000, 1'b1);
    check(16'hFFFF, 16'hFFFF, 1'b1);
    check(16'h8000, 16'h8000, 1'b0);
    check(16'h0F0F, 16'h00F1, 1'b0);
    check(16'h7FFF, 16'h0001, 1'b0);
    for (int i = 0; i < 4000; i++) check(16'($urandom), 16'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
