// tb_carry_save_adder: checks that sum + carry vectors equal x + y + z modulo
// 2^16 and that no carry moves between bits (each s bit is the parity of its
// own column), for random and all-ones operands.
module tb_carry_save_adder;
  int checks = 0, failures = 0;
  logic [15:0] x, y, z, s, c;

  carry_save_adder #(.W(16)) dut (.x, .y, .z, .s, .c);

  task automatic check(input logic [15:0] a, input logic [15:0] b, input logic [15:0] d);
    x = a; y = b; z = d;
    #1;
    checks += 2;
    if (16'(s + c) !== 16'(a + b + d)) begin
      failures++; $display("FAIL sum %h %h %h -> s=%h c=%h", a, b, d, s, c);
    end
    if (s !== (a ^ b ^ d) || c[0] !== 1'b0) begin
      failures++; $display("FAIL column %h %h %h -> s=%h c=%h", a, b, d, s, c);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check('1, '1, '1);
    check(16'h8000, 16'h8000, 16'h8000);
    for (int i = 0; i < 3000; i++) check(16'($urandom), 16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
