// tb_booth_wallace_mult: exhaustive check of the 8 x 8 Booth-Wallace
// multiplier against integer multiplication, plus random checks of the
// 16 x 16, 24 x 10 and 9 x 8 sizes used elsewhere in the design.
module tb_booth_wallace_mult;
  int checks = 0, failures = 0;

  logic signed [7:0]  a8, b8;
  logic signed [15:0] p8;
  logic signed [15:0] a16, b16;
  logic signed [31:0] p16;
  logic signed [23:0] a24;
  logic signed [9:0]  b10;
  logic signed [33:0] p24;
  logic signed [8:0]  a9;
  logic signed [16:0] p9;

  booth_wallace_mult dut8 (.a(a8), .b(b8), .p(p8));
  booth_wallace_mult #(.A_W(16), .B_W(16)) dut16 (.a(a16), .b(b16), .p(p16));
  booth_wallace_mult #(.A_W(24), .B_W(10)) dut24 (.a(a24), .b(b10), .p(p24));
  booth_wallace_mult #(.A_W(9),  .B_W(8))  dut9  (.a(a9),  .b(b8),  .p(p9));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = -128; x < 128; x++) begin
      for (int y = -128; y < 128; y++) begin
        a8 = 8'(x); b8 = 8'(y);
        #1;
        checks++;
        if (p8 !== 16'(x * y)) begin
          failures++;
          if (failures < 10) $display("FAIL 8x8 %0d*%0d=%0d", x, y, p8);
        end
      end
    end
    for (int i = 0; i < 20000; i++) begin
      longint w16, w24, w9;
      a16 = 16'($urandom); b16 = 16'($urandom);
      a24 = 24'($urandom); b10 = 10'($urandom);
      a9  = 9'($urandom);  b8  = 8'($urandom);
      if (i == 0) begin a16 = 16'h8000; b16 = 16'h8000; a24 = 24'h800000; b10 = 10'h200; end
      #1;
      w16 = longint'(a16) * longint'(b16);
      w24 = longint'(a24) * longint'(b10);
      w9  = longint'(a9)  * longint'(b8);
      checks += 3;
      if (p16 !== 32'(w16)) begin failures++; $display("FAIL 16x16 %0d*%0d=%0d", a16, b16, p16); end
      if (p24 !== 34'(w24)) begin failures++; $display("FAIL 24x10 %0d*%0d=%0d", a24, b10, p24); end
      if (p9  !== 17'(w9))  begin failures++; $display("FAIL 9x8 %0d*%0d=%0d", a9, b8, p9); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
