// tb_booth_encoder: for every 3-bit group and every 8-bit multiplicand,
// checks that pp + neg equals the radix-4 Booth digit (0, +-1, +-2) times the
// multiplicand, as a 9-bit two's-complement value.
module tb_booth_encoder;
  int checks = 0, failures = 0;
  logic [2:0]        grp;
  logic signed [7:0] a;
  logic signed [8:0] pp;
  logic              neg;

  booth_encoder #(.A_W(8)) dut (.grp, .a, .pp, .neg);

  function automatic int digit(input logic [2:0] g);
    case (g)
      3'b000, 3'b111: return 0;
      3'b001, 3'b010: return 1;
      3'b011:         return 2;
      3'b100:         return -2;
      default:        return -1;
    endcase
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int g = 0; g < 8; g++) begin
      for (int v = -128; v < 128; v++) begin
        logic signed [8:0] want;
        grp = 3'(g); a = 8'(v);
        #1;
        want = 9'(digit(3'(g)) * v);
        checks++;
        if (9'(pp + 9'(neg)) !== want || neg !== (digit(3'(g)) < 0)) begin
          failures++;
          $display("FAIL grp=%b a=%0d pp=%h neg=%b want %0d", grp, v, pp, neg, want);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
