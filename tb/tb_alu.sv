// tb_alu: random and corner operands for add, sub, and, xor. Expected valE
// and condition codes are computed here with 65-bit and signed arithmetic:
// OF is set when the signed result does not fit in 64 bits.
module tb_alu;
  import y86_pkg::*;
  logic clk = 0;
  logic [63:0] aluA, aluB, valE;
  alufun_t alufun;
  cc_t cc_new;
  int checks = 0, failures = 0;

  alu dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input logic [63:0] a, input logic [63:0] b, input alufun_t f);
    logic signed [64:0] wide;
    logic [63:0] e; logic of;
    aluA = a; aluB = b; alufun = f; #1;
    case (f)
      ALU_ADD: begin wide = $signed({b[63], b}) + $signed({a[63], a}); e = wide[63:0]; of = wide[64] != wide[63]; end
      ALU_SUB: begin wide = $signed({b[63], b}) - $signed({a[63], a}); e = wide[63:0]; of = wide[64] != wide[63]; end
      ALU_AND: begin e = a & b; of = 0; end
      default: begin e = a ^ b; of = 0; end
    endcase
    checks++;
    if (valE !== e || cc_new.zf !== (e == 0) || cc_new.sf !== e[63] || cc_new.of !== of) begin
      failures++;
      $display("FAIL f=%0d a=%h b=%h valE=%h exp %h cc=%b of_exp=%b", f, a, b, valE, e, cc_new, of);
    end
  endtask

  initial begin
    static logic [63:0] corner [6] = '{64'd0, 64'd1, 64'hFFFF_FFFF_FFFF_FFFF, 64'h7FFF_FFFF_FFFF_FFFF,
                                64'h8000_0000_0000_0000, 64'd800};
    for (int f = 0; f < 4; f++)
      foreach (corner[i]) foreach (corner[j]) one(corner[i], corner[j], alufun_t'(f));
    for (int n = 0; n < 2000; n++)
      one({$urandom, $urandom}, {$urandom, $urandom}, alufun_t'($urandom % 4));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
