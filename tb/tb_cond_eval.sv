// tb_cond_eval: the condition codes are produced from a real comparison
// (b - a of random signed numbers, with ZF/SF/OF worked out here), and the
// outcome for each condition is compared with the signed relation of b and
// a it stands for: le (b<=a), l (b<a), e, ne, ge, g; always is 1, and
// undefined function codes give 0.
module tb_cond_eval;
  import y86_pkg::*;
  logic clk = 0;
  logic [3:0] ifun;
  cc_t cc;
  logic cnd;
  int checks = 0, failures = 0;

  cond_eval dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 600; n++) begin
      logic signed [63:0] a, b;
      logic signed [64:0] w;
      logic exp;
      a = (n % 3 == 0) ? 64'sd5 : $signed({$urandom, $urandom});
      b = (n % 3 == 0) ? $signed(64'(n % 11)) : ((n % 7 == 0) ? a : $signed({$urandom, $urandom}));
      w = {b[63], b} - {a[63], a};
      cc.zf = (w[63:0] == 0); cc.sf = w[63]; cc.of = (w[64] != w[63]);
      for (int f = 0; f < 16; f++) begin
        ifun = 4'(f); #1;
        case (f)
          0: exp = 1;
          1: exp = b <= a;
          2: exp = b < a;
          3: exp = b == a;
          4: exp = b != a;
          5: exp = b >= a;
          6: exp = b > a;
          default: exp = 0;
        endcase
        checks++;
        if (cnd !== exp) begin failures++; $display("FAIL ifun=%0d a=%0d b=%0d", f, a, b); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
