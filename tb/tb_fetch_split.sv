// tb_fetch_split: one encoded example of every instruction format with
// random register numbers and constants; checks icode, ifun, rA, rB, valC,
// valP (pc + length from the Y86-64 encoding) and the invalid flag.
module tb_fetch_split;
  logic clk = 0;
  logic [63:0] pc, valC, valP;
  logic [79:0] i10bytes;
  logic [3:0] icode, ifun, rA, rB;
  logic instr_valid;
  int checks = 0, failures = 0;

  fetch_split dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // per icode: has register byte, has constant, length
  logic       regs_t [12] = '{0,0,1,1,1,1,1,0,0,0,1,1};
  logic       cst_t  [12] = '{0,0,0,1,1,1,0,1,1,0,0,0};
  int         len_t  [12] = '{1,1,2,10,10,10,2,9,9,1,2,2};

  initial begin
    for (int n = 0; n < 300; n++) begin
      int ic;
      logic [3:0] a, b, fn;
      logic [63:0] c;
      ic = n % 14;
      a = 4'($urandom); b = 4'($urandom); fn = 4'($urandom); c = {$urandom, $urandom};
      pc = {32'd0, $urandom};
      i10bytes = 80'({$urandom, $urandom, $urandom});
      i10bytes[7:0] = {4'(ic), fn};
      if (ic < 12) begin
        if (regs_t[ic]) i10bytes[15:8] = {a, b};
        if (cst_t[ic]) begin
          if (regs_t[ic]) i10bytes[79:16] = c; else i10bytes[71:8] = c;
        end
      end
      #1;
      checks++;
      if (ic >= 12) begin
        if (instr_valid !== 0) begin failures++; $display("FAIL invalid icode %h accepted", ic); end
      end else if (instr_valid !== 1 || icode !== 4'(ic) || ifun !== fn ||
                   rA !== (regs_t[ic] ? a : 4'hF) || rB !== (regs_t[ic] ? b : 4'hF) ||
                   valC !== (cst_t[ic] ? c : 64'd0) || valP !== pc + 64'(len_t[ic])) begin
        failures++;
        $display("FAIL icode %h: rA=%h rB=%h valC=%h valP=%h", ic, rA, rB, valC, valP);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
