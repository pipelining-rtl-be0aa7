// tb_pipe_reg: checks the stall/bubble register bank.
// Part 1 replays an 8-bit bank with default 0xFF through a fixed sequence of
// inputs and stall/bubble controls whose expected outputs were worked out by
// hand (stall keeps, bubble loads 0xFF). Part 2 drives random inputs and
// controls and compares with a reference register kept in the testbench.
module tb_pipe_reg;
  logic clk = 0, rst = 1, stall = 0, bubble = 0;
  logic [7:0] d = 0, q;
  int checks = 0, failures = 0;

  pipe_reg #(.W(8), .DEFAULT(8'hFF)) dut (.clk, .rst, .stall, .bubble, .d, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [7:0] exp, input string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s: q=%h expected %h", what, q, exp);
    end
  endtask

  // time: a_value, stall, bubble -> value of B at time+1
  logic [7:0] a_v [8] = '{8'h01, 8'h02, 8'h03, 8'h04, 8'h05, 8'h06, 8'h07, 8'h08};
  logic       st  [8] = '{0, 1, 0, 0, 0, 0, 1, 1};
  logic       bu  [8] = '{0, 0, 0, 1, 0, 0, 0, 0};
  logic [7:0] b_v [9] = '{8'hFF, 8'h01, 8'h01, 8'h03, 8'hFF, 8'h05, 8'h06, 8'h06, 8'h06};

  initial begin
    logic [7:0] model;
    @(posedge clk); #1 rst = 0;
    check(8'hFF, "after reset");
    for (int t = 0; t < 8; t++) begin
      d = a_v[t]; stall = st[t]; bubble = bu[t];
      @(posedge clk); #1;
      check(b_v[t+1], $sformatf("table time %0d", t+1));
    end
    model = q;
    for (int i = 0; i < 300; i++) begin
      d = 8'($urandom); stall = 1'($urandom % 3 == 0);
      bubble = !stall && ($urandom % 5 == 0);
      @(posedge clk); #1;
      if (bubble) model = 8'hFF; else if (!stall) model = d;
      check(model, "random");
    end
    stall = 0; bubble = 0; rst = 1; d = 8'h11;
    @(posedge clk); #1;
    check(8'hFF, "reset loads default");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
