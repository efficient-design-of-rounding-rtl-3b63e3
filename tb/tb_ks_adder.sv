// tb_ks_adder: self-checking testbench of the Kogge-Stone adder.
// A 5-bit instance is checked exhaustively (all a, b, cin) and a 37-bit
// instance (an odd, non-power-of-two width) with random operands and the
// full-length carry chain.
module tb_ks_adder;
  localparam int unsigned WS = 5;
  localparam int unsigned WL = 37;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [WS-1:0] sa, sb, ss;  logic scin, scout;
  logic [WL-1:0] la, lb, ls;  logic lcin, lcout;

  ks_adder #(.W(WS)) dut_s (.a(sa), .b(sb), .cin(scin), .sum(ss), .cout(scout));
  ks_adder #(.W(WL)) dut_l (.a(la), .b(lb), .cin(lcin), .sum(ls), .cout(lcout));

  task automatic check_l(logic [WL-1:0] x, logic [WL-1:0] y, logic ci);
    logic [WL:0] expv;
    la = x; lb = y; lcin = ci;
    #1;
    expv = {1'b0, x} + {1'b0, y} + (WL+1)'(ci);
    checks++;
    if ({lcout, ls} !== expv) begin
      failures++;
      $display("FAIL W=%0d %h + %h + %0d: got %h exp %h", WL, x, y, ci, {lcout, ls}, expv);
    end
  endtask

  initial begin
    for (int i = 0; i < (1 << WS); i++)
      for (int j = 0; j < (1 << WS); j++)
        for (int k = 0; k < 2; k++) begin
          sa = WS'(i); sb = WS'(j); scin = k[0];
          #1;
          checks++;
          if ({scout, ss} !== (WS+1)'(i + j + k)) begin
            failures++;
            $display("FAIL W=%0d %0d + %0d + %0d: got %0d", WS, i, j, k, {scout, ss});
          end
        end
    check_l('1, '0, 1'b1);
    check_l('1, '1, 1'b1);
    check_l('0, '0, 1'b0);
    for (int n = 0; n < 5000; n++)
      check_l(WL'({$urandom, $urandom}), WL'({$urandom, $urandom}), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
