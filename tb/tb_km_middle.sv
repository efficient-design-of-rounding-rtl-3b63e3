// tb_km_middle: self-checking testbench of the middle-term adder A3.
// Two instances for N = 8 (one per middle-term mode) get random p1, p2, p3
// over their full ranges, including the cases where the result is negative;
// mid is read as a two's-complement number (N+3 and N+4 bits) and compared with
// p3 - p1 - p2 and p3 - (p1 - p2). The published 8-bit values (p1 = 14,
// p2 = 8, p3 = 48 -> 42) are checked for the second mode.
module tb_km_middle;
  import rbkm_pkg::*;

  localparam int unsigned N  = 8;
  localparam int unsigned MK = mid_width(N, MID_KARATSUBA);
  localparam int unsigned MS = mid_width(N, MID_SUB_DIFF);

  int checks = 0, failures = 0, negs = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [N-1:0]  p1, p2;
  logic [N+1:0]  p3;
  logic [MK-1:0] mk;
  logic [MS-1:0] ms;
  logic          nk, ns;

  km_middle #(.N(N), .MMODE(MID_KARATSUBA)) dut_k (.p1(p1), .p2(p2), .p3(p3), .mid(mk), .neg(nk));
  km_middle #(.N(N), .MMODE(MID_SUB_DIFF))  dut_s (.p1(p1), .p2(p2), .p3(p3), .mid(ms), .neg(ns));

  task automatic apply(int x1, int x2, int x3);
    int ek, es;
    p1 = N'(x1); p2 = N'(x2); p3 = (N+2)'(x3);
    #1;
    ek = x3 - x1 - x2;
    es = x3 - (x1 - x2);
    checks += 4;
    if (int'($signed(mk)) != ek) begin failures++; $display("FAIL karatsuba %0d %0d %0d: got %0d exp %0d", x1, x2, x3, $signed(mk), ek); end
    if (int'($signed(ms)) != es) begin failures++; $display("FAIL sub_diff %0d %0d %0d: got %0d exp %0d", x1, x2, x3, $signed(ms), es); end
    if (nk != (ek < 0)) begin failures++; $display("FAIL neg flag karatsuba"); end
    if (ns != (es < 0)) begin failures++; $display("FAIL neg flag sub_diff"); end
    if (ek < 0) negs++;
  endtask

  initial begin
    apply(14, 8, 48);
    checks++;
    if (int'($signed(ms)) != 42) begin failures++; $display("FAIL published s4"); end
    apply(0, 0, 0);
    apply(255, 255, 0);
    apply(255, 0, 1023);
    apply(0, 255, 1023);
    for (int n = 0; n < 20000; n++) apply(int'($urandom % 256), int'($urandom % 256), int'($urandom % 1024));
    checks++;
    if (negs == 0) begin failures++; $display("FAIL no negative middle term applied"); end
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
