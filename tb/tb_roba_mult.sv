// tb_roba_mult: self-checking testbench of the rounding-based multiplier.
// A 5-bit instance (the size used for the sum product of an 8-bit
// multiplier) is checked exhaustively in both rounding modes; a 9-bit
// instance (the 16-bit multiplier's sum product) with random operands and
// the extremes. Expected products come from rbkm_ref_pkg::ref_roba. The
// values of the published waveforms are checked by name: 7*2 -> 14,
// 3*3 -> 8, 10*5 -> 48, and with downward rounding 244*10 -> 2208,
// 245*10 -> 2216.
module tb_roba_mult;
  import rbkm_pkg::*;
  import rbkm_ref_pkg::*;

  localparam int unsigned WS = 5;
  localparam int unsigned WL = 9;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [WS-1:0]   sa, sb;
  logic [2*WS-1:0] spn, spd;
  logic [WL-1:0]   la, lb;
  logic [2*WL-1:0] lpn, lpd;
  logic            u0, u1, u2, u3, u4, u5, u6, u7;

  roba_mult #(.W(WS), .RMODE(ROUND_NEAREST)) dut_sn (.a(sa), .b(sb), .p(spn), .a_up(u0), .b_up(u1));
  roba_mult #(.W(WS), .RMODE(ROUND_DOWN))    dut_sd (.a(sa), .b(sb), .p(spd), .a_up(u2), .b_up(u3));
  roba_mult #(.W(WL), .RMODE(ROUND_NEAREST)) dut_ln (.a(la), .b(lb), .p(lpn), .a_up(u4), .b_up(u5));
  roba_mult #(.W(WL), .RMODE(ROUND_DOWN))    dut_ld (.a(la), .b(lb), .p(lpd), .a_up(u6), .b_up(u7));

  task automatic expect_eq(string what, longint got, longint expv);
    checks++;
    if (got != expv) begin
      failures++;
      $display("FAIL %s: got %0d exp %0d", what, got, expv);
    end
  endtask

  task automatic check_l(int x, int y);
    la = WL'(x); lb = WL'(y);
    #1;
    expect_eq($sformatf("9-bit nearest %0d*%0d", x, y), longint'(lpn), ref_roba(longint'(x), longint'(y), ROUND_NEAREST));
    expect_eq($sformatf("9-bit down %0d*%0d", x, y), longint'(lpd), ref_roba(longint'(x), longint'(y), ROUND_DOWN));
  endtask

  initial begin
    for (int i = 0; i < (1 << WS); i++)
      for (int j = 0; j < (1 << WS); j++) begin
        sa = WS'(i); sb = WS'(j);
        #1;
        expect_eq($sformatf("5-bit nearest %0d*%0d", i, j), longint'(spn), ref_roba(longint'(i), longint'(j), ROUND_NEAREST));
        expect_eq($sformatf("5-bit down %0d*%0d", i, j), longint'(spd), ref_roba(longint'(i), longint'(j), ROUND_DOWN));
        expect_eq("up flag a", longint'(u0), longint'(ref_round(longint'(i), ROUND_NEAREST) > longint'(i)));
        expect_eq("up flag b", longint'(u1), longint'(ref_round(longint'(j), ROUND_NEAREST) > longint'(j)));
      end
    // published 8-bit waveform products (both modes agree on these)
    sa = 7;  sb = 2; #1; expect_eq("7*2",  longint'(spn), 14); expect_eq("7*2 d",  longint'(spd), 14);
    sa = 3;  sb = 3; #1; expect_eq("3*3",  longint'(spn), 8);  expect_eq("3*3 d",  longint'(spd), 8);
    sa = 10; sb = 5; #1; expect_eq("10*5", longint'(spn), 48); expect_eq("10*5 d", longint'(spd), 48);
    // published 16-bit waveform products (downward rounding)
    la = 244; lb = 10; #1; expect_eq("244*10 d", longint'(lpd), 2208);
    la = 245; lb = 10; #1; expect_eq("245*10 d", longint'(lpd), 2216);
    check_l(0, 0); check_l(511, 511); check_l(511, 0); check_l(384, 383); check_l(383, 384);
    for (int n = 0; n < 20000; n++) check_l(int'($urandom % 512), int'($urandom % 512));
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
