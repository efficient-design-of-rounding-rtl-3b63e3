// tb_roba_round: self-checking testbench of the power-of-two rounding stage.
// Two 9-bit instances, one rounding to nearest and one rounding down, are
// driven with every input value; pow2, exp, up and zero are compared with
// rbkm_ref_pkg::ref_round. The halfway values 3 * 2^(k-1) must round up.
module tb_roba_round;
  import rbkm_pkg::*;
  import rbkm_ref_pkg::*;

  localparam int unsigned W  = 9;
  localparam int unsigned EW = $clog2(W + 1);

  int checks = 0, failures = 0, ties = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [W-1:0]  x;
  logic [W:0]    pn, pd;
  logic [EW-1:0] en, ed;
  logic          un, ud, zn, zd;

  roba_round #(.W(W), .RMODE(ROUND_NEAREST)) dut_n (.x(x), .pow2(pn), .exp(en), .up(un), .zero(zn));
  roba_round #(.W(W), .RMODE(ROUND_DOWN))    dut_d (.x(x), .pow2(pd), .exp(ed), .up(ud), .zero(zd));

  task automatic expect_eq(string what, longint got, longint expv);
    checks++;
    if (got != expv) begin
      failures++;
      $display("FAIL x=%0d %s: got %0d exp %0d", x, what, got, expv);
    end
  endtask

  initial begin
    for (int v = 0; v < (1 << W); v++) begin
      longint rn, rd;
      x = W'(v);
      #1;
      rn = ref_round(longint'(v), ROUND_NEAREST);
      rd = ref_round(longint'(v), ROUND_DOWN);
      expect_eq("nearest pow2", longint'(pn), rn);
      expect_eq("down pow2", longint'(pd), rd);
      expect_eq("nearest exp", longint'(1) << en, (v == 0) ? 1 : rn);
      expect_eq("down exp", longint'(1) << ed, (v == 0) ? 1 : rd);
      expect_eq("nearest up", longint'(un), longint'(rn > longint'(v)));
      expect_eq("down up", longint'(ud), 0);
      expect_eq("zero", longint'(zn), longint'(v == 0));
      expect_eq("zero d", longint'(zd), longint'(v == 0));
      // halfway value 3*2^(k-1): rounds up
      for (int k = 1; k < W; k++)
        if (v == 3 << (k - 1)) begin
          ties++;
          expect_eq("tie", longint'(pn), longint'(1) << (k + 1));
        end
    end
    checks++;
    if (ties == 0) begin
      failures++;
      $display("FAIL no halfway value was applied");
    end
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
