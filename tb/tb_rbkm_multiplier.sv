// tb_rbkm_multiplier: end-to-end testbench of the approximate Karatsuba
// multiplier.
//
// Four 8-bit instances, one per combination of rounding mode and middle-term
// mode, are driven with all 65536 operand pairs and compared with the
// arithmetic model in rbkm_ref_pkg. The published waveforms are reproduced
// with downward rounding and the p3 - (p1 - p2) middle term:
//   8-bit  55 * 50  -> 2734 (p1 = 14, p2 = 8, p3 = 48, s4 = 42)
//   16-bit 500 * 10 -> 4256 (p1 = 2208, p2 = 0, p3 = 2216, s4 = 8)
// Mechanisms counted, each of which must occur: carry out of the half-sum
// adders A1 and A2, an operand rounded up, an operand rounded down, a
// negative middle term, a product that is exact and one that is not. The
// mean relative error of each configuration, and how many approximate
// products fell outside 0..2^16-1 and wrapped, are printed.
module tb_rbkm_multiplier;
  import rbkm_pkg::*;
  import rbkm_ref_pkg::*;

  localparam int unsigned N = 8;

  int checks = 0, failures = 0;
  int n_carry_a1 = 0, n_carry_a2 = 0, n_round_up = 0, n_round_down = 0;
  int n_mid_neg = 0, n_exact = 0, n_inexact = 0;
  int n_wrap [4] = '{0, 0, 0, 0};
  real err_sum [4];
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [N-1:0]   a, b;
  logic [2*N-1:0] p [4];
  logic [15:0]    a16, b16;
  logic [31:0]    p16;

  rbkm_multiplier #(.N(N), .RMODE(ROUND_NEAREST), .MMODE(MID_KARATSUBA)) dut0 (.a(a), .b(b), .p(p[0]));
  rbkm_multiplier #(.N(N), .RMODE(ROUND_NEAREST), .MMODE(MID_SUB_DIFF))  dut1 (.a(a), .b(b), .p(p[1]));
  rbkm_multiplier #(.N(N), .RMODE(ROUND_DOWN),    .MMODE(MID_KARATSUBA)) dut2 (.a(a), .b(b), .p(p[2]));
  rbkm_multiplier #(.N(N), .RMODE(ROUND_DOWN),    .MMODE(MID_SUB_DIFF))  dut3 (.a(a), .b(b), .p(p[3]));
  rbkm_multiplier #(.N(16), .RMODE(ROUND_DOWN),   .MMODE(MID_SUB_DIFF))  dut16 (.a(a16), .b(b16), .p(p16));

  localparam round_mode_e RM [4] = '{ROUND_NEAREST, ROUND_NEAREST, ROUND_DOWN, ROUND_DOWN};
  localparam mid_mode_e   MM [4] = '{MID_KARATSUBA, MID_SUB_DIFF, MID_KARATSUBA, MID_SUB_DIFF};

  task automatic expect_eq(string what, longint got, longint expv);
    checks++;
    if (got != expv) begin
      failures++;
      $display("FAIL %s: got %0d exp %0d", what, got, expv);
    end
  endtask

  task automatic require(string what, int count);
    checks++;
    $display("mechanism %-28s happened %0d times", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endtask

  initial begin
    for (int k = 0; k < 4; k++) err_sum[k] = 0.0;

    // published 8-bit waveform
    a = 8'd55; b = 8'd50;
    #1;
    expect_eq("fig 8-bit p", longint'(p[3]), 2734);
    expect_eq("fig 8-bit c (s1)", longint'(dut3.c), 10);
    expect_eq("fig 8-bit d (s2)", longint'(dut3.d), 5);
    expect_eq("fig 8-bit p1", longint'(dut3.p1), 14);
    expect_eq("fig 8-bit p2", longint'(dut3.p2), 8);
    expect_eq("fig 8-bit p3", longint'(dut3.p3), 48);
    expect_eq("fig 8-bit s4", longint'($signed(dut3.mid)), 42);
    expect_eq("fig 8-bit sh1+sh3", longint'(dut3.sh_outer), 2048 + 14);
    expect_eq("fig 8-bit sh2", longint'(dut3.sh_mid), 672);

    // published 16-bit waveform
    a16 = 16'd500; b16 = 16'd10;
    #1;
    expect_eq("fig 16-bit p", longint'(p16), 4256);
    expect_eq("fig 16-bit s1", longint'(dut16.c), 245);
    expect_eq("fig 16-bit s2", longint'(dut16.d), 10);
    expect_eq("fig 16-bit p1", longint'(dut16.p1), 2208);
    expect_eq("fig 16-bit p2", longint'(dut16.p2), 0);
    expect_eq("fig 16-bit p3", longint'(dut16.p3), 2216);
    expect_eq("fig 16-bit s4", longint'($signed(dut16.mid)), 8);
    expect_eq("fig 16-bit sh2", longint'(dut16.sh_mid), 2048);

    // exhaustive 8-bit sweep
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        a = N'(i); b = N'(j);
        #1;
        for (int k = 0; k < 4; k++) begin
          longint r, raw;
          raw = ref_rbkm_raw(longint'(i), longint'(j), N, RM[k], MM[k]);
          r   = ref_rbkm(longint'(i), longint'(j), N, RM[k], MM[k]);
          checks++;
          if (longint'(p[k]) != r) begin
            failures++;
            if (failures < 20) $display("FAIL cfg %0d %0d*%0d: got %0d exp %0d", k, i, j, p[k], r);
          end
          if (raw < 0 || raw >= 65536) n_wrap[k]++;
          if (i * j != 0) err_sum[k] += ((raw > i * j) ? real'(raw - i * j) : real'(i * j - raw)) / real'(i * j);
        end
        if (dut0.c[N/2]) n_carry_a1++;
        if (dut0.d[N/2]) n_carry_a2++;
        if (dut0.up_c || dut0.up_ah || dut0.up_al) n_round_up++;
        if (dut0.c != 0 && !dut0.up_c) n_round_down++;
        if (dut0.mid_neg) n_mid_neg++;
        if (longint'(p[0]) == i * j) n_exact++; else n_inexact++;
      end

    for (int k = 0; k < 4; k++)
      $display("config %0d (%s, %s): mean relative error %0.4f %%, %0d results wrapped (outside 0..2^16-1)",
               k, RM[k].name(), MM[k].name(), 100.0 * err_sum[k] / 65025.0, n_wrap[k]);
    require("A1 carry out", n_carry_a1);
    require("A2 carry out", n_carry_a2);
    require("operand rounded up", n_round_up);
    require("operand rounded down", n_round_down);
    require("negative middle term", n_mid_neg);
    require("exact product", n_exact);
    require("approximate product", n_inexact);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
