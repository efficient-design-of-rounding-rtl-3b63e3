// tb_rbkm_full: the multiplier at its default configuration (16 x 16 bits,
// nearest rounding, Karatsuba middle term), with no parameter overridden.
// Corner operands, the operands of the published 16-bit waveform and 200000
// random operand pairs are multiplied and compared with the arithmetic model
// in rbkm_ref_pkg. The mean relative error against the exact product is
// printed; operand pairs whose approximation leaves 0..2^32-1 (and so
// wraps) are counted and printed.
module tb_rbkm_full;
  import rbkm_pkg::*;
  import rbkm_ref_pkg::*;

  localparam int unsigned N = 16;

  int checks = 0, failures = 0, n_wrap = 0, n_nonzero = 0;
  real err_sum = 0.0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [N-1:0]   a, b;
  logic [2*N-1:0] p;

  rbkm_multiplier dut (.a(a), .b(b), .p(p));

  task automatic apply(longint x, longint y);
    longint r, raw, ex;
    a = N'(x); b = N'(y);
    #1;
    raw = ref_rbkm_raw(x, y, N, ROUND_NEAREST, MID_KARATSUBA);
    r   = ref_rbkm(x, y, N, ROUND_NEAREST, MID_KARATSUBA);
    ex  = x * y;
    checks++;
    if (longint'(p) != r) begin
      failures++;
      if (failures < 20) $display("FAIL %0d*%0d: got %0d exp %0d", x, y, p, r);
    end
    if (raw < 0 || raw >= (longint'(1) << (2 * N))) n_wrap++;
    if (ex != 0) begin
      n_nonzero++;
      err_sum += ((raw > ex) ? real'(raw - ex) : real'(ex - raw)) / real'(ex);
    end
  endtask

  initial begin
    apply(0, 0);
    apply(65535, 65535);
    apply(65535, 0);
    apply(1, 1);
    apply(500, 10);
    apply(255, 255);
    apply(256, 256);
    apply(49152, 49151);
    apply(32768, 32768);
    for (int n = 0; n < 200000; n++) begin
      logic [N-1:0] x, y;
      x = N'($urandom);
      y = N'($urandom);
      apply(longint'(x), longint'(y));
    end
    $display("mean relative error %0.4f %% over %0d nonzero products, %0d wrapped",
             100.0 * err_sum / real'(n_nonzero), n_nonzero, n_wrap);
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
