// tb_fast_adder -- end-to-end test of the Fast Adder at its default size.
//
// The top is instantiated with no parameter overrides (N=64, D=8, C=6).
// Every result is compared with the simulator's integer sum, so the test
// checks that the adder is always exact. The slow flag is compared with an
// independent model of the checker rule (some block k in 1..N/D-2 has its C
// lowest bit pairs all propagating). The test counts each mechanism:
//   fast      - checker passed, Near Adder result used,
//   slow      - checker failed, fallback adder result used,
//   caught    - slow path taken where the Near Adder really was wrong,
//   false     - slow path taken although the Near Adder was right,
// and fails if any of them never happened. For uniform random operands it
// also checks the slow-path rate against the bound (N/D-2)/2**C and prints
// the expected delay in gate levels,
//   max(T_near, T_check) + T_fallback * Pr[slow],
// using the unit-delay depths of the adders as built here.
module tb_fast_adder;
  import fast_adder_pkg::*;
  localparam int unsigned N = N_DEFAULT, D = D_DEFAULT, C = C_DEFAULT, NB = N / D;

  logic [N-1:0] a, b, s;
  logic         co, slow;
  int checks = 0, failures = 0;
  int n_fast = 0, n_slow = 0, n_caught = 0, n_false = 0, n_rand = 0, n_rand_slow = 0;
  bit counting = 0;

  fast_adder dut (.a(a), .b(b), .sum(s), .cout(co), .slow(slow));

  function automatic bit model_slow(input logic [N-1:0] x, input logic [N-1:0] y);
    logic [N-1:0] mask = (N'(1) << C) - N'(1);
    bit f = 0;
    for (int k = 1; k <= NB - 2; k++)
      if ((((x ^ y) >> (k * D)) & mask) == mask) f = 1;
    return f;
  endfunction

  // Near Adder result modelled with integer arithmetic, window by window.
  function automatic logic [N:0] model_near(input logic [N-1:0] x, input logic [N-1:0] y);
    logic [N:0] r = '0;
    for (int w = 0; w + 1 < NB; w++) begin
      logic [2*D:0] ws;
      ws = {1'b0, x[w*D +: 2*D]} + {1'b0, y[w*D +: 2*D]};
      if (w == 0) r[2*D-1:0] = ws[2*D-1:0];
      else        r[(w+1)*D +: D] = ws[2*D-1:D];
      if (w == NB - 2) r[N] = ws[2*D];
    end
    return r;
  endfunction

  task automatic apply(input logic [N-1:0] x, input logic [N-1:0] y);
    logic [N:0] truth;
    bit want_slow, near_ok;
    a = x; b = y;
    #1;
    truth     = {1'b0, x} + {1'b0, y};
    want_slow = model_slow(x, y);
    near_ok   = (model_near(x, y) == truth);
    checks += 2;
    if ({co, s} !== truth) begin
      failures++;
      $display("FAIL sum %h + %h: got %b_%h want %h", x, y, co, s, truth);
    end
    if (slow !== want_slow) begin
      failures++;
      $display("FAIL slow flag %h + %h: got %0d want %0d", x, y, slow, want_slow);
    end
    if (slow) begin
      n_slow++;
      if (near_ok) n_false++; else n_caught++;
    end else begin
      n_fast++;
      checks++;
      if (!near_ok) begin
        failures++;
        $display("FAIL fast path taken with a wrong Near Adder sum, %h + %h", x, y);
      end
    end
    if (counting) begin
      n_rand++;
      if (slow) n_rand_slow++;
    end
  endtask

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real p_slow, bound, t_near, t_chk, t_conv, t_exp;
    // Directed: trivial, full propagate, a Near Adder miss, a false alarm.
    apply('0, '0);
    apply('1, 64'd1);
    apply(64'h0000_0000_0000_FF80, 64'h0000_0000_0000_0080);
    apply(64'h0000_0000_0000_3F00, 64'h0);
    apply(64'h7FFF_FFFF_FFFF_FFFF, 64'h0000_0000_0000_0001);
    counting = 1;
    for (int i = 0; i < 50000; i++) apply({$urandom, $urandom}, {$urandom, $urandom});
    counting = 0;

    p_slow = real'(n_rand_slow) / real'(n_rand);
    bound  = real'(NB - 2) / real'(1 << C);
    // Unit-delay depths of this implementation: prefix adder of width W is
    // 1 (g/p) + clog2(W) (prefix) + 1 (sum XOR); checker 1 + clog2(C) + clog2(NB-2).
    t_near = 2.0 + real'(clog2(2 * D));
    t_chk  = 1.0 + real'(clog2(C)) + real'(clog2(NB - 2));
    t_conv = 2.0 + real'(clog2(N));
    t_exp  = ((t_near > t_chk) ? t_near : t_chk) + t_conv * p_slow;
    $display("N=%0d D=%0d C=%0d: fast=%0d slow=%0d caught=%0d false_alarm=%0d",
             N, D, C, n_fast, n_slow, n_caught, n_false);
    $display("random slow-path rate %f (bound %f); expected depth %f levels vs %f worst case",
             p_slow, bound, t_exp, t_conv);
    checks++;
    if (p_slow > bound + 0.01) begin
      failures++;
      $display("FAIL slow-path rate above bound");
    end
    checks += 4;
    if (n_fast == 0)   begin failures++; $display("FAIL fast path never taken"); end
    if (n_slow == 0)   begin failures++; $display("FAIL slow path never taken"); end
    if (n_caught == 0) begin failures++; $display("FAIL no Near Adder error caught"); end
    if (n_false == 0)  begin failures++; $display("FAIL no false alarm seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
