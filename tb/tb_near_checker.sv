// tb_near_checker -- self-checking test of the Near Adder checker.
//
// Reference: FAIL is expected exactly when, for some block k in 1..N/D-2,
// the C lowest bit pairs of the block all differ (a ^ b all ones there);
// the per-block flags are checked one by one. The test also checks the
// property the Fast Adder relies on: whenever the Near Adder's sum is wrong,
// the checker raises FAIL. Directed cases place an all-propagate sample in
// each block in turn, and in the unchecked lowest and top blocks (no FAIL).
// The random false-alarm rate is compared with the bound (N/D-2)/2**C.
module tb_near_checker;
  localparam int unsigned N = 64, D = 8, C = 6, NB = N / D;

  logic [N-1:0]    a, b, nsum;
  logic            ok, fail, ncout;
  logic [NB-3:0]   blk;
  int checks = 0, failures = 0, fails_seen = 0, randoms = 0, near_wrong = 0;

  near_checker dut (.a(a), .b(b), .ok(ok), .fail(fail), .blk_prop(blk));
  near_adder   u_near (.a(a), .b(b), .sum(nsum), .cout(ncout));

  task automatic apply(input logic [N-1:0] x, input logic [N-1:0] y);
    logic [N-1:0] pr;
    logic [NB-3:0] want_blk;
    logic [N:0] truth;
    a = x; b = y;
    #1;
    pr = x ^ y;
    for (int k = 1; k <= NB - 2; k++) begin
      want_blk[k-1] = 1'b1;
      for (int i = 0; i < C; i++) if (!pr[k*D+i]) want_blk[k-1] = 1'b0;
    end
    truth = {1'b0, x} + {1'b0, y};
    checks += 3;
    if (blk !== want_blk) begin
      failures++;
      $display("FAIL blocks %h ^ %h: got %b want %b", x, y, blk, want_blk);
    end
    if (fail !== (want_blk != 0) || ok !== (want_blk == 0)) begin
      failures++;
      $display("FAIL verdict %h ^ %h: fail=%0d ok=%0d want fail=%0d", x, y, fail, ok, want_blk != 0);
    end
    if ({ncout, nsum} !== truth && !fail) begin
      failures++;
      $display("FAIL unsafe: near adder wrong but checker passed, %h + %h", x, y);
    end
    if ({ncout, nsum} !== truth) near_wrong++;
    if (fail) fails_seen++;
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real bound, rate;
    apply('0, '0);
    apply('1, '1);
    apply('1, '0);                    // everything propagates: FAIL
    apply(64'h0000_0000_0000_FF80, 64'h0000_0000_0000_0080); // real Near Adder miss
    apply(64'h0000_0000_0000_00FF, '0); // only block 0: not checked
    apply(64'hFF00_0000_0000_0000, '0); // only the top block: not checked
    for (int k = 1; k <= NB - 2; k++) begin
      apply(64'((1 << C) - 1) << (k * D), '0);            // sampled bits propagate
      apply(64'((1 << (C - 1)) - 1) << (k * D), '0);      // one sampled bit short
      apply(64'(((1 << C) - 1) ^ 1) << (k * D), 64'd0);   // lowest sampled bit missing
    end
    for (int i = 0; i < 20000; i++) begin
      apply({$urandom, $urandom}, {$urandom, $urandom});
      randoms++;
    end
    bound = real'(NB - 2) / real'(1 << C);
    rate  = real'(fails_seen) / real'(randoms + 5 + 3 * (NB - 2));
    $display("checker FAIL %0d times, near adder wrong %0d times, bound %f", fails_seen, near_wrong, bound);
    checks++;
    if (rate > bound + 0.01) begin
      failures++;
      $display("FAIL false alarm rate %f above bound %f", rate, bound);
    end
    checks++;
    if (near_wrong == 0) begin
      failures++;
      $display("FAIL no Near Adder error was exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
