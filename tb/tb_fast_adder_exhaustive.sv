// tb_fast_adder_exhaustive -- every operand pair through two small Fast Adders.
//
// The Fast Adder's promise is that every result is exact, whichever path
// produced it. At full width that can only be sampled; here two small
// configurations are run over all their operand pairs:
//   N=8, D=2, C=2  (4 blocks, 2 checked)   65,536 pairs
//   N=9, D=3, C=2  (3 blocks, 1 checked)  262,144 pairs
// Each sum and carry is compared with integer addition, the slow flag with
// the checker rule (the C lowest bit pairs of some block 1..N/D-2 all
// differ), and the number of slow results with the count that rule gives in
// closed form: with K checked blocks, 2**(2N) * (1 - (1 - 2**-C)**K).
module tb_fast_adder_exhaustive;
  logic [7:0] a8, b8, s8;
  logic       c8, slow8;
  logic [8:0] a9, b9, s9;
  logic       c9, slow9;
  int checks = 0, failures = 0;
  longint slow_cnt8 = 0, slow_cnt9 = 0;

  fast_adder #(.N(8), .D(2), .C(2)) dut8 (.a(a8), .b(b8), .sum(s8), .cout(c8), .slow(slow8));
  fast_adder #(.N(9), .D(3), .C(2)) dut9 (.a(a9), .b(b9), .sum(s9), .cout(c9), .slow(slow9));

  initial begin : watchdog
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 256; x++) begin
      for (int y = 0; y < 256; y++) begin
        logic [7:0] pr;
        bit want;
        a8 = 8'(x); b8 = 8'(y);
        #1;
        pr = a8 ^ b8;
        want = (pr[3:2] == 2'b11) || (pr[5:4] == 2'b11);
        checks += 2;
        if ({c8, s8} !== 9'(x + y)) begin
          failures++;
          $display("FAIL N=8 %0d + %0d: got %0d", x, y, {c8, s8});
        end
        if (slow8 !== want) begin
          failures++;
          $display("FAIL N=8 slow flag %0d + %0d", x, y);
        end
        if (slow8) slow_cnt8++;
      end
    end
    for (int x = 0; x < 512; x++) begin
      for (int y = 0; y < 512; y++) begin
        logic [8:0] pr;
        bit want;
        a9 = 9'(x); b9 = 9'(y);
        #1;
        pr = a9 ^ b9;
        want = (pr[4:3] == 2'b11);
        checks += 2;
        if ({c9, s9} !== 10'(x + y)) begin
          failures++;
          $display("FAIL N=9 %0d + %0d: got %0d", x, y, {c9, s9});
        end
        if (slow9 !== want) begin
          failures++;
          $display("FAIL N=9 slow flag %0d + %0d", x, y);
        end
        if (slow9) slow_cnt9++;
      end
    end
    // 65536 * (1 - (3/4)**2) = 28672;  262144 * (1 - 3/4) = 65536.
    $display("slow results: N=8 %0d of 65536, N=9 %0d of 262144", slow_cnt8, slow_cnt9);
    checks += 2;
    if (slow_cnt8 != 28672) begin failures++; $display("FAIL N=8 slow count"); end
    if (slow_cnt9 != 65536) begin failures++; $display("FAIL N=9 slow count"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
