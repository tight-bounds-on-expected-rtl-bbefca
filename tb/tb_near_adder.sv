// tb_near_adder -- self-checking test of the Near Adder (N=64, D=8 and N=32, D=4).
//
// Reference: for each operand pair the expected Near Adder output is built
// window by window with plain integer arithmetic (window w adds bits
// w*D .. w*D+2D-1 with carry-in 0; window 0 keeps all 2D bits, the others
// their upper D bits). The test also checks the property the method rests
// on: the output equals the true sum unless some discarded block both
// receives a carry and propagates it. Directed cases force such an error and
// the random run counts how often it occurs against the bound
// (N/D-2)/2**(D+1).
module tb_near_adder;
  localparam int unsigned N = 64, D = 8, NB = N / D;
  localparam int unsigned N2 = 32, D2 = 4;

  logic [N-1:0]  a, b, s;
  logic          co;
  logic [N2-1:0] a2, b2, s2;
  logic          co2;
  int checks = 0, failures = 0, near_errors = 0, randoms = 0;

  near_adder            dut  (.a(a),  .b(b),  .sum(s),  .cout(co));
  near_adder #(.N(N2), .D(D2)) dut2 (.a(a2), .b(b2), .sum(s2), .cout(co2));

  function automatic logic [N:0] model(input logic [N-1:0] x, input logic [N-1:0] y,
                                       input int unsigned n, input int unsigned d);
    logic [N:0] r;
    logic [2*D:0] ws;  // wide enough for both sizes (2*d+1 <= 2*D+1)
    r = '0;
    for (int unsigned w = 0; w + 1 < n / d; w++) begin
      logic [2*D-1:0] xa, ya;
      xa = '0; ya = '0;
      for (int unsigned i = 0; i < 2 * d; i++) begin
        xa[i] = x[w*d+i];
        ya[i] = y[w*d+i];
      end
      ws = {1'b0, xa} + {1'b0, ya};
      for (int unsigned i = (w == 0) ? 0 : d; i < 2 * d; i++) r[w*d+i] = ws[i];
      if (w + 2 == n / d) r[n] = ws[2*d];
    end
    return r;
  endfunction

  // True when some discarded block k (1..NB-2) gets a carry and passes it on.
  function automatic bit real_error(input logic [N-1:0] x, input logic [N-1:0] y);
    logic [N:0] carries;
    bit e;
    carries[0] = 1'b0;
    for (int i = 0; i < N; i++)
      carries[i+1] = (x[i] & y[i]) | ((x[i] ^ y[i]) & carries[i]);
    e = 0;
    for (int k = 1; k <= NB - 2; k++)
      if (carries[k*D] && (&(x[k*D +: D] ^ y[k*D +: D]))) e = 1;
    return e;
  endfunction

  task automatic apply(input logic [N-1:0] x, input logic [N-1:0] y);
    logic [N:0] want, truth;
    logic [N2:0] want2;
    logic [N:0]  m2;
    bit err;
    a = x; b = y; a2 = x[N2-1:0]; b2 = y[N2-1:0];
    #1;
    want  = model(x, y, N, D);
    m2    = model({32'd0, x[N2-1:0]}, {32'd0, y[N2-1:0]}, N2, D2);
    want2 = m2[N2:0];
    truth = {1'b0, x} + {1'b0, y};
    err   = real_error(x, y);
    checks += 3;
    if ({co, s} !== want) begin
      failures++;
      $display("FAIL N=64 %h + %h: got %b_%h want %h", x, y, co, s, want);
    end
    if ({co2, s2} !== want2) begin
      failures++;
      $display("FAIL N=32 %h + %h: got %b_%h want %h", x[N2-1:0], y[N2-1:0], co2, s2, want2);
    end
    if ((({co, s} !== truth)) !== err) begin
      failures++;
      $display("FAIL error property %h + %h: wrong=%0d predicted=%0d", x, y, {co, s} !== truth, err);
    end
    if (err) near_errors++;
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real rate, bound;
    apply('0, '0);
    apply('1, '1);
    apply(64'h0123_4567_89AB_CDEF, 64'h1111_1111_1111_1111);
    // Carry generated in block 0's top bit, block 1 all propagates: window 1
    // (blocks 1,2) misses the carry, so the result must be wrong.
    apply(64'h0000_0000_0000_FF80, 64'h0000_0000_0000_0080);
    checks++;
    if (s === 64'h0000_0000_0000_FF80 + 64'h0000_0000_0000_0080) begin
      failures++;
      $display("FAIL forced miss: near adder unexpectedly exact");
    end
    // Same propagate block but no carry into it: result must be exact.
    apply(64'h0000_0000_0000_FF00, 64'h0000_0000_0000_0000);
    for (int i = 0; i < 20000; i++) begin
      apply({$urandom, $urandom}, {$urandom, $urandom});
      randoms++;
    end
    rate  = real'(near_errors) / real'(randoms + 5);
    bound = real'(NB - 2) / 2.0 / real'(1 << D);
    $display("near adder errors: %0d of %0d (bound %f)", near_errors, randoms + 5, bound);
    checks++;
    if (rate > bound + 0.01) begin
      failures++;
      $display("FAIL error rate %f above bound %f", rate, bound);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
