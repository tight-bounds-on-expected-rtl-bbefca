// fast_adder -- always-correct adder with short expected delay (top level).
//
// Two subcircuits run side by side on the operands: the Near Adder, which
// adds in the delay of a 2D-bit adder but may be wrong, and the Checker,
// which in about log2(C) + log2(N/D) gate levels says whether the Near
// Adder's result can be trusted. When the Checker passes, the result is the
// Near Adder's sum. When it fails, the sum is taken from a full-width
// conventional adder, the slow path. With D = sqrt(N) and C = log2(N) both
// fast subcircuits take about (1/2)log2(N) levels, and the slow path is
// needed with probability at most (N/D-2)/2**C, so the expected delay is
// about half that of any worst-case adder while every result is exact.
//
// In this RTL the fallback adder is always present and evaluated; the
// output slow tells the surrounding logic that the result came from it, so a
// clocked user can allow the fallback a longer (multicycle) path while
// taking fast results at once. The slow flag and the selection of the
// carry out are this design's choices; the split into Near Adder, Checker
// and fallback follows the method.
//
// Interface: a, b (N bits) -> sum (N bits), cout, slow.
// Timing: purely combinational.
module fast_adder #(
  parameter int unsigned N = fast_adder_pkg::N_DEFAULT,
  parameter int unsigned D = fast_adder_pkg::isqrt(N),
  parameter int unsigned C = fast_adder_pkg::clog2(N)
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] sum,
  output logic         cout,
  output logic         slow
);

  logic [N-1:0] near_sum, conv_sum;
  logic         near_cout, conv_cout;
  logic         chk_ok, chk_fail;

  near_adder #(.N(N), .D(D)) u_near (
    .a   (a),
    .b   (b),
    .sum (near_sum),
    .cout(near_cout)
  );

  near_checker #(.N(N), .D(D), .C(C)) u_chk (
    .a       (a),
    .b       (b),
    .ok      (chk_ok),
    .fail    (chk_fail),
    .blk_prop()
  );

  conv_adder #(.W(N)) u_conv (
    .a   (a),
    .b   (b),
    .sum (conv_sum),
    .cout(conv_cout)
  );

  always_comb begin
    if (chk_ok) begin
      sum  = near_sum;
      cout = near_cout;
    end else begin
      sum  = conv_sum;
      cout = conv_cout;
    end
  end

  assign slow = chk_fail;

endmodule
