// conv_adder -- conventional worst-case adder of logarithmic depth.
//
// The fast adder relies on a "conventional" adder whose delay grows as log W
// for every input. It is used twice: once per 2D-bit window inside the Near
// Adder, and once at full width as the slow-but-sure fallback when the
// Checker cannot vouch for the Near Adder's result. The method only needs
// some worst-case log-depth adder; this design uses a Kogge-Stone parallel
// prefix network: one level of generate/propagate, ceil(log2 W) levels of
// prefix (g, p) combination, one XOR level for the sum. Carry-in is 0, as the
// Near Adder assumes for each window.
//
// Interface: a, b (W bits) -> sum (W bits), cout (carry out of bit W-1).
// Timing: purely combinational, no clock.
module conv_adder #(
  parameter int unsigned W = 64
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] sum,
  output logic         cout
);

  localparam int unsigned LEVELS = (W <= 1) ? 0 : $clog2(W);

  // g[l][i], p[l][i]: generate / propagate of the bit span ending at bit i
  // after l prefix levels (span length 2**l, clipped at bit 0).
  logic [W-1:0] g [LEVELS+1];
  logic [W-1:0] p [LEVELS+1];

  assign g[0] = a & b;
  assign p[0] = a ^ b;

  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    localparam int unsigned DIST = 1 << l;
    for (genvar i = 0; i < W; i++) begin : g_bit
      if (i >= DIST) begin : g_comb
        assign g[l+1][i] = g[l][i] | (p[l][i] & g[l][i-DIST]);
        assign p[l+1][i] = p[l][i] & p[l][i-DIST];
      end else begin : g_pass
        assign g[l+1][i] = g[l][i];
        assign p[l+1][i] = p[l][i];
      end
    end
  end

  // Carry into bit i is the group generate of bits i-1..0.
  logic [W-1:0] carry;
  if (W > 1) begin : g_carry
    assign carry = {g[LEVELS][W-2:0], 1'b0};
  end else begin : g_carry1
    assign carry = '0;
  end

  assign sum  = p[0] ^ carry;
  assign cout = g[LEVELS][W-1];

endmodule
