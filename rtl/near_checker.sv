// near_checker -- decides quickly whether the Near Adder may have erred.
//
// The Near Adder can only be wrong when the discarded lower block of some
// window (blocks 1 .. NB-2, NB = N/D) would pass a carry through all of its
// D bits. Checking all D bits would be as slow as adding, so the Checker
// samples C bit pairs of each such block: an XOR per pair gives the
// propagate signal, an AND over the C propagates of a block says the sample
// would propagate, and a NOR over all blocks gives ok. FAIL (= not ok) is
// raised whenever any block's sample propagates. It does not ask whether a
// carry actually arrives at the block; it assumes one does. The check is
// therefore safe (a real Near Adder error always raises FAIL) and raises a
// false alarm with probability at most (NB-2) * 2**-C.
// Depth: 1 XOR level + log2(C) AND levels + log2(NB-2) NOR levels.
//
// The XOR / AND / NOR structure and the choice of blocks follow the method.
// Which C bits of a block are sampled is not fixed by it; this design samples
// the C least significant bits of each block (bits k*D .. k*D+C-1).
// The lowest block and the top block are not checked, since the Near Adder
// never discards them.
//
// Interface: a, b (N bits) -> ok (NOR output), fail (= ~ok), blk_prop (the
// per-block AND outputs, bit k-1 for block k). Timing: purely combinational.
module near_checker #(
  parameter int unsigned N = fast_adder_pkg::N_DEFAULT,
  parameter int unsigned D = fast_adder_pkg::D_DEFAULT,
  parameter int unsigned C = fast_adder_pkg::C_DEFAULT
) (
  input  logic [N-1:0]                 a,
  input  logic [N-1:0]                 b,
  output logic                         ok,
  output logic                         fail,
  output logic [((N/D > 2) ? N/D-2 : 1)-1:0] blk_prop
);

  localparam int unsigned NB = N / D;
  localparam int unsigned NCHK = (NB > 2) ? NB - 2 : 0;  // blocks checked

  if (D == 0 || N % D != 0 || NB < 2 || C == 0 || C > D) begin : g_bad_size
    $error("near_checker: need N a multiple of D, N/D >= 2 and 1 <= C <= D");
  end

  if (NCHK == 0) begin : g_none
    assign blk_prop = '0;
  end else begin : g_blocks
    for (genvar k = 1; k <= NCHK; k++) begin : g_blk
      // C X gates (propagate of each sampled pair), then their AND.
      assign blk_prop[k-1] = &(a[k*D +: C] ^ b[k*D +: C]);
    end
  end

  assign ok   = ~|blk_prop;  // the NOR gate
  assign fail = ~ok;

endmodule
