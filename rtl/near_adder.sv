// near_adder -- fast adder that is correct on all but a small fraction of inputs.
//
// Most carries in a random addition die out within a few bit positions, so an
// output bit rarely depends on inputs far below it. The Near Adder exploits
// this: it cuts both N-bit operands into NB = N/D blocks of D bits and adds
// each pair of neighbouring blocks, a 2D-bit window, with its own
// conventional adder and a carry-in of 0. Window w covers blocks w and w+1.
// Window 0 is exact (its carry-in really is 0), so all of its 2D sum bits are
// kept; every higher window keeps only its upper D bits and discards the
// lower D bits, which served only to let a carry from below settle. The
// delay is that of one 2D-bit adder instead of an N-bit one.
//
// The result is wrong only when a window should have received a carry-in of
// 1 and its discarded lower block propagates it (all D bit pairs differ):
// probability at most (NB-2) * 1/2 * 2**-D for uniform random operands.
// near_checker detects those cases conservatively.
//
// Window layout and the kept/discarded halves follow the method; exposing the
// top window's carry out as cout is this design's choice (it is exactly as
// reliable as the top sum bits).
//
// Interface: a, b (N bits) -> sum (N bits), cout. N must be a multiple of D
// with N/D >= 2. Timing: purely combinational.
module near_adder #(
  parameter int unsigned N = fast_adder_pkg::N_DEFAULT,
  parameter int unsigned D = fast_adder_pkg::D_DEFAULT
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] sum,
  output logic         cout
);

  localparam int unsigned NB = N / D;   // number of D-bit blocks
  localparam int unsigned NW = NB - 1;  // number of 2D-bit windows

  if (D == 0 || N % D != 0 || NB < 2) begin : g_bad_size
    $error("near_adder: N must be a multiple of D with N/D >= 2");
  end

  logic [2*D-1:0] wsum  [NW];
  logic [NW-1:0]  wcout;

  for (genvar w = 0; w < NW; w++) begin : g_win
    conv_adder #(.W(2 * D)) u_add (
      .a   (a[w*D +: 2*D]),
      .b   (b[w*D +: 2*D]),
      .sum (wsum[w]),
      .cout(wcout[w])
    );
    if (w == 0) begin : g_keep_all
      assign sum[0 +: 2*D] = wsum[w];
    end else begin : g_keep_upper
      assign sum[(w+1)*D +: D] = wsum[w][2*D-1:D];
    end
  end

  assign cout = wcout[NW-1];

endmodule
