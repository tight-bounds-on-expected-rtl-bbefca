// tb_conv_adder -- self-checking test of the log-depth conventional adder.
//
// Two instances, 16 and 64 bits wide, are driven with corner cases (all
// zeros, all ones, a carry rippling across the whole word) and random
// operands. Each result is compared with the simulator's own integer
// addition. The adder is combinational; a 1 ns step settles it.
module tb_conv_adder;
  logic [15:0] a16, b16, s16;
  logic        c16;
  logic [63:0] a64, b64, s64;
  logic        c64;
  int checks = 0, failures = 0;

  conv_adder #(.W(16)) dut16 (.a(a16), .b(b16), .sum(s16), .cout(c16));
  conv_adder           dut64 (.a(a64), .b(b64), .sum(s64), .cout(c64));

  task automatic apply(input logic [63:0] x, input logic [63:0] y);
    logic [64:0] ref64;
    logic [16:0] ref16;
    a64 = x; b64 = y; a16 = x[15:0]; b16 = y[15:0];
    #1;
    ref64 = {1'b0, x} + {1'b0, y};
    ref16 = {1'b0, x[15:0]} + {1'b0, y[15:0]};
    checks += 2;
    if ({c64, s64} !== ref64) begin
      failures++;
      $display("FAIL W=64 %h + %h: got %b_%h want %h", x, y, c64, s64, ref64);
    end
    if ({c16, s16} !== ref16) begin
      failures++;
      $display("FAIL W=16 %h + %h: got %b_%h want %h", x[15:0], y[15:0], c16, s16, ref16);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply('0, '0);
    apply('1, '1);
    apply('1, 64'd1);
    apply(64'h7FFF_FFFF_FFFF_FFFF, 64'd1);
    apply(64'h5555_5555_5555_5555, 64'hAAAA_AAAA_AAAA_AAAA);
    apply(64'h5555_5555_5555_5555, 64'hAAAA_AAAA_AAAA_AAAB);
    for (int i = 0; i < 64; i++) apply(64'd1 << i, '1);
    for (int i = 0; i < 5000; i++) apply({$urandom, $urandom}, {$urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
