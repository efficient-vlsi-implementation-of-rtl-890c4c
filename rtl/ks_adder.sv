// ks_adder: WIDTH-bit Kogge-Stone parallel-prefix adder with a WIDTH+1-bit signed sum.
//
// Each bit first forms generate g = a & b and propagate p = a ^ b. log2(WIDTH) prefix levels
// then combine (G, P) pairs at distances 1, 2, 4, ... so that after the last level G[i] is the
// carry out of bit i. Every level has the full WIDTH of black cells, which is what makes the
// Kogge-Stone tree the fastest prefix adder, at the cost of wiring. The sum bit i is
// p[i] ^ G[i-1] (no carry in).
//
// The operands are two's-complement numbers and the extra sum bit is the sign of the exact
// result, a[msb] ^ b[msb] ^ carry-out, so chaining an 8-bit and a 9-bit adder never
// overflows. The adder widths (8 and 9 bits, each with a result one bit wider) follow the
// design; signed extension of the extra bit is this implementation's choice, needed because
// the products it adds are signed.
//
// Interface: a, b are WIDTH-bit signed addends, s = a + b, WIDTH+1 bits.
// Timing: purely combinational, log2(WIDTH) prefix levels.
module ks_adder #(
  parameter int WIDTH = 8
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH:0]   s
);

  localparam int LEVELS = (WIDTH > 1) ? $clog2(WIDTH) : 1;

  // (G, P) after each prefix level; level 0 holds the bitwise generate and propagate.
  logic [LEVELS:0][WIDTH-1:0] gg, pp;

  assign gg[0] = a & b;
  assign pp[0] = a ^ b;

  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    for (genvar i = 0; i < WIDTH; i++) begin : g_bit
      if (i >= (1 << l)) begin : g_cell
        // black cell: merge this group with the one 2^l bits below
        assign gg[l+1][i] = gg[l][i] | (pp[l][i] & gg[l][i-(1<<l)]);
        assign pp[l+1][i] = pp[l][i] & pp[l][i-(1<<l)];
      end else begin : g_pass
        assign gg[l+1][i] = gg[l][i];
        assign pp[l+1][i] = pp[l][i];
      end
    end
  end

  // Carry into bit i is the group generate of bits i-1..0.
  logic [WIDTH-1:0] carry_in;
  assign carry_in = {gg[LEVELS][WIDTH-2:0], 1'b0};

  assign s[WIDTH-1:0] = pp[0] ^ carry_in;
  assign s[WIDTH]     = a[WIDTH-1] ^ b[WIDTH-1] ^ gg[LEVELS][WIDTH-1];

endmodule
