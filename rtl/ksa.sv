// ksa: WIDTH-bit Kogge-Stone parallel prefix adder.
//
// Three stages, as in the design:
//   pre-processing   p = a xor b, g = a and b for every bit;
//   carry network    log2(WIDTH) levels; level k combines every bit i with bit
//                    i - 2^k:  cp[i] = p[i] and p[i-2^k],
//                              cg[i] = g[i] or (g[i-2^k] and p[i]);
//                    a bit with no partner at that distance is passed on
//                    unchanged, as bits 0..2^k-1 are in the drawn 16-bit network;
//   post-processing  sum[i] = p[i] xor cg[i-1], sum[0] = p[0].
// After the last level cg[i] is the carry out of bits i..0, so the carry
// delay grows with log2(WIDTH) rather than WIDTH.
// Ports: a, b (WIDTH bits) -> sum (WIDTH bits), cout. Combinational.
// The adder has no carry input, as in the drawn 16-bit network (bit 0 has
// none); cout = cg[WIDTH-1] is this design's reading of "sum and cout is
// calculated". The default width 16 is the network drawn; any width >= 2
// works, the multipliers use 4, 6, 8, 12, 16 and 24.
module ksa #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  localparam int unsigned LEVELS = $clog2(WIDTH);

  // gp[k] / pp[k]: group generate / propagate entering prefix level k;
  // level LEVELS holds the final group terms over bits i..0.
  logic [WIDTH-1:0] gp [LEVELS+1];
  logic [WIDTH-1:0] pp [LEVELS+1];

  // pre-processing
  assign pp[0] = a ^ b;
  assign gp[0] = a & b;

  // carry look-ahead network
  for (genvar k = 0; k < LEVELS; k++) begin : g_level
    localparam int unsigned D = 1 << k;  // distance spanned at this level
    for (genvar i = 0; i < WIDTH; i++) begin : g_bit
      if (i >= D) begin : g_cell
        assign gp[k+1][i] = gp[k][i] | (gp[k][i-D] & pp[k][i]);
        assign pp[k+1][i] = pp[k][i] & pp[k][i-D];
      end else begin : g_buf
        assign gp[k+1][i] = gp[k][i];
        assign pp[k+1][i] = pp[k][i];
      end
    end
  end

  // post-processing
  assign sum  = pp[0] ^ {gp[LEVELS][WIDTH-2:0], 1'b0};
  assign cout = gp[LEVELS][WIDTH-1];

endmodule
