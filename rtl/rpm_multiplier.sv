// rpm_multiplier: unsigned W x W multiplier by Russian Peasant multiplication.
//
// Russian Peasant multiplication halves one number and doubles the other at
// every step, and adds up the doubled values of the steps where the halved
// number is odd. In hardware this becomes W stages:
//   * a chain of right shifters R1..R(W-1) on the multiplicand a; the LSB of
//     stage i (a[i] after i shifts) says whether that step is "odd";
//   * a chain of left shifters L1..L(W-1) on the multiplier b; stage i holds
//     b << i, W+i bits wide;
//   * one 2:1 multiplexer per stage that passes either 0 or b << i, with the
//     stage's LSB as select;
//   * a carry-save adder (csa_adder) that adds the W multiplexer outputs into
//     the 2W-bit product.
// With W = 8 this is eight stages, shifted operands of 8 to 15 bits, and a
// product p[15:0]. Setting W = 16 gives the 16-bit extension.
//
// Interface: a, b in; p = a * b out. Purely combinational, no clock.
//
// The stage structure, widths and the carry-save adder follow the design; the
// shifters are plain wiring here, as fixed shifts cost no logic.
module rpm_multiplier #(
  parameter int unsigned W = 8    // operand width
) (
  input  logic [W-1:0]   a,       // multiplicand: shifted right, selects stages
  input  logic [W-1:0]   b,       // multiplier: shifted left, stage values
  output logic [2*W-1:0] p        // product
);

  logic [W-1:0]   r_sh [W];       // right-shifter chain, r_sh[0] = a
  logic [2*W-1:0] l_sh [W];       // left-shifter chain, l_sh[0] = b
  logic [2*W-1:0] pp   [W];       // multiplexer outputs (partial products)

  always_comb begin
    r_sh[0] = a;
    l_sh[0] = {{W{1'b0}}, b};
    for (int unsigned i = 1; i < W; i++) begin
      r_sh[i] = r_sh[i-1] >> 1;
      l_sh[i] = l_sh[i-1] << 1;
    end
    for (int unsigned i = 0; i < W; i++) begin
      // 2:1 multiplexer: LSB of the right shifter selects 0 or b << i.
      pp[i] = r_sh[i][0] ? l_sh[i] : '0;
    end
  end

  csa_adder #(.N(W), .W(2*W)) u_adder (
    .ops (pp),
    .sum (p)
  );

endmodule
