// csa_adder: multi-operand carry-save adder.
//
// Adds N unsigned operands of W bits and returns the sum modulo 2^W. It is the
// "Adder" box that collects the eight stage outputs of the Russian Peasant
// multiplier. The operands are reduced with a linear array of carry-save rows:
// each row is a W-bit row of full adders (3:2 counters) that takes the running
// sum vector, the running carry vector and one new operand, and produces a new
// sum vector and a carry vector shifted one place left. No carry travels along
// a row, so each row costs one full-adder delay. After the last operand one
// carry-propagate addition merges the sum and carry vectors.
//
// Interface: ops[N] in, sum out. Purely combinational, no clock.
//
// That the multiplier's adder is a carry-save adder follows the design; the
// linear (array) order of the rows and the plain carry-propagate adder at the
// end are this implementation's choice.
module csa_adder #(
  parameter int unsigned N = 8,   // number of operands, at least 1
  parameter int unsigned W = 16   // operand and result width
) (
  input  logic [W-1:0] ops [N],
  output logic [W-1:0] sum
);

  // Running sum and carry vectors after each carry-save row.
  logic [W-1:0] s_vec [N];
  logic [W-1:0] c_vec [N];

  always_comb begin
    s_vec[0] = ops[0];
    c_vec[0] = '0;
    for (int unsigned i = 1; i < N; i++) begin
      // One row of full adders: bitwise sum and majority carry.
      s_vec[i] = s_vec[i-1] ^ c_vec[i-1] ^ ops[i];
      c_vec[i] = ((s_vec[i-1] & c_vec[i-1]) |
                  (s_vec[i-1] & ops[i])     |
                  (c_vec[i-1] & ops[i])) << 1;
    end
  end

  // Final carry-propagate addition of the two redundant vectors.
  assign sum = s_vec[N-1] + c_vec[N-1];

endmodule
