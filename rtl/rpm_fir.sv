// rpm_fir: direct-form FIR filter built on Russian Peasant multipliers.
//
// Computes Y(n) = sum_{k=0}^{TAPS-1} C_k * X(n-k) on unsigned samples and
// coefficients. The structure is the textbook direct form: a delay line of
// TAPS-1 Z^-1 registers holds the past samples, tap k multiplies X(n-k) by its
// coefficient C_k in an rpm_multiplier (CW x DW bits, 2*DW-bit product), and a
// chain of adders, one per tap, adds the products from tap 0 to tap TAPS-1.
//
// Coefficients are inputs, so they can be changed at any time. tap_en[k] = 0
// cancels the multiplication of tap k: its multiplier sees a zero coefficient,
// so every stage multiplexer selects 0 and the tap adds nothing. This is where
// a run-time order-control unit would connect; with tap_en = '1 the filter is
// a plain TAPS-tap FIR.
//
// Timing: when x_valid is high at a rising clock edge, x_in is taken as X(n),
// the delay line shifts, and y_out is loaded with Y(n), formed from x_in and
// the delay line contents before the shift. y_valid is high for the following
// cycle. So an output appears one clock after its sample: latency 1, one
// sample per clock at most. rst_n is synchronous and active low; it clears the
// delay line, y_out and y_valid.
//
// The direct-form structure, 8-bit coefficients and 16-bit products follow the
// design. The number of taps, the unsigned number format, the output register,
// the x_valid/y_valid handshake, the reset and the tap_en port are this
// implementation's choices.
module rpm_fir #(
  parameter int unsigned TAPS = 8,   // filter length n (coefficients C0..Cn-1)
  parameter int unsigned DW   = 8,   // sample width
  parameter int unsigned CW   = 8,   // coefficient width
  parameter int unsigned YW   = CW + DW + $clog2(TAPS)  // output width, no overflow
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            x_valid,
  input  logic [DW-1:0]   x_in,
  input  logic [CW-1:0]   coeff  [TAPS],
  input  logic [TAPS-1:0] tap_en,
  output logic            y_valid,
  output logic [YW-1:0]   y_out
);

  localparam int unsigned MW = (CW > DW) ? CW : DW;  // multiplier width

  logic [DW-1:0]   tap_x  [TAPS];  // X(n-k) seen by tap k
  logic [MW-1:0]   mul_a  [TAPS];  // coefficient after the tap enable
  logic [2*MW-1:0] prod   [TAPS];  // tap products
  logic [YW-1:0]   acc    [TAPS];  // adder chain

  // Delay line: tap_x[0] is the incoming sample, tap_x[k] a Z^-1 register.
  assign tap_x[0] = x_in;
  for (genvar k = 1; k < TAPS; k++) begin : g_delay
    always_ff @(posedge clk) begin
      if (!rst_n)       tap_x[k] <= '0;
      else if (x_valid) tap_x[k] <= tap_x[k-1];
    end
  end

  // One Russian Peasant multiplier per tap.
  for (genvar k = 0; k < TAPS; k++) begin : g_tap
    assign mul_a[k] = tap_en[k] ? MW'(coeff[k]) : '0;
    rpm_multiplier #(.W(MW)) u_mul (
      .a (mul_a[k]),
      .b (MW'(tap_x[k])),
      .p (prod[k])
    );
  end

  // Adder chain along the taps.
  always_comb begin
    acc[0] = YW'(prod[0]);
    for (int unsigned k = 1; k < TAPS; k++)
      acc[k] = acc[k-1] + YW'(prod[k]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      y_valid <= 1'b0;
      y_out   <= '0;
    end else begin
      y_valid <= x_valid;
      if (x_valid) y_out <= acc[TAPS-1];
    end
  end

  // Handshake rule: one output per accepted sample, exactly one clock later.
  a_latency : assert property (@(posedge clk) disable iff (!rst_n)
                               $past(rst_n) |-> (y_valid == $past(x_valid)));

endmodule
