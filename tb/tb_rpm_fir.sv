// tb_rpm_fir: end-to-end self-checking test of the FIR filter at its default
// size (8 taps, 8-bit samples and coefficients).
//
// A reference model in the testbench keeps its own copy of the sample history
// and forms Y(n) = sum tap_en[k] * C_k * X(n-k) with '*'. Every cycle the
// filter's y_valid must equal the x_valid of the cycle before (latency one
// clock) and, when high, y_out must equal the model's value.
//
// The run passes through each mechanism of the filter and counts how often it
// happened; a mechanism that never happened counts as a failure:
//   * impulse   - a single 1 followed by zeros: the output must replay the
//                 coefficients C0..C7 in order (checks the delay-line order);
//   * full      - all-ones samples and coefficients: largest possible output;
//   * idle      - cycles with x_valid low: the delay line must hold;
//   * reorder   - a tap_en pattern with some taps off (cancelled products);
//   * recoeff   - coefficients changed while samples stream;
//   * reset     - a reset in mid-stream clears the history.
module tb_rpm_fir;

  localparam int TAPS = 8;

  logic clk;
  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  int checks = 0;
  int failures = 0;
  int n_impulse = 0, n_full = 0, n_idle = 0, n_reorder = 0, n_recoeff = 0, n_reset = 0;

  logic            rst_n;
  logic            x_valid;
  logic [7:0]      x_in;
  logic [7:0]      coeff [TAPS];
  logic [TAPS-1:0] tap_en;
  logic            y_valid;
  logic [18:0]     y_out;

  rpm_fir dut (
    .clk, .rst_n, .x_valid, .x_in, .coeff, .tap_en, .y_valid, .y_out
  );

  // Reference model state.
  logic [7:0]  hist [TAPS];   // hist[k] = X(n-k-1)
  logic        exp_valid;
  logic [31:0] exp_y;

  function automatic logic [31:0] model_y();
    logic [31:0] s = 0;
    for (int k = 0; k < TAPS; k++) begin
      logic [7:0] xk = (k == 0) ? x_in : hist[k-1];
      if (tap_en[k]) s += 32'(coeff[k]) * 32'(xk);
    end
    return s;
  endfunction

  // One clock: inputs have been set before the rising edge; the model
  // computes what the edge must load, then the outputs are checked.
  task automatic step();
    logic        nv;
    logic [31:0] ny;
    nv = x_valid && rst_n;
    ny = model_y();
    @(posedge clk);
    #1;
    if (!rst_n) begin
      foreach (hist[k]) hist[k] = '0;
      exp_valid = 1'b0;
    end else begin
      if (x_valid) begin
        for (int k = TAPS - 1; k > 0; k--) hist[k] = hist[k-1];
        hist[0] = x_in;
      end
      exp_valid = nv;
      if (nv) exp_y = ny;
    end
    checks++;
    if (y_valid !== exp_valid) begin
      failures++;
      $display("FAIL t=%0t y_valid=%b expected %b", $time, y_valid, exp_valid);
    end
    if (exp_valid) begin
      checks++;
      if (32'(y_out) !== exp_y) begin
        failures++;
        $display("FAIL t=%0t y_out=%0d expected %0d", $time, y_out, exp_y);
      end
    end
    @(negedge clk);
  endtask

  task automatic sample(input logic [7:0] x);
    x_valid = 1'b1;
    x_in    = x;
    step();
  endtask

  task automatic idle();
    x_valid = 1'b0;
    x_in    = 8'($urandom);
    n_idle++;
    step();
  endtask

  task automatic random_coeffs();
    foreach (coeff[k]) coeff[k] = 8'($urandom);
  endtask

  initial begin
    rst_n = 1'b0; x_valid = 1'b0; x_in = '0; tap_en = '1;
    foreach (hist[k]) hist[k] = '0;
    exp_valid = 1'b0; exp_y = '0;
    foreach (coeff[k]) coeff[k] = 8'(k * 17 + 3);
    @(negedge clk);
    step();
    rst_n = 1'b1;

    // Impulse response: the output replays C0..C7.
    sample(8'd1);
    for (int k = 1; k < TAPS + 2; k++) sample(8'd0);
    n_impulse++;

    // Largest values.
    foreach (coeff[k]) coeff[k] = 8'hFF;
    for (int k = 0; k < TAPS + 2; k++) sample(8'hFF);
    n_full++;

    // Random streaming with gaps, order changes and coefficient changes.
    random_coeffs();
    for (int n = 0; n < 3000; n++) begin
      int r;
      r = int'($urandom_range(99));
      if (r < 15) idle();
      else sample(8'($urandom));
      if (n % 97 == 50) begin
        tap_en = TAPS'($urandom);
        if (tap_en != '1) n_reorder++;
      end
      if (n % 131 == 70) begin
        random_coeffs();
        n_recoeff++;
      end
      if (n == 1500) begin
        rst_n = 1'b0;
        x_valid = 1'b1;
        step();
        rst_n = 1'b1;
        n_reset++;
        // After reset only the new sample contributes.
        tap_en = '1;
      end
    end

    $display("mechanisms: impulse=%0d full=%0d idle=%0d reorder=%0d recoeff=%0d reset=%0d",
             n_impulse, n_full, n_idle, n_reorder, n_recoeff, n_reset);
    if (n_impulse == 0) failures++;
    if (n_full    == 0) failures++;
    if (n_idle    == 0) failures++;
    if (n_reorder == 0) failures++;
    if (n_recoeff == 0) failures++;
    if (n_reset   == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
