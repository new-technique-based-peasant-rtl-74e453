// tb_csa_adder: self-checking test of the multi-operand carry-save adder.
//
// Drives random and corner-case operand sets into an 8 x 16-bit instance (the
// multiplier's size) and a 3 x 5-bit instance (to exercise wrap-around of the
// result and the carry shifted out of the top bit), and compares the result
// with a plain sum computed in the testbench, reduced modulo 2^W.
module tb_csa_adder;

  logic clk;
  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  int checks = 0;
  int failures = 0;

  logic [15:0] ops8 [8];
  logic [15:0] sum8;
  logic [4:0]  ops3 [3];
  logic [4:0]  sum3;

  csa_adder #(.N(8), .W(16)) dut8 (.ops(ops8), .sum(sum8));
  csa_adder #(.N(3), .W(5))  dut3 (.ops(ops3), .sum(sum3));

  function automatic logic [15:0] ref8();
    logic [31:0] s = 0;
    foreach (ops8[i]) s += 32'(ops8[i]);
    return s[15:0];
  endfunction

  function automatic logic [4:0] ref3();
    logic [31:0] s = 0;
    foreach (ops3[i]) s += 32'(ops3[i]);
    return s[4:0];
  endfunction

  task automatic check();
    @(posedge clk);
    checks += 2;
    if (sum8 !== ref8()) begin
      failures++;
      $display("FAIL N=8: got %h expected %h", sum8, ref8());
    end
    if (sum3 !== ref3()) begin
      failures++;
      $display("FAIL N=3: got %h expected %h", sum3, ref3());
    end
  endtask

  initial begin
    // Corners: all zero, all ones.
    foreach (ops8[i]) ops8[i] = '0;
    foreach (ops3[i]) ops3[i] = '0;
    check();
    foreach (ops8[i]) ops8[i] = '1;
    foreach (ops3[i]) ops3[i] = '1;
    check();
    // One operand at a time.
    for (int j = 0; j < 8; j++) begin
      foreach (ops8[i]) ops8[i] = (i == j) ? 16'hA5C3 : 16'h0;
      foreach (ops3[i]) ops3[i] = (i == j % 3) ? 5'h1B : 5'h0;
      check();
    end
    // Random.
    for (int n = 0; n < 5000; n++) begin
      foreach (ops8[i]) ops8[i] = 16'($urandom);
      foreach (ops3[i]) ops3[i] = 5'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
