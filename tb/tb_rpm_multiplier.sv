// tb_rpm_multiplier: self-checking test of the Russian Peasant multiplier.
//
// The 8-bit instance (the default size) is checked exhaustively: all 65536
// operand pairs. A 16-bit instance (the 16-bit extension) is checked on its
// corner values and on random pairs. Expected products are formed with the
// testbench's own '*' on 32-bit values. One pair is applied per clock.
module tb_rpm_multiplier;

  logic clk;
  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  int checks = 0;
  int failures = 0;

  logic [7:0]  a8, b8;
  logic [15:0] p8;
  logic [15:0] a16, b16;
  logic [31:0] p16;

  rpm_multiplier              dut8  (.a(a8),  .b(b8),  .p(p8));
  rpm_multiplier #(.W(16))    dut16 (.a(a16), .b(b16), .p(p16));

  task automatic check();
    logic [31:0] e8, e16;
    @(posedge clk);
    e8  = 32'(a8) * 32'(b8);
    e16 = 32'(a16) * 32'(b16);
    checks += 2;
    if (p8 !== e8[15:0]) begin
      failures++;
      if (failures < 10) $display("FAIL W=8: %0d * %0d = %0d, expected %0d", a8, b8, p8, e8);
    end
    if (p16 !== e16) begin
      failures++;
      if (failures < 10) $display("FAIL W=16: %0d * %0d = %0d, expected %0d", a16, b16, p16, e16);
    end
  endtask

  localparam logic [15:0] CORNERS [6] = '{16'h0000, 16'h0001, 16'h8000, 16'hFFFF, 16'h5555, 16'hAAAA};

  initial begin
    a16 = '0; b16 = '0;
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a8 = 8'(i);
        b8 = 8'(j);
        if (j < 6 && i < 6) begin
          a16 = CORNERS[i];
          b16 = CORNERS[j];
        end else begin
          a16 = 16'($urandom);
          b16 = 16'($urandom);
        end
        check();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (70000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
