// sign_extend_tb: checks the immediate sign extension exhaustively over all
// 65536 16-bit inputs against $signed widening.
module sign_extend_tb;
  logic        clk = 0;
  logic [15:0] imm16;
  logic [31:0] imm32;
  int          checks = 0, failures = 0;

  sign_extend dut (.imm16(imm16), .imm32(imm32));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [31:0] exp;
    for (int v = 0; v < 65536; v++) begin
      imm16 = 16'(v);
      #1;
      exp = 32'($signed(imm16));
      checks++;
      if (imm32 !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL imm16=%h imm32=%h exp=%h", imm16, imm32, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
