// alu_tb: self-checking test of the ALU. Drives every operation with
// directed corner cases and random operands and compares the result and the
// zero flag with values computed here from SystemVerilog arithmetic.
module alu_tb;
  import mips_pkg::*;

  logic        clk = 0;
  alu_op_t     op;
  logic [31:0] a, b, y;
  logic        zero;
  int          checks = 0, failures = 0;

  alu dut (.op(op), .a(a), .b(b), .y(y), .zero(zero));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] model(alu_op_t o, logic [31:0] x, logic [31:0] z);
    case (o)
      ALU_ADD:   return x + z;
      ALU_SUB:   return x - z;
      ALU_SLT:   return ($signed(x) < $signed(z)) ? 32'd1 : 32'd0;
      ALU_AND:   return x & z;
      ALU_OR:    return x | z;
      ALU_PASSA: return x;
      ALU_PASSB: return z;
      default:   return 32'd0;
    endcase
  endfunction

  task automatic check(alu_op_t o, logic [31:0] x, logic [31:0] z);
    logic [31:0] exp;
    op = o; a = x; b = z;
    #1;
    exp = model(o, x, z);
    checks++;
    if (y !== exp || zero !== (exp == 0)) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h y=%h exp=%h zero=%b", o.name(), x, z, y, exp, zero);
    end
  endtask

  localparam logic [31:0] CORNER [6] = '{32'h0, 32'h1, 32'hffff_ffff,
                                          32'h7fff_ffff, 32'h8000_0000, 32'h0000_0005};

  initial begin
    alu_op_t o;
    for (int k = 0; k < 7; k++) begin
      o = alu_op_t'(k);
      foreach (CORNER[i]) foreach (CORNER[j]) check(o, CORNER[i], CORNER[j]);
      for (int n = 0; n < 300; n++) check(o, $urandom, $urandom);
    end
    // equality through SUB, as a branch uses it
    check(ALU_SUB, 32'd1234, 32'd1234);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
