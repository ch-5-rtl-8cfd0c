// control_tb: checks the decoder's outputs for each implemented instruction
// against an expected-signal table written out here, then checks that random
// undefined opcode/function combinations write nothing and fall through to
// the next sequential instruction.
module control_tb;
  import mips_pkg::*;

  logic       clk = 0;
  logic [5:0] op, funct;
  ctrl_t      ctrl;
  int         checks = 0, failures = 0;

  control dut (.op(op), .funct(funct), .ctrl(ctrl));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // exp: alu, imm, dst, wb, regw, memw, byte, pcsel, ne ; care masks which
  // fields matter (an instruction that writes no register ignores dst/wb, etc.)
  task automatic check(string nm, logic [5:0] o, logic [5:0] f,
                       alu_op_t alu, logic imm, dst_sel_t dst, wb_sel_t wb,
                       logic rw, logic mw, logic by, pc_sel_t ps, logic ne,
                       logic care_alu, logic care_dst, logic care_by);
    logic ok;
    op = o; funct = f;
    #1;
    ok = 1;
    if (ctrl.reg_write !== rw || ctrl.mem_write !== mw || ctrl.pc_sel !== ps) ok = 0;
    if (care_alu && (ctrl.alu_op !== alu || ctrl.alu_src_imm !== imm)) ok = 0;
    if (rw && ctrl.wb_sel !== wb) ok = 0;
    if (care_dst && ctrl.dst_sel !== dst) ok = 0;
    if (care_by && ctrl.mem_byte !== by) ok = 0;
    if (ps == PC_BRANCH && ctrl.br_ne !== ne) ok = 0;
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s op=%h fn=%h ctrl=%p", nm, o, f, ctrl);
    end
  endtask

  initial begin
    for (int rep = 0; rep < 4; rep++) begin
      logic [5:0] rf;
      rf = 6'($urandom);  // function field is don't-care for non-R instructions
      //     name    op     fn    alu        imm  dst      wb       rw mw by pcsel      ne  cA cD cB
      check("ADD",  6'h00, 6'h20, ALU_ADD, 0, DST_RD,  WB_ALU,  1, 0, 0, PC_SEQ,    0, 1, 1, 0);
      check("SUB",  6'h00, 6'h22, ALU_SUB, 0, DST_RD,  WB_ALU,  1, 0, 0, PC_SEQ,    0, 1, 1, 0);
      check("OR",   6'h00, 6'h25, ALU_OR,  0, DST_RD,  WB_ALU,  1, 0, 0, PC_SEQ,    0, 1, 1, 0);
      check("SLT",  6'h00, 6'h2a, ALU_SLT, 0, DST_RD,  WB_ALU,  1, 0, 0, PC_SEQ,    0, 1, 1, 0);
      check("JR",   6'h00, 6'h08, ALU_ADD, 0, DST_RD,  WB_ALU,  0, 0, 0, PC_REG,    0, 0, 0, 0);
      check("JALR", 6'h00, 6'h09, ALU_ADD, 0, DST_RD,  WB_LINK, 1, 0, 0, PC_REG,    0, 0, 1, 0);
      check("ADDI", 6'h08, rf,    ALU_ADD, 1, DST_RT,  WB_ALU,  1, 0, 0, PC_SEQ,    0, 1, 1, 0);
      check("SLTI", 6'h0a, rf,    ALU_SLT, 1, DST_RT,  WB_ALU,  1, 0, 0, PC_SEQ,    0, 1, 1, 0);
      check("LW",   6'h23, rf,    ALU_ADD, 1, DST_RT,  WB_MEM,  1, 0, 0, PC_SEQ,    0, 1, 1, 1);
      check("LB",   6'h20, rf,    ALU_ADD, 1, DST_RT,  WB_MEM,  1, 0, 1, PC_SEQ,    0, 1, 1, 1);
      check("SW",   6'h2b, rf,    ALU_ADD, 1, DST_RT,  WB_ALU,  0, 1, 0, PC_SEQ,    0, 1, 0, 1);
      check("SB",   6'h28, rf,    ALU_ADD, 1, DST_RT,  WB_ALU,  0, 1, 1, PC_SEQ,    0, 1, 0, 1);
      check("BEQ",  6'h04, rf,    ALU_SUB, 0, DST_RT,  WB_ALU,  0, 0, 0, PC_BRANCH, 0, 1, 0, 0);
      check("BNE",  6'h05, rf,    ALU_SUB, 0, DST_RT,  WB_ALU,  0, 0, 0, PC_BRANCH, 1, 1, 0, 0);
      check("J",    6'h02, rf,    ALU_ADD, 0, DST_RT,  WB_ALU,  0, 0, 0, PC_JUMP,   0, 0, 0, 0);
      check("JAL",  6'h03, rf,    ALU_ADD, 0, DST_R31, WB_LINK, 1, 0, 0, PC_JUMP,   0, 0, 1, 0);
    end
    // undefined encodings: no register or memory write, sequential next PC
    for (int n = 0; n < 500; n++) begin
      logic [5:0] o, f;
      o = 6'($urandom); f = 6'($urandom);
      if (o inside {6'h02, 6'h03, 6'h04, 6'h05, 6'h08, 6'h0a, 6'h20, 6'h23, 6'h28, 6'h2b}) continue;
      if (o == 6'h00 && f inside {6'h08, 6'h09, 6'h20, 6'h22, 6'h25, 6'h2a}) continue;
      check("undef", o, f, ALU_ADD, 0, DST_RT, WB_ALU, 0, 0, 0, PC_SEQ, 0, 0, 0, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
