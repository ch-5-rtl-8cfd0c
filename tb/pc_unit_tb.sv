// pc_unit_tb: drives the next-PC unit with random selects, branch outcomes,
// offsets, jump targets and register targets, and follows it with a
// byte-address model (PC <= NPC, NPC <= choice) written here. Checks PC, NPC
// and the link value (PC + 8) every cycle, the reset values, and counts taken
// and untaken BEQ/BNE, jumps and register jumps.
module pc_unit_tb;
  import mips_pkg::*;

  logic        clk = 0, rst_n = 0;
  pc_sel_t     pc_sel;
  logic        br_ne, alu_zero;
  logic [31:0] imm32, rs_data, pc, npc, link;
  logic [25:0] jtarget;
  logic [31:0] m_pc, m_npc;
  int          checks = 0, failures = 0;
  int          n_taken = 0, n_untaken = 0, n_jump = 0, n_reg = 0;

  pc_unit #(.RESET_PC(32'h1000_0000)) dut (
    .clk(clk), .rst_n(rst_n), .pc_sel(pc_sel), .br_ne(br_ne),
    .alu_zero(alu_zero), .imm32(imm32), .jtarget(jtarget), .rs_data(rs_data),
    .pc(pc), .npc(npc), .link(link));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(string what);
    checks++;
    if (pc !== m_pc || npc !== m_npc || link !== m_npc + 32'd4) begin
      failures++;
      $display("FAIL %s pc=%h/%h npc=%h/%h link=%h", what, pc, m_pc, npc, m_npc, link);
    end
  endtask

  initial begin
    logic taken;
    logic [31:0] nxt;
    pc_sel = PC_SEQ; br_ne = 0; alu_zero = 0; imm32 = 0; jtarget = 0; rs_data = 0;
    @(negedge clk); @(negedge clk);
    rst_n = 1;
    m_pc = 32'h1000_0000; m_npc = 32'h1000_0004;
    compare("reset");
    // the jump example: at PC 0x10000000, j 0x2000 goes to 0x10008000
    pc_sel = PC_JUMP; jtarget = 26'h2000;
    @(negedge clk);
    m_pc = m_npc; m_npc = 32'h1000_8000;
    compare("j 0x2000");
    n_jump++;
    for (int n = 0; n < 2000; n++) begin
      pc_sel   = pc_sel_t'($urandom_range(3));
      br_ne    = 1'($urandom);
      alu_zero = 1'($urandom);
      imm32    = 32'($signed(16'($urandom)));
      jtarget  = 26'($urandom);
      rs_data  = {$urandom} & 32'hffff_fffc;
      #1;
      checks++;
      if (link !== m_npc + 32'd4) begin failures++; $display("FAIL link"); end
      taken = br_ne ? !alu_zero : alu_zero;
      case (pc_sel)
        PC_SEQ:    nxt = m_npc + 4;
        PC_BRANCH: begin
          nxt = taken ? m_npc + (imm32 << 2) : m_npc + 4;
          if (taken) n_taken++; else n_untaken++;
        end
        PC_JUMP:   begin nxt = {m_pc[31:28], jtarget, 2'b00}; n_jump++; end
        PC_REG:    begin nxt = rs_data; n_reg++; end
      endcase
      @(negedge clk);
      m_pc = m_npc; m_npc = nxt;
      compare(pc_sel.name());
    end
    // reset from an arbitrary state
    rst_n = 0; @(negedge clk); rst_n = 1;
    m_pc = 32'h1000_0000; m_npc = 32'h1000_0004;
    compare("re-reset");
    checks++;
    if (n_taken == 0 || n_untaken == 0 || n_jump == 0 || n_reg == 0) failures++;
    $display("taken=%0d untaken=%0d jump=%0d reg=%0d", n_taken, n_untaken, n_jump, n_reg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
