// regfile: 32 registers of 32 bits, two read ports and one write port.
//
// Reads are combinational: Drs follows ra_rs and Drt follows ra_rt within
// the cycle. The write of D/IN into register `wa` happens on the rising clock
// edge when `we` is high, so an instruction that reads and writes the same
// register sees the old value, as a single-cycle datapath needs. Register 0
// reads as zero and ignores writes (MIPS convention), and a synchronous
// active-low reset clears every register; both are this design's choices.
module regfile (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [4:0]  ra_rs,
  input  logic [4:0]  ra_rt,
  output logic [31:0] d_rs,
  output logic [31:0] d_rt,
  input  logic        we,
  input  logic [4:0]  wa,
  input  logic [31:0] wd
);

  logic [31:0] regs [32];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < 32; i++) regs[i] <= '0;
    end else if (we && wa != 5'd0) begin
      regs[wa] <= wd;
    end
  end

  assign d_rs = (ra_rs == 5'd0) ? '0 : regs[ra_rs];
  assign d_rt = (ra_rt == 5'd0) ? '0 : regs[ra_rt];

endmodule
