// data_mem_tb: fills the data memory with word writes, then mixes random word
// and single-byte writes (byte enables) with reads, comparing every read
// word with a shadow copy kept by the testbench.
module data_mem_tb;
  localparam int unsigned WORDS = 64;
  logic        clk = 0;
  logic [31:0] addr, wdata, rdata;
  logic [3:0]  be;
  logic [31:0] shadow [WORDS];
  int          checks = 0, failures = 0;

  data_mem #(.WORDS(WORDS)) dut (.clk(clk), .addr(addr), .be(be),
                                 .wdata(wdata), .rdata(rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int w);
    be = 0; addr = {30'(w), 2'($urandom)};
    #1;
    checks++;
    if (rdata !== shadow[w]) begin
      failures++;
      $display("FAIL word %0d got %h exp %h", w, rdata, shadow[w]);
    end
  endtask

  initial begin
    be = 0; addr = 0; wdata = 0;
    @(negedge clk);
    for (int w = 0; w < WORDS; w++) begin
      addr = 32'(w) << 2; be = 4'hf; wdata = $urandom;
      shadow[w] = wdata;
      @(negedge clk);
    end
    for (int w = 0; w < WORDS; w++) check(w);
    for (int n = 0; n < 1000; n++) begin
      int w;
      @(negedge clk);  // realign after the delays spent in check()
      w = $urandom_range(WORDS - 1);
      addr = 32'(w) << 2; wdata = $urandom; be = 4'($urandom);
      for (int l = 0; l < 4; l++) if (be[l]) shadow[w][8*l +: 8] = wdata[8*l +: 8];
      @(negedge clk);
      check(w);
      check($urandom_range(WORDS - 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
