// instr_mem_tb: loads the instruction memory through its load port with
// random words, then reads every word back by byte address (with random
// values in address bits 1-0, which must be ignored) and compares with the
// loaded values. Uses a small WORDS so address wrap-around is also checked.
module instr_mem_tb;
  localparam int unsigned WORDS = 64;
  logic        clk = 0;
  logic [31:0] addr, instr, load_addr, load_data;
  logic        load_we;
  logic [31:0] shadow [WORDS];
  int          checks = 0, failures = 0;

  instr_mem #(.WORDS(WORDS)) dut (.clk(clk), .addr(addr), .instr(instr),
    .load_we(load_we), .load_addr(load_addr), .load_data(load_data));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int w, logic [1:0] lo);
    addr = {30'(w), lo};
    #1;
    checks++;
    if (instr !== shadow[w % WORDS]) begin
      failures++;
      $display("FAIL word %0d got %h exp %h", w, instr, shadow[w % WORDS]);
    end
  endtask

  initial begin
    load_we = 0; load_addr = 0; load_data = 0; addr = 0;
    @(negedge clk);
    for (int w = 0; w < WORDS; w++) begin
      load_we = 1; load_addr = 32'(w) << 2; load_data = $urandom;
      shadow[w] = load_data;
      @(negedge clk);
    end
    load_we = 0;
    for (int w = 0; w < WORDS; w++) check(w, 2'($urandom));
    // addresses beyond the array wrap
    for (int w = WORDS; w < 2 * WORDS; w++) check(w, 2'b00);
    // overwrite a few words
    for (int n = 0; n < 20; n++) begin
      int w;
      @(negedge clk);  // realign after the delays spent in check()
      w = $urandom_range(WORDS - 1);
      load_we = 1; load_addr = 32'(w) << 2; load_data = $urandom;
      shadow[w] = load_data;
      @(negedge clk);
      load_we = 0;
      check(w, 2'b00);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
