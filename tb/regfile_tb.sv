// regfile_tb: checks reset clearing, write/read on both ports, register 0
// staying zero, write-enable gating and that a write shows only after the
// clock edge, against a shadow array kept by the testbench.
module regfile_tb;
  logic        clk = 0, rst_n = 0;
  logic [4:0]  ra_rs, ra_rt, wa;
  logic [31:0] d_rs, d_rt, wd;
  logic        we;
  logic [31:0] shadow [32];
  int          checks = 0, failures = 0;

  regfile dut (.clk(clk), .rst_n(rst_n), .ra_rs(ra_rs), .ra_rt(ra_rt),
               .d_rs(d_rs), .d_rt(d_rt), .we(we), .wa(wa), .wd(wd));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_read(logic [4:0] r1, logic [4:0] r2);
    ra_rs = r1; ra_rt = r2;
    #1;
    checks++;
    if (d_rs !== shadow[r1] || d_rt !== shadow[r2]) begin
      failures++;
      $display("FAIL rs=%0d %h/%h rt=%0d %h/%h", r1, d_rs, shadow[r1], r2, d_rt, shadow[r2]);
    end
  endtask

  initial begin
    we = 0; wa = 0; wd = 0; ra_rs = 0; ra_rt = 0;
    foreach (shadow[i]) shadow[i] = '0;
    @(negedge clk); @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 32; r++) check_read(5'(r), 5'(31 - r));
    // write every register, including r0
    for (int r = 0; r < 32; r++) begin
      we = 1; wa = 5'(r); wd = $urandom;
      ra_rs = 5'(r); #1;
      checks++;  // not yet visible before the edge
      if (d_rs !== shadow[r]) begin failures++; $display("FAIL early write r%0d", r); end
      @(posedge clk);
      if (r != 0) shadow[r] = wd;
      @(negedge clk);
    end
    we = 0;
    for (int r = 0; r < 32; r++) check_read(5'(r), 5'($urandom));
    // writes with we low are ignored
    for (int n = 0; n < 20; n++) begin
      we = 0; wa = 5'($urandom); wd = $urandom;
      @(posedge clk); @(negedge clk);
      check_read(wa, 5'($urandom));
    end
    // random traffic
    for (int n = 0; n < 300; n++) begin
      we = 1'($urandom); wa = 5'($urandom); wd = $urandom;
      @(posedge clk);
      if (we && wa != 0) shadow[wa] = wd;
      @(negedge clk);
      check_read(5'($urandom), 5'($urandom));
    end
    // reset clears all
    rst_n = 0; @(posedge clk); @(negedge clk); rst_n = 1;
    foreach (shadow[i]) shadow[i] = '0;
    for (int r = 0; r < 32; r++) check_read(5'(r), 5'(r));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
