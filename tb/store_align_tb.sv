// store_align_tb: checks the store steering. The byte enables must select
// all lanes for a word store, exactly the addressed lane for a byte store and
// none without a store, and every enabled lane must carry the right byte of
// Drt.
module store_align_tb;
  logic        clk = 0;
  logic [31:0] rt_data, wdata;
  logic [1:0]  byte_off;
  logic        store, store_byte;
  logic [3:0]  be, exp_be;
  int          checks = 0, failures = 0;

  store_align dut (.rt_data(rt_data), .byte_off(byte_off), .store(store),
                   .store_byte(store_byte), .wdata(wdata), .be(be));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic ok;
    for (int n = 0; n < 2000; n++) begin
      rt_data    = $urandom;
      byte_off   = 2'(n);
      store_byte = 1'(n >> 2);
      store      = (n % 16) < 12;
      #1;
      if (!store)          exp_be = 4'b0000;
      else if (store_byte) exp_be = 4'(1 << byte_off);
      else                 exp_be = 4'b1111;
      ok = (be === exp_be);
      for (int l = 0; l < 4; l++) begin
        if (exp_be[l]) begin
          if (store_byte && wdata[8*l +: 8] !== rt_data[7:0]) ok = 0;
          if (!store_byte && wdata[8*l +: 8] !== rt_data[8*l +: 8]) ok = 0;
        end
      end
      checks++;
      if (!ok) begin
        failures++;
        $display("FAIL rt=%h off=%0d st=%b sb=%b be=%b exp=%b wdata=%h",
                 rt_data, byte_off, store, store_byte, be, exp_be, wdata);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
