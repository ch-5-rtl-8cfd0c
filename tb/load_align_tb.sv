// load_align_tb: checks the load truncation logic for every byte offset with
// word loads (word unchanged) and byte loads (addressed byte, 24 zero bits).
module load_align_tb;
  logic        clk = 0;
  logic [31:0] mem_word, load_data, exp;
  logic [1:0]  byte_off;
  logic        load_byte;
  int          checks = 0, failures = 0;

  load_align dut (.mem_word(mem_word), .byte_off(byte_off),
                  .load_byte(load_byte), .load_data(load_data));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      mem_word  = (n == 0) ? 32'h8899_aabb : $urandom;
      byte_off  = 2'(n);
      load_byte = 1'(n >> 2);
      #1;
      exp = load_byte ? {24'd0, 8'(mem_word >> (8 * byte_off))} : mem_word;
      checks++;
      if (load_data !== exp) begin
        failures++;
        $display("FAIL word=%h off=%0d byte=%b got=%h exp=%h",
                 mem_word, byte_off, load_byte, load_data, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
