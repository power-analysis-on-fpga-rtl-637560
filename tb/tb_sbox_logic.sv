// tb_sbox_logic: full 32-copy array; for random plaintexts and random enable
// patterns checks the XOR result against the reference (the S-box value for
// an odd number of enabled copies, zero for an even number).
module tb_sbox_logic;
  import tb_ref_pkg::*;
  logic clk = 0, rst = 1, trigger = 0, en2 = 0;
  logic [31:0] en = 0;
  logic [7:0] bits = 0, res;
  int checks = 0, failures = 0;

  sbox_logic dut (.clk(clk), .rst(rst), .en(en), .trigger(trigger), .sbox_bits(bits),
                  .en2(en2), .xor_result(res));
  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] x, exp;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 100; i++) begin
      x = 8'($urandom);
      en = (i < 32) ? ((64'(1) << (i + 1)) - 1) : $urandom;
      @(negedge clk);
      bits = x; trigger = 1; @(negedge clk);
      en2 = 1; @(negedge clk); en2 = 0; trigger = 0;
      exp = ($countones(en) % 2) ? ref_sbox(x) : 8'h00;
      checks++;
      if (res !== exp) begin
        failures++;
        $display("x=%02h en=%08h res=%02h expected %02h", x, en, res, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
