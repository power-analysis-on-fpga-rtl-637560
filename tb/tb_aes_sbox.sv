// tb_aes_sbox: applies all 256 inputs to the combinational S-box and
// compares each output with a search-based reference and, for four inputs,
// with values from the AES standard.
module tb_aes_sbox;
  import tb_ref_pkg::*;

  logic [7:0] in_byte, out_byte;
  int checks = 0, failures = 0;

  aes_sbox dut (.in_byte(in_byte), .out_byte(out_byte));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [7:0] x, logic [7:0] exp);
    in_byte = x;
    #1;
    checks++;
    if (out_byte !== exp) begin
      failures++;
      $display("S(%02h) = %02h, expected %02h", x, out_byte, exp);
    end
  endtask

  initial begin
    chk(8'h00, 8'h63);
    chk(8'h01, 8'h7c);
    chk(8'h53, 8'hed);
    chk(8'hff, 8'h16);
    for (int i = 0; i < 256; i++) chk(8'(i), ref_sbox(8'(i)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
