// tb_sbox_slice: drives one S-box copy through trigger and en2 windows with
// random bytes and checks the registered output, the isolation (no load
// without trigger, no output change without en2) and a disabled copy.
module tb_sbox_slice;
  import tb_ref_pkg::*;
  logic clk = 0, rst = 1, en = 1, trigger = 0, en2 = 0;
  logic [7:0] bits = 0, out;
  int checks = 0, failures = 0;

  sbox_slice dut (.clk(clk), .rst(rst), .en(en), .trigger(trigger), .sbox_bits(bits),
                  .en2(en2), .sbox_out(out));
  always #5 clk = ~clk;

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] x, prev;
    repeat (2) @(posedge clk);
    rst = 0;
    @(negedge clk);
    chk(out == 0, "reset");
    prev = 0;
    for (int i = 0; i < 60; i++) begin
      x = 8'($urandom);
      bits = x;
      // en2 without a trigger: output from the old input
      en2 = 1; @(negedge clk); en2 = 0;
      chk(out == ref_sbox(prev), "no load without trigger");
      trigger = 1; @(negedge clk);
      chk(out == ref_sbox(prev), "output holds without en2");
      en2 = 1; @(negedge clk); trigger = 0; en2 = 0;
      chk(out == ref_sbox(x), $sformatf("S(%02h)=%02h", x, out));
      bits = 8'($urandom);
      @(negedge clk);
      chk(out == ref_sbox(x), "holds");
      prev = x;
    end
    en = 0; @(negedge clk);
    chk(out == 0, "disabled copy outputs zero");
    bits = 8'h42; trigger = 1; en2 = 1; @(negedge clk); @(negedge clk);
    chk(out == 0, "disabled copy ignores trigger");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
