// tb_sbox_en_fsm: for every parameter value 0..31 checks that exactly the
// copies 0..p are enabled, the done timing, and that the vector holds.
module tb_sbox_en_fsm;
  logic clk = 0, rst = 1, start = 0, done;
  logic [4:0] param = 0;
  logic [31:0] en, exp;
  int checks = 0, failures = 0;

  sbox_en_fsm dut (.clk(clk), .rst(rst), .start(start), .param(param), .en(en), .done(done));
  always #5 clk = ~clk;

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst = 0;
    @(negedge clk);
    chk(en == 32'h1, "reset enables copy 0");
    for (int p = 0; p < 32; p++) begin
      int q;
      q = (p * 7 + 3) % 32;
      @(negedge clk); param = 5'(q); start = 1;
      @(negedge clk); start = 0; param = 5'($urandom);
      chk(!done, "not done in SET_EN");
      @(negedge clk);
      exp = 0;
      for (int i = 0; i <= q; i++) exp[i] = 1;
      chk(done, "done");
      chk(en == exp && $countones(en) == q + 1, $sformatf("p=%0d en=%08h expected %08h", q, en, exp));
      repeat (3) @(negedge clk);
      chk(!done && en == exp, "held");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
