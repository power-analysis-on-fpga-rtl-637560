// tb_lfsr_fsm: starts the seed sub-machine with each command code and
// checks the load strobe, its timing, and the one-cycle done.
module tb_lfsr_fsm;
  logic clk = 0, rst = 1, start = 0, load_lsb, load_msb, done;
  logic [2:0] cmd = 0;
  int checks = 0, failures = 0;

  lfsr_fsm dut (.clk(clk), .rst(rst), .start(start), .cmd(cmd),
                .load_lsb(load_lsb), .load_msb(load_msb), .done(done));
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
    for (int r = 0; r < 6; r++) begin
      logic m;
      m = r % 2;
      @(negedge clk); cmd = {2'b00, m}; start = 1;
      @(negedge clk); start = 0;
      chk(load_lsb == !m && load_msb == m && !done, $sformatf("strobe cmd %0d", m));
      @(negedge clk);
      chk(!load_lsb && !load_msb && done, "done after strobe");
      @(negedge clk);
      chk(!done && !load_lsb && !load_msb, "back to ready");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
