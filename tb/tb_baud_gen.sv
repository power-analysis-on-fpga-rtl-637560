// tb_baud_gen: measures the tick period at the default 50 MHz / 115200 baud
// (217 cycles, twice the bit rate) and the delay after a restart.
module tb_baud_gen;
  logic clk = 0, rst = 1, restart = 0, tick;
  int checks = 0, failures = 0;
  int last, cyc = 0;

  baud_gen dut (.clk(clk), .rst(rst), .restart(restart), .tick(tick));
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst = 0;
    @(posedge clk iff tick);
    last = cyc;
    for (int i = 0; i < 10; i++) begin
      @(posedge clk iff tick);
      checks++;
      if (cyc - last != 217) begin
        failures++;
        $display("tick period %0d, expected 217", cyc - last);
      end
      last = cyc;
    end
    // restart in the middle of a period
    repeat (50) @(posedge clk);
    restart <= 1;
    @(posedge clk);
    restart <= 0;
    last = cyc;
    @(posedge clk iff tick);
    checks++;
    if (cyc - last != 217) begin
      failures++;
      $display("tick after restart %0d, expected 217", cyc - last);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
