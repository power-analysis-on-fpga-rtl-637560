// tb_reset_sync: checks immediate assertion and release after exactly two
// clock edges.
module tb_reset_sync;
  logic clk = 0, rst_in = 1, rst_out;
  int checks = 0, failures = 0;

  reset_sync dut (.clk(clk), .rst_in(rst_in), .rst_out(rst_out));
  always #5 clk = ~clk;

  task automatic chk(logic exp, string what);
    checks++;
    if (rst_out !== exp) begin
      failures++;
      $display("%s: rst_out=%b expected %b", what, rst_out, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 chk(1, "held");
    rst_in = 0;
    @(posedge clk); #1 chk(1, "after 1 edge");
    @(posedge clk); #1 chk(0, "after 2 edges");
    repeat (3) @(posedge clk);
    #1 chk(0, "stays low");
    #2 rst_in = 1;                    // between edges
    #1 chk(1, "async assert");
    #1 rst_in = 0;
    @(posedge clk); #1 chk(1, "release 1");
    @(posedge clk); #1 chk(0, "release 2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
