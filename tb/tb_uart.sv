// tb_uart: loops the transmitter into the receiver through the combined
// UART and checks that bytes written with wr_req come back on rd_req.
module tb_uart;
  localparam int CLK = 1_000_000, BAUD = 50_000;
  logic clk = 0, rst = 1, line, rd_req, rd_ack = 0, wr_req = 0, wr_ack;
  logic [7:0] data_in, data_out = 0;
  int checks = 0, failures = 0;

  uart #(.CLK_FREQ_HZ(CLK), .BAUD(BAUD)) dut (
    .clk(clk), .rst(rst), .rx(line), .tx(line), .data_in(data_in), .rd_req(rd_req),
    .rd_ack(rd_ack), .data_out(data_out), .wr_req(wr_req), .wr_ack(wr_ack));
  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] b;
    repeat (5) @(posedge clk);
    rst = 0;
    repeat (5) @(posedge clk);
    for (int i = 0; i < 20; i++) begin
      b = 8'($urandom);
      data_out <= b; wr_req <= 1;
      @(posedge clk iff wr_ack);
      wr_req <= 0;
      @(posedge clk iff rd_req);
      checks++;
      if (data_in !== b) begin
        failures++;
        $display("loopback %02h got %02h", b, data_in);
      end
      rd_ack <= 1; @(posedge clk); rd_ack <= 0;
      repeat (30) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
