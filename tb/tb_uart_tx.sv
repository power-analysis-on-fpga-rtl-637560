// tb_uart_tx: hands random bytes to the transmitter and decodes the serial
// line independently (sampling each bit in its middle), checking the start
// and stop bits, the 10-bit frame length and the one-cycle wr_ack.
module tb_uart_tx;
  localparam int CLK = 1_000_000, BAUD = 50_000, BIT = 20;
  logic clk = 0, rst = 1, wr_req = 0, wr_ack, tx;
  logic [7:0] data = 0;
  int checks = 0, failures = 0;

  uart_tx #(.CLK_FREQ_HZ(CLK), .BAUD(BAUD)) dut (
    .clk(clk), .rst(rst), .wr_req(wr_req), .wr_ack(wr_ack), .data(data), .tx(tx));
  always #5 clk = ~clk;

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  // Receive one frame from tx, independently of the DUT's state.
  task automatic rx_frame(output logic [7:0] b);
    @(negedge tx);
    #(BIT * 10 / 2);
    chk(tx == 0, "start bit");
    for (int i = 0; i < 8; i++) begin #(BIT * 10); b[i] = tx; end
    #(BIT * 10);
    chk(tx == 1, "stop bit");
  endtask

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] sent [$];

  // Line decoder
  initial begin
    logic [7:0] got;
    forever begin
      rx_frame(got);
      chk(sent.size() > 0 && got == sent[0],
          $sformatf("got %02h expected %02h", got, sent.size() ? sent[0] : 8'h0));
      if (sent.size()) void'(sent.pop_front());
    end
  end

  initial begin
    logic [7:0] b;
    int t_ack, gap;
    repeat (5) @(posedge clk);
    rst = 0;
    repeat (5) @(posedge clk);
    chk(tx == 1, "idle high");
    // back-to-back requests: acks must be one frame (10 bits) apart
    b = 8'h00;
    data <= b; wr_req <= 1;
    for (int i = 0; i < 25; i++) begin
      @(posedge clk iff wr_ack);
      sent.push_back(b);
      if (i > 0) begin
        gap = ($time - t_ack) / 10;
        chk(gap >= 10 * BIT && gap <= 10 * BIT + 4, $sformatf("frame spacing %0d cycles", gap));
      end
      t_ack = $time;
      b = (i == 0) ? 8'hff : 8'($urandom);
      data <= b;
      @(posedge clk);
      chk(!wr_ack, "wr_ack one cycle");
    end
    wr_req <= 0;
    repeat (12 * BIT) @(posedge clk);
    chk(sent.size() == 0, "all frames decoded");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
