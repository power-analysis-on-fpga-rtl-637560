// tb_uart_rx: sends random 8N1 frames to the receiver (20 clocks per bit)
// and checks each byte offered on rd_req, a frame with a bad stop bit, a
// frame lost while a byte waits for rd_ack, and the hand-off latency.
module tb_uart_rx;
  localparam int CLK = 1_000_000, BAUD = 50_000, BIT = 20;
  logic clk = 0, rst = 1, rx = 1, rd_req, rd_ack = 0;
  logic [7:0] data;
  int checks = 0, failures = 0;

  uart_rx #(.CLK_FREQ_HZ(CLK), .BAUD(BAUD)) dut (
    .clk(clk), .rst(rst), .rx(rx), .rd_req(rd_req), .rd_ack(rd_ack), .data(data));
  always #5 clk = ~clk;

  task automatic send(logic [7:0] b, logic stop = 1);
    rx <= 0; repeat (BIT) @(posedge clk);
    for (int i = 0; i < 8; i++) begin rx <= b[i]; repeat (BIT) @(posedge clk); end
    rx <= stop; repeat (BIT) @(posedge clk);
    rx <= 1;
  endtask

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic take(logic [7:0] exp);
    int n = 0;
    while (!rd_req && n < 40) begin @(posedge clk); n++; end
    chk(rd_req, "rd_req raised");
    chk(data == exp, $sformatf("byte %02h expected %02h", data, exp));
    rd_ack <= 1; @(posedge clk); rd_ack <= 0; @(posedge clk);
    chk(!rd_req, "rd_req dropped after rd_ack");
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] b;
    int t0;
    repeat (5) @(posedge clk);
    rst = 0;
    repeat (5) @(posedge clk);
    // latency: rd_req within the stop bit (frame start + 9.5 bits + sync)
    b = 8'hA5;
    fork send(b); join_none
    t0 = $time;
    wait (rd_req);
    chk(($time - t0) / 10 >= 9 * BIT && ($time - t0) / 10 <= 10 * BIT,
        $sformatf("rd_req after %0d cycles", ($time - t0) / 10));
    wait fork;
    take(b);
    for (int i = 0; i < 30; i++) begin
      b = 8'($urandom);
      send(b);
      take(b);
      repeat ($urandom_range(0, 30)) @(posedge clk);
    end
    // bad stop bit: no byte
    send(8'h3c, 0);
    repeat (3 * BIT) @(posedge clk);
    chk(!rd_req, "frame with bad stop bit dropped");
    repeat (BIT) @(posedge clk);
    // a second frame while the first waits is lost (no FIFO)
    send(8'h11);
    repeat (2) @(posedge clk);
    send(8'h22);
    take(8'h11);
    repeat (3 * BIT) @(posedge clk);
    chk(!rd_req, "second frame lost while first waited");
    send(8'h33);
    take(8'h33);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
