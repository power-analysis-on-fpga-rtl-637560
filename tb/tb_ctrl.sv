// tb_ctrl: plays the UART side of both hand-shakes and a model of the S-box
// array against the controller. Checks: rd_ack per command byte, seeding
// through both nibble commands, the enable vector of the S-box command,
// the trigger window and result byte of each measurement (with the LFSR
// stepping between measurements), that reserved codes are ignored, and the
// hold of wr_req/data_out while the transmitter is slow to acknowledge.
module tb_ctrl;
  import tb_ref_pkg::*;
  logic clk = 0, rst = 1;
  logic [7:0] data_in = 0, data_out, sbox_bits, xor_result;
  logic rd_req = 0, rd_ack, wr_req, wr_ack = 0, trigger, en2;
  logic [31:0] en;
  logic [7:0] in_q;
  logic [7:0] outs [32];
  int checks = 0, failures = 0;

  ctrl dut (.clk(clk), .rst(rst), .data_in(data_in), .rd_req(rd_req), .rd_ack(rd_ack),
    .data_out(data_out), .wr_req(wr_req), .wr_ack(wr_ack), .trigger(trigger), .en(en),
    .en2(en2), .sbox_bits(sbox_bits), .xor_result(xor_result));
  always #5 clk = ~clk;

  // model of the S-box array
  always_ff @(posedge clk) begin
    if (trigger) in_q <= sbox_bits;
    for (int i = 0; i < 32; i++)
      if (!en[i]) outs[i] <= 0; else if (en2) outs[i] <= ref_sbox(in_q);
  end
  always_comb begin
    xor_result = 0;
    for (int i = 0; i < 32; i++) xor_result ^= outs[i];
  end

  int trig_cycles = 0;
  always @(posedge clk) if (trigger) trig_cycles++;

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic send_cmd(logic [2:0] cmd, logic [4:0] param);
    int n = 0;
    @(negedge clk); data_in = {cmd, param}; rd_req = 1;
    while (!rd_ack && n < 10) begin @(negedge clk); n++; end
    chk(rd_ack, "rd_ack");
    @(negedge clk); rd_req = 0; data_in = 8'($urandom);
    chk(!rd_ack, "rd_ack one cycle");
  endtask

  task automatic get_result(output logic [7:0] r, input int delay);
    int n = 0;
    while (!wr_req && n < 20) begin @(negedge clk); n++; end
    chk(wr_req, "wr_req for result");
    r = data_out;
    repeat (delay) begin
      @(negedge clk);
      chk(wr_req && data_out == r, "wr_req and data held until wr_ack");
    end
    wr_ack = 1; @(negedge clk); wr_ack = 0;
    @(negedge clk);
    chk(!wr_req, "wr_req dropped");
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] model, r, exp;
    int cnt, t0;
    repeat (2) @(posedge clk);
    rst = 0;
    // seed LFSR to 0x1E: LSB 1110, MSB 0001
    send_cmd(3'b000, 5'b01110);
    send_cmd(3'b001, 5'b00001);
    repeat (5) @(negedge clk);
    model = 8'h1E;
    for (int k = 0; k < 12; k++) begin
      cnt = (k * 5) % 32;
      send_cmd(3'b010, 5'(cnt));
      repeat (4) @(negedge clk);
      chk(en == (33'(1) << (cnt + 1)) - 1, $sformatf("en=%08h for %0d", en, cnt));
      t0 = trig_cycles;
      send_cmd(3'b011, 5'd0);
      get_result(r, k % 4);
      chk(trig_cycles - t0 == 2, $sformatf("trigger high %0d cycles", trig_cycles - t0));
      exp = ((cnt + 1) % 2) ? ref_sbox(model) : 8'h00;
      chk(r == exp, $sformatf("measurement %0d: result %02h expected %02h (pt %02h, %0d boxes)",
                              k, r, exp, model, cnt + 1));
      model = ref_lfsr(model);
    end
    // reserved codes are ignored: no answer, nothing changes
    for (int c = 4; c < 8; c++) begin
      send_cmd(3'(c), 5'h1f);
      repeat (20) @(negedge clk);
      chk(!wr_req && !trigger, "reserved code ignored");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
