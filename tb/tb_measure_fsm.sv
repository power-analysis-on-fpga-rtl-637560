// tb_measure_fsm: runs measurements against a small model of the S-box
// array and checks the state timing of the trigger (cycles 2-3 after
// start), en2 (cycle 3), done and LFSR step (cycle 5), that sbox_bits
// carries the LFSR byte while the trigger is high, and the captured result.
module tb_measure_fsm;
  import tb_ref_pkg::*;
  logic clk = 0, rst = 1, start = 0, trigger, en2, lfsr_step, done;
  logic [7:0] lfsr_value = 0, sbox_bits, xor_result, result;
  logic [7:0] in_q, out_q;
  int checks = 0, failures = 0;

  measure_fsm dut (.clk(clk), .rst(rst), .start(start), .lfsr_value(lfsr_value),
    .sbox_bits(sbox_bits), .trigger(trigger), .en2(en2), .xor_result(xor_result),
    .result(result), .lfsr_step(lfsr_step), .done(done));
  always #5 clk = ~clk;

  // one enabled S-box copy
  always_ff @(posedge clk) begin
    if (trigger) in_q <= sbox_bits;
    if (en2)     out_q <= ref_sbox(in_q);
  end
  assign xor_result = out_q;

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
    logic [7:0] x;
    logic [5:0] trig, e2, dn, st;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 40; i++) begin
      x = 8'($urandom);
      @(negedge clk); lfsr_value = x; start = 1;
      trig = 0; e2 = 0; dn = 0; st = 0;
      for (int c = 0; c < 6; c++) begin
        @(negedge clk); start = 0;
        trig[c] = trigger; e2[c] = en2; dn[c] = done; st[c] = lfsr_step;
        if (trigger) chk(sbox_bits == x, "sbox_bits = LFSR byte while triggered");
        if (done) chk(result == ref_sbox(x), $sformatf("result %02h for %02h", result, x));
      end
      chk(trig == 6'b000110, $sformatf("trigger pattern %b", trig));
      chk(e2   == 6'b000100, $sformatf("en2 pattern %b", e2));
      chk(dn   == 6'b010000, $sformatf("done pattern %b", dn));
      chk(st   == 6'b010000, $sformatf("step pattern %b", st));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
