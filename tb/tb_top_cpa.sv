// tb_top_cpa: end-to-end test of the whole platform at its default
// parameters (50 MHz clock, 115200 baud, 32 S-box copies), acting as the
// host on the serial line.
//
// It seeds the LFSR to 0x1E with the two nibble commands, then for a range
// of S-box counts runs measurements and decodes each answer byte from the
// tx line: the byte must be S(plaintext) for an odd count and zero for an
// even one, where the plaintext follows 1E 3D 7A F4 E8 D1 A2 44 ... It also
// checks that each trigger pulse lasts two clock cycles, that reserved
// command codes get no answer, that reseeding restarts the plaintext
// sequence, and that a mid-run reset restores the reset state (LFSR 0x01,
// one S-box). Every mechanism is counted and one that never occurs is a failure.
module tb_top_cpa;
  import tb_ref_pkg::*;
  localparam int BIT = 434;          // clock cycles per bit at 50 MHz / 115200
  localparam time TCLK = 20ns;

  logic clk = 0, reset = 1, rx = 1, tx, trigger;
  int checks = 0, failures = 0;
  int n_seed_lsb = 0, n_seed_msb = 0, n_set_sbox = 0, n_measure = 0, n_reserved = 0,
      n_odd = 0, n_even = 0, n_reset = 0, n_trig = 0;

  top_cpa dut (.clk(clk), .reset(reset), .rx(rx), .tx(tx), .trigger(trigger));
  always #(TCLK / 2) clk = ~clk;

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  // trigger pulse width
  int tw = 0;
  always @(posedge clk) begin
    if (trigger) tw++;
    else if (tw != 0) begin
      n_trig++;
      chk(tw == 2, $sformatf("trigger pulse %0d cycles", tw));
      tw = 0;
    end
  end

  // host -> platform
  task automatic send_byte(logic [7:0] b);
    rx <= 0; repeat (BIT) @(posedge clk);
    for (int i = 0; i < 8; i++) begin rx <= b[i]; repeat (BIT) @(posedge clk); end
    rx <= 1; repeat (BIT) @(posedge clk);
  endtask

  // platform -> host, with timeout; returns 0 if nothing arrived
  task automatic recv_byte(output logic [7:0] b, output bit got, input int max_cycles);
    int n = 0;
    got = 0;
    while (tx && n < max_cycles) begin @(posedge clk); n++; end
    if (tx) return;
    repeat (BIT / 2) @(posedge clk);
    if (tx) return;
    for (int i = 0; i < 8; i++) begin repeat (BIT) @(posedge clk); b[i] = tx; end
    repeat (BIT) @(posedge clk);
    chk(tx == 1, "stop bit from platform");
    got = 1;
  endtask

  task automatic cmd(logic [2:0] c, logic [4:0] p);
    send_byte({c, p});
    case (c)
      3'b000: n_seed_lsb++;
      3'b001: n_seed_msb++;
      3'b010: n_set_sbox++;
      default: ;
    endcase
  endtask

  logic [7:0] pt;      // model of the LFSR

  task automatic measure(int boxes);
    logic [7:0] r, exp; bit got;
    int t0 = n_trig;
    fork
      cmd(3'b011, 5'd0);
      recv_byte(r, got, 25 * BIT);
    join
    chk(got, "answer to measurement");
    exp = (boxes % 2) ? ref_sbox(pt) : 8'h00;
    chk(r == exp, $sformatf("pt %02h, %0d boxes: got %02h expected %02h", pt, boxes, r, exp));
    chk(n_trig == t0 + 1, "one trigger pulse per measurement");
    if (boxes % 2) n_odd++; else n_even++;
    n_measure++;
    pt = ref_lfsr(pt);
  endtask

  initial begin
    #100ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] r; bit got;
    repeat (10) @(posedge clk);
    reset <= 0;
    repeat (10) @(posedge clk);
    chk(tx == 1, "tx idles high");

    // seed 0x1E: LSB nibble 1110, MSB nibble 0001
    cmd(3'b000, 5'b01110);
    cmd(3'b001, 5'b00001);
    pt = 8'h1E;
    // one box after reset
    measure(1);
    for (int k = 0; k < 10; k++) begin
      int p;
      p = (k * 7) % 32;
      cmd(3'b010, 5'(p));
      measure(p + 1);
      if (k % 3 == 0) measure(p + 1);
    end
    cmd(3'b010, 5'd31);
    measure(32);

    // reserved command codes: no answer, no trigger
    for (int c = 4; c < 8; c++) begin
      int t0;
      t0 = n_trig;
      fork
        cmd(3'(c), 5'($urandom));
        recv_byte(r, got, 14 * BIT);
      join
      chk(!got && n_trig == t0, $sformatf("reserved code %0d ignored (got=%0d byte %02h, trig %0d->%0d)", c, got, r, t0, n_trig));
      n_reserved++;
    end

    // Reseed to 0x44 then measure with one box; the answer follows the new seed
    cmd(3'b010, 5'd0);
    cmd(3'b000, 5'b00100);
    cmd(3'b001, 5'b00100);
    pt = 8'h44;
    measure(1);

    // a mid-run reset: LFSR back to 0x01, one box enabled
    reset <= 1; repeat (5) @(posedge clk); reset <= 0; repeat (5) @(posedge clk);
    n_reset++;
    pt = 8'h01;
    measure(1);
    measure(1);

    chk(n_seed_lsb > 0, "seed LSB exercised");
    chk(n_seed_msb > 0, "seed MSB exercised");
    chk(n_set_sbox > 0, "set S-box count exercised");
    chk(n_measure > 0, "measurement exercised");
    chk(n_odd > 0 && n_even > 0, "odd and even S-box counts exercised");
    chk(n_reserved > 0, "reserved codes exercised");
    chk(n_reset > 0, "reset exercised");
    chk(n_trig >= n_measure, "trigger pulses seen");
    $display("mechanisms: seed_lsb=%0d seed_msb=%0d set_sbox=%0d measure=%0d odd=%0d even=%0d reserved=%0d reset=%0d trig=%0d",
             n_seed_lsb, n_seed_msb, n_set_sbox, n_measure, n_odd, n_even, n_reserved, n_reset, n_trig);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
