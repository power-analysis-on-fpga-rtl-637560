// tb_cpa_workload: the 100-plaintext Hamming-weight experiment run on the
// complete platform at its default parameters.
//
// The host seeds the LFSR (0x1E), enables one S-box copy and runs 100
// measurements, collecting the answer byte of each. With one copy the answer
// is the S-box output, so its Hamming weight stands in for the measured
// current. For every key guess k the testbench predicts HW(S(pt ^ k)) from
// the plaintexts it recomputes from the seed, and counts how many of the 100
// predictions match. The S-box input on chip is the plaintext itself (key 0),
// so guess 0 must match all 100 and every other guess fewer. The run is
// repeated with 32 copies, where the answer must be zero every time (an
// even count), and the trigger must have fired once per measurement.
module tb_cpa_workload;
  import tb_ref_pkg::*;
  localparam int BIT = 434;
  localparam int N_MEAS = 100;

  logic clk = 0, reset = 1, rx = 1, tx, trigger;
  int checks = 0, failures = 0, n_trig = 0;

  top_cpa dut (.clk(clk), .reset(reset), .rx(rx), .tx(tx), .trigger(trigger));
  always #10 clk = ~clk;

  logic trig_q = 0;
  always @(posedge clk) begin
    trig_q <= trigger;
    if (trigger && !trig_q) n_trig++;
  end

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic send_byte(logic [7:0] b);
    rx <= 0; repeat (BIT) @(posedge clk);
    for (int i = 0; i < 8; i++) begin rx <= b[i]; repeat (BIT) @(posedge clk); end
    rx <= 1; repeat (BIT) @(posedge clk);
  endtask

  task automatic recv_byte(output logic [7:0] b);
    @(negedge tx);
    repeat (BIT / 2) @(posedge clk);
    for (int i = 0; i < 8; i++) begin repeat (BIT) @(posedge clk); b[i] = tx; end
    repeat (BIT) @(posedge clk);
  endtask

  task automatic measure(output logic [7:0] r);
    fork
      send_byte(8'h60);
      recv_byte(r);
    join
  endtask

  function automatic int hw(logic [7:0] v);
    return $countones(v);
  endfunction

  initial begin
    #200ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] pt [N_MEAS];
    logic [7:0] ans [N_MEAS];
    logic [7:0] s, r;
    int hits [256];
    int best_wrong, t0;
    repeat (10) @(posedge clk);
    reset <= 0;
    repeat (10) @(posedge clk);
    send_byte(8'h0E);              // LSB nibble 1110
    send_byte(8'h21);              // MSB nibble 0001
    send_byte(8'h40);              // one S-box copy
    s = 8'h1E;
    t0 = n_trig;
    for (int m = 0; m < N_MEAS; m++) begin
      pt[m] = s;
      measure(ans[m]);
      s = ref_lfsr(s);
    end
    chk(n_trig - t0 == N_MEAS, $sformatf("%0d trigger pulses for %0d measurements", n_trig - t0, N_MEAS));
    for (int m = 0; m < N_MEAS; m++)
      chk(ans[m] == ref_sbox(pt[m]), $sformatf("measurement %0d: %02h for pt %02h", m, ans[m], pt[m]));
    chk(pt[63] == pt[0] && pt[62] != pt[0], "plaintext sequence repeats after 63 measurements");
    for (int k = 0; k < 256; k++) begin
      hits[k] = 0;
      for (int m = 0; m < N_MEAS; m++)
        if (hw(ref_sbox(pt[m] ^ 8'(k))) == hw(ans[m])) hits[k]++;
    end
    best_wrong = 0;
    for (int k = 1; k < 256; k++) if (hits[k] > best_wrong) best_wrong = hits[k];
    $display("key guess 0: %0d of %0d matches; best wrong guess: %0d", hits[0], N_MEAS, best_wrong);
    chk(hits[0] == N_MEAS, "correct guess matches every measurement");
    chk(best_wrong < N_MEAS, "no wrong guess matches every measurement");

    // all 32 copies: even count, answer zero, trigger per measurement
    send_byte(8'h5F);
    t0 = n_trig;
    for (int m = 0; m < 20; m++) begin
      measure(r);
      chk(r == 8'h00, $sformatf("32 copies: answer %02h", r));
    end
    chk(n_trig - t0 == 20, "trigger per measurement with 32 copies");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
