// tb_lfsr: seeds the LFSR nibble by nibble and checks the published
// eight-state sequence 1E 3D 7A F4 E8 D1 A2 44, then 200 random steps and
// loads against the bit-equation reference, and the period of 63 from 0x1E.
module tb_lfsr;
  import tb_ref_pkg::*;
  logic clk = 0, rst = 1, load_lsb = 0, load_msb = 0, step = 0;
  logic [3:0] seed = 0;
  logic [7:0] value, model;
  int checks = 0, failures = 0;

  lfsr dut (.clk(clk), .rst(rst), .load_lsb(load_lsb), .load_msb(load_msb),
            .seed(seed), .step(step), .value(value));
  always #5 clk = ~clk;

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic cyc(logic ll, logic lm, logic [3:0] sd, logic st);
    load_lsb <= ll; load_msb <= lm; seed <= sd; step <= st;
    @(posedge clk);
    load_lsb <= 0; load_msb <= 0; step <= 0;
    #1;
  endtask

  localparam logic [7:0] SEQ [8] = '{8'h1E, 8'h3D, 8'h7A, 8'hF4, 8'hE8, 8'hD1, 8'hA2, 8'h44};

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    repeat (2) @(posedge clk);
    rst = 0;
    #1 chk(value == 8'h01, "reset value");
    cyc(1, 0, 4'b1110, 0);
    chk(value == 8'h0E, $sformatf("lsb seed -> %02h", value));
    cyc(0, 1, 4'b0001, 0);
    chk(value == 8'h1E, $sformatf("msb seed -> %02h", value));
    for (int i = 0; i < 8; i++) begin
      chk(value == SEQ[i], $sformatf("iteration %0d: %02h expected %02h", i, value, SEQ[i]));
      cyc(0, 0, 0, 1);
    end
    // period from 0x1E
    cyc(1, 0, 4'hE, 0); cyc(0, 1, 4'h1, 0);
    n = 0;
    do begin cyc(0, 0, 0, 1); n++; end while (value != 8'h1E && n < 300);
    chk(n == 63, $sformatf("period %0d", n));
    // random operations
    model = value;
    for (int i = 0; i < 200; i++) begin
      logic ll, lm, st; logic [3:0] sd;
      ll = ($urandom % 8) == 0; lm = ($urandom % 8) == 0; st = $urandom % 2; sd = 4'($urandom);
      cyc(ll, lm, sd, st);
      if (ll) model[3:0] = sd;
      else if (lm) model[7:4] = sd;
      else if (st) model = ref_lfsr(model);
      chk(value == model, $sformatf("random op %0d: %02h expected %02h", i, value, model));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
