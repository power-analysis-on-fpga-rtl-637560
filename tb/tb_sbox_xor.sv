// tb_sbox_xor: random vectors for a 5-input XOR reduction, compared with a
// byte-by-byte reference.
module tb_sbox_xor;
  localparam int N = 5;
  logic [N*8-1:0] outs;
  logic [7:0] res, exp;
  int checks = 0, failures = 0;

  sbox_xor #(.N_SBOX(N)) dut (.sbox_outs(outs), .xor_result(res));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      for (int i = 0; i < N; i++) outs[i*8 +: 8] = 8'($urandom);
      if (t == 0) outs = '0;
      if (t == 1) outs = {8'h00, 8'h00, 8'h00, 8'h00, 8'h5a};
      #1;
      exp = 0;
      for (int i = 0; i < N; i++) exp = exp ^ outs[i*8 +: 8];
      checks++;
      if (res !== exp) begin
        failures++;
        $display("xor %h = %h, expected %h", outs, res, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
