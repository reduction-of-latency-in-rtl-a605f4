// tb_zsp_encoder: every 4-bit data word must give {data, zero-sum check,
// parity} with the check from the weights 3,5,6,7 and the whole word of even
// parity.
module tb_zsp_encoder;
  int checks = 0, failures = 0;
  localparam int W4 [4] = '{3, 5, 6, 7};
  logic [3:0] d;
  logic [9:0] cw;

  zsp_encoder dut (.data_i(d), .codeword_o(cw));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      int s;
      int ones;
      logic [9:0] expct;
      s = 0;
      ones = 0;
      d = 4'(v);
      for (int i = 0; i < 4; i++) if (!d[i]) s += W4[i];
      expct[9:1] = {d, 5'(s)};
      for (int i = 1; i < 10; i++) ones += expct[i];
      expct[0] = ones[0];
      #1;
      checks++;
      if (cw != expct) begin failures++; $display("FAIL d=%b cw=%b exp=%b", d, cw, expct); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
