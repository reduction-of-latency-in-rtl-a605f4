// tb_zs_encoder: exhaustive check of the zero-sum encoder.
//
// Instance 1 runs at the default 4-bit size and compares every one of the 16
// data words against the check values of the 4-bit zero-sum code table
// (weights 7,6,5,3 on data bits 3..0). Instance 2 runs a 6-bit word and
// compares every word with a sum of weights (3,5,6,7,9,10) written out here.
module tb_zs_encoder;
  int checks = 0, failures = 0;

  // Check values of the 4-bit code, indexed by the data word.
  localparam int unsigned TABLE4 [16] = '{21, 18, 16, 13, 15, 12, 10, 7,
                                          14, 11,  9,  6,  8,  5,  3, 0};
  localparam int unsigned W6 [6] = '{3, 5, 6, 7, 9, 10};

  logic [3:0] d4;
  logic [4:0] c4;
  logic [8:0] cw4;
  logic [5:0] d6;
  logic [5:0] c6;
  logic [11:0] cw6;

  zs_encoder dut4 (.data_i(d4), .check_o(c4), .codeword_o(cw4));
  zs_encoder #(.DATA_W(6)) dut6 (.data_i(d6), .check_o(c6), .codeword_o(cw6));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      d4 = 4'(v);
      #1;
      checks++;
      if (c4 != 5'(TABLE4[v]) || cw4 != {d4, 5'(TABLE4[v])}) begin
        failures++;
        $display("FAIL 4-bit data=%b check=%0d expected %0d", d4, c4, TABLE4[v]);
      end
    end
    // Worked examples: 1010 -> 01001, 0010 -> 10000, 0110 -> 10 (01010).
    d4 = 4'b1010; #1; checks++; if (c4 != 5'b01001) failures++;
    d4 = 4'b0010; #1; checks++; if (c4 != 5'b10000) failures++;
    d4 = 4'b0110; #1; checks++; if (c4 != 5'd10)    failures++;
    for (int v = 0; v < 64; v++) begin
      int unsigned s;
      d6 = 6'(v);
      s = 0;
      for (int i = 0; i < 6; i++) if (!d6[i]) s += W6[i];
      #1;
      checks++;
      if (c6 != 6'(s) || cw6 != {d6, 6'(s)}) begin
        failures++;
        $display("FAIL 6-bit data=%b check=%0d expected %0d", d6, c6, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
