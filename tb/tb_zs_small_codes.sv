// tb_zs_small_codes: the 2-bit and 3-bit members of the zero-sum family.
//
// The encoder and the decoder are instantiated with DATA_W = 2 (weights 3, 5;
// four check bits, weights 1..8) and DATA_W = 3 (weights 3, 5, 6; four check
// bits). Every data word is checked against the check values listed here,
// the sums of the weights of the 0 data bits: 2-bit {8, 5, 3, 0} and 3-bit
// {14, 11, 9, 6, 8, 5, 3, 0}. Every word is then sent through the decoder with
// each single bit inverted and must come back repaired.
module tb_zs_small_codes;
  int checks = 0, failures = 0;
  localparam int unsigned T2 [4] = '{8, 5, 3, 0};
  localparam int unsigned T3 [8] = '{14, 11, 9, 6, 8, 5, 3, 0};

  logic [1:0] d2, d2o;  logic [3:0] c2, c2o;  logic [5:0] w2, r2;
  logic [2:0] d3, d3o;  logic [3:0] c3, c3o;  logic [6:0] w3, r3;
  logic signed [4:0] s2, s3;
  logic e2, k2, u2, e3, k3, u3;

  zs_encoder #(.DATA_W(2)) enc2 (.data_i(d2), .check_o(c2), .codeword_o(w2));
  zs_encoder #(.DATA_W(3)) enc3 (.data_i(d3), .check_o(c3), .codeword_o(w3));
  zs_decoder #(.DATA_W(2)) dec2 (.codeword_i(r2), .data_o(d2o), .check_o(c2o), .syndrome_o(s2),
                                 .err_o(e2), .corrected_o(k2), .uncorrectable_o(u2));
  zs_decoder #(.DATA_W(3)) dec3 (.codeword_i(r3), .data_o(d3o), .check_o(c3o), .syndrome_o(s3),
                                 .err_o(e3), .corrected_o(k3), .uncorrectable_o(u3));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      d2 = 2'(v); #1;
      checks++;
      if (c2 != 4'(T2[v])) begin failures++; $display("FAIL 2-bit %b -> %0d", d2, c2); end
      for (int p = -1; p < 6; p++) begin
        r2 = (p < 0) ? w2 : w2 ^ (6'd1 << p); #1;
        checks++;
        if ({d2o, c2o} != w2 || e2 != (p >= 0) || u2) begin failures++; $display("FAIL 2-bit flip %0d", p); end
      end
    end
    for (int v = 0; v < 8; v++) begin
      d3 = 3'(v); #1;
      checks++;
      if (c3 != 4'(T3[v])) begin failures++; $display("FAIL 3-bit %b -> %0d", d3, c3); end
      for (int p = -1; p < 7; p++) begin
        r3 = (p < 0) ? w3 : w3 ^ (7'd1 << p); #1;
        checks++;
        if ({d3o, c3o} != w3 || e3 != (p >= 0) || u3) begin failures++; $display("FAIL 3-bit flip %0d", p); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
