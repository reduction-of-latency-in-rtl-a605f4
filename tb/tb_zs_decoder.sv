// tb_zs_decoder: exhaustive single- and double-error check of the zero-sum
// error correction unit at the 4-bit size.
//
// Every data word is encoded from the weight list (3,5,6,7) written out here,
// then presented intact, with every single bit inverted, and with every pair
// of bits inverted. Intact words must give syndrome 0 and no flags; every
// single error must be corrected back to the sent word with the expected
// signed syndrome; every double error must give a non-zero syndrome.
module tb_zs_decoder;
  int checks = 0, failures = 0;
  localparam int W4 [4] = '{3, 5, 6, 7};

  logic [8:0] cw;
  logic [3:0] d;
  logic [4:0] c;
  logic signed [5:0] syn;
  logic err, cor, unc;

  zs_decoder dut (.codeword_i(cw), .data_o(d), .check_o(c), .syndrome_o(syn),
                  .err_o(err), .corrected_o(cor), .uncorrectable_o(unc));

  function automatic logic [8:0] encode(input logic [3:0] data);
    int s = 0;
    for (int i = 0; i < 4; i++) if (!data[i]) s += W4[i];
    return {data, 5'(s)};
  endfunction

  // Weight of code-word bit position p (0..4 check, 5..8 data).
  function automatic int weight_of(input int p);
    return (p < 5) ? (1 << p) : W4[p-5];
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int dbl_undetected = 0;
    for (int v = 0; v < 16; v++) begin
      logic [8:0] good;
      good = encode(4'(v));
      cw = good; #1;
      checks++;
      if ({d, c} != good || syn != 0 || err || cor || unc) begin
        failures++; $display("FAIL intact %b", good);
      end
      for (int p = 0; p < 9; p++) begin
        int exp_syn;
        cw = good ^ (9'd1 << p); #1;
        // Bit set by the error -> data: +w, check: +2^k; cleared -> negative.
        exp_syn = cw[p] ? weight_of(p) : -weight_of(p);
        checks++;
        if ({d, c} != good || syn != 6'(exp_syn) || !err || !cor || unc) begin
          failures++;
          $display("FAIL single p=%0d sent=%b got=%b syn=%0d exp=%0d", p, good, {d, c}, syn, exp_syn);
        end
      end
      for (int p = 0; p < 9; p++)
        for (int q = p + 1; q < 9; q++) begin
          cw = good ^ (9'd1 << p) ^ (9'd1 << q); #1;
          checks++;
          if (!err) begin failures++; dbl_undetected++; end
        end
    end
    // Worked example: 0010 sent, data bit of weight 6 flipped -> syndrome 6.
    cw = {4'b0110, 5'b10000}; #1;
    checks++;
    if (syn != 6 || d != 4'b0010) failures++;
    $display("double errors undetected: %0d", dbl_undetected);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
