// tb_zsp_decoder: every 4-bit data word is encoded (weights 3,5,6,7 plus an
// even-parity bit, computed here) and presented with every pattern of 0, 1, 2 and 3
// inverted bits, in both modes.
//   Detect mode: every such error must be flagged, intact words not.
//   Correct mode: intact words pass; every single error, parity bit included,
//   is repaired; every double error is flagged as a 2-bit error and not
//   corrected. Each class of the parity/syndrome table is counted and must
//   occur.
module tb_zsp_decoder;
  int checks = 0, failures = 0;
  localparam int W4 [4] = '{3, 5, 6, 7};
  logic [9:0] cw;
  logic mode;
  logic [3:0] d;
  logic [4:0] c;
  logic p, err, cor, unc, dbl;
  logic signed [5:0] syn;
  int n_none = 0, n_fix = 0, n_par = 0, n_dbl = 0, n_det = 0;

  zsp_decoder dut (.codeword_i(cw), .correct_mode_i(mode), .data_o(d), .check_o(c),
    .parity_o(p), .syndrome_o(syn), .err_o(err), .corrected_o(cor),
    .uncorrectable_o(unc), .double_o(dbl));

  function automatic logic [9:0] encode(input logic [3:0] data);
    int s = 0;
    logic [8:0] zs;
    for (int i = 0; i < 4; i++) if (!data[i]) s += W4[i];
    zs = {data, 5'(s)};
    return {zs, ^zs};
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic [9:0] good;
      good = encode(4'(v));
      for (int mi = 0; mi < 1024; mi++) begin
        int nerr;
        logic [9:0] m;
        m = 10'(mi);
        if ($countones(m) > 3) continue;
        nerr = $countones(m);
        cw = good ^ m;
        mode = 0; #1;
        checks++;
        if (err != (nerr != 0) || unc != (nerr != 0) || cor || {d, c, p} != cw) begin
          failures++; $display("FAIL detect nerr=%0d m=%b", nerr, m);
        end
        if (nerr != 0) n_det++;
        mode = 1; #1;
        checks++;
        case (nerr)
          0: begin
            n_none++;
            if (err || cor || unc || {d, c, p} != good) begin failures++; $display("FAIL intact"); end
          end
          1: begin
            if (m[0]) n_par++; else n_fix++;
            if (!err || !cor || unc || {d, c, p} != good) begin failures++; $display("FAIL 1-bit m=%b", m); end
          end
          2: begin
            n_dbl++;
            if (!err || cor || !unc || !dbl || {d, c, p} != cw) begin failures++; $display("FAIL 2-bit m=%b", m); end
          end
          default: if (!err || dbl) begin failures++; $display("FAIL 3-bit m=%b", m); end
        endcase
      end
    end
    checks++;
    if (n_none == 0 || n_fix == 0 || n_par == 0 || n_dbl == 0 || n_det == 0) failures++;
    $display("intact=%0d fixed=%0d parity=%0d double=%0d detected=%0d", n_none, n_fix, n_par, n_dbl, n_det);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
