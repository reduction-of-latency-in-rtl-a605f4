// tb_zs_system: end-to-end test of the zero-sum link at its default size
// (4 data bits, 5 check bits), plus the zero-sum+ codec beside it.
//
// Link: 400 random words are offered; enable is switched off now and then.
// Every second word crosses the channel with one code-word bit inverted (a
// swap of that bit's two rails), alternating between data and check bits.
// Every word must come out of the receiver as sent, with the error flags
// matching the injected fault. Timing is checked against the handshake:
// out_valid 2 cycles after the edge that takes the word, the source ready
// again 5 cycles after it, so back-to-back words are taken 6 cycles apart. Counted mechanisms,
// each of which must occur: clean transfer, corrected data-bit error,
// corrected check-bit error, source busy (word offered, not taken), enable
// off (word offered, not taken), four-phase reset phase seen by the CD.
// Zero-sum+ codec: random words through its encoder and decoder with 0..2
// inverted bits, both modes; counted: detect-mode error, 1-bit correction,
// parity-bit toggle, 2-bit detection.
module tb_zs_system;
  int checks = 0, failures = 0;
  localparam int W4 [4] = '{3, 5, 6, 7};

  logic clk = 0, rst_n = 0;
  logic en, vld, rdy, ack, ov, oerr, ocor, ounc;
  logic [3:0] din, od;
  logic [4:0] oc;
  logic signed [5:0] osyn;
  logic [8:0] chan_err;
  logic [3:0] zd_in, zd_out;
  logic [9:0] z_cw_o, z_cw_i;
  logic z_mode, z_par, z_err, z_cor, z_unc, z_dbl;
  logic [4:0] z_chk;
  logic signed [5:0] z_syn;

  zs_system dut (
    .clk(clk), .rst_n(rst_n), .enable_i(en), .in_valid_i(vld), .in_data_i(din),
    .in_ready_o(rdy), .chan_err_i(chan_err), .ack_o(ack), .out_valid_o(ov),
    .out_data_o(od), .out_check_o(oc), .out_syndrome_o(osyn), .out_err_o(oerr),
    .out_corrected_o(ocor), .out_uncorrectable_o(ounc),
    .zsp_data_i(zd_in), .zsp_codeword_o(z_cw_o), .zsp_codeword_i(z_cw_i),
    .zsp_correct_mode_i(z_mode), .zsp_data_o(zd_out), .zsp_check_o(z_chk),
    .zsp_parity_o(z_par), .zsp_syndrome_o(z_syn), .zsp_err_o(z_err),
    .zsp_corrected_o(z_cor), .zsp_uncorrectable_o(z_unc), .zsp_double_o(z_dbl));

  always #5 clk = ~clk;

  function automatic logic [8:0] encode(input logic [3:0] data);
    int s = 0;
    for (int i = 0; i < 4; i++) if (!data[i]) s += W4[i];
    return {data, 5'(s)};
  endfunction

  int n_clean = 0, n_fix_data = 0, n_fix_check = 0, n_busy = 0, n_disabled = 0, n_spacer = 0;
  int z_det = 0, z_fix = 0, z_par_fix = 0, z_double = 0;
  int cycle = 0;
  always @(posedge clk) cycle++;

  // Reset phase seen at the receiver: ack high while every wire is at 0.
  always @(posedge clk) if (rst_n && ack && dut.rx_t == 0 && dut.rx_f == 0) n_spacer++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- link ----------------
  task automatic send_word(input logic [3:0] data, input int flip);
    int t_take;
    logic [8:0] good;
    good = encode(data);
    // Offer the word; count the cycles in which it is not taken.
    @(negedge clk);
    vld = 1; din = data;
    chan_err = (flip >= 0) ? (9'd1 << flip) : '0;
    // rdy is sampled at the falling edge; the word is taken on the next rising edge.
    while (1) begin
      #1;
      if (rdy) break;
      if (!en) n_disabled++; else n_busy++;
      @(negedge clk);
      if (!en && $urandom_range(0, 2) == 0) en = 1;
    end
    t_take = cycle + 1;
    @(negedge clk);
    vld = 0;
    // Result.
    while (!ov) @(posedge clk) #1;
    checks++;
    if (cycle - t_take != 2) begin
      failures++; $display("FAIL output latency %0d cycles", cycle - t_take);
    end
    checks++;
    if ({od, oc} != good || oerr != (flip >= 0) || ocor != (flip >= 0) || ounc) begin
      failures++;
      $display("FAIL word sent=%b flip=%0d got=%b err=%b cor=%b", good, flip, {od, oc}, oerr, ocor);
    end
    if (flip < 0) n_clean++; else if (flip >= 5) n_fix_data++; else n_fix_check++;
    // Source free again 5 cycles after the take; the next word can be taken
    // on the 6th edge (the caller may toggle enable first).
    while (!rdy && en) @(posedge clk) #1;
    checks++;
    if (en && cycle - t_take != 5) begin
      failures++; $display("FAIL cycle time %0d", cycle - t_take);
    end
  endtask

  initial begin
    en = 0; vld = 0; din = 0; chan_err = 0;
    zd_in = 0; z_cw_i = 0; z_mode = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // A word offered while enable is low must wait.
    send_word(4'b1010, -1);
    for (int n = 0; n < 400; n++) begin
      int flip;
      if (n % 2 == 0) flip = -1;
      else if (n % 4 == 1) flip = $urandom_range(5, 8);
      else flip = $urandom_range(0, 4);
      @(negedge clk);
      en = ($urandom_range(0, 9) != 0);
      // Word offered while the source is still busy: taken only later.
      if (n % 7 == 3) begin
        vld = 1; din = 4'($urandom);
        @(posedge clk); @(negedge clk);
        vld = 0;
        if (en) wait (!rdy);
      end
      send_word(4'($urandom), flip);
    end

    // ---------------- zero-sum+ codec ----------------
    for (int n = 0; n < 400; n++) begin
      logic [9:0] m;
      logic [9:0] good;
      int k;
      zd_in = 4'($urandom);
      #1;
      good = {encode(zd_in), ^encode(zd_in)};
      checks++;
      if (z_cw_o != good) begin failures++; $display("FAIL zsp encode"); end
      k = n % 3;
      m = 0;
      for (int j = 0; j < k; j++) begin
        int b;
        do b = $urandom_range(0, 9); while (m[b]);
        m[b] = 1;
      end
      if (n % 10 == 5) m = 10'b1;   // parity bit alone
      z_cw_i = z_cw_o ^ m;
      z_mode = 0; #1;
      checks++;
      if (z_err != (m != 0)) begin failures++; $display("FAIL zsp detect"); end
      if (z_err) z_det++;
      z_mode = 1; #1;
      checks++;
      case ($countones(m))
        0: if (z_err || {zd_out, z_chk, z_par} != good) begin failures++; $display("FAIL zsp intact"); end
        1: begin
          if (!z_cor || {zd_out, z_chk, z_par} != good) begin failures++; $display("FAIL zsp 1-bit"); end
          if (m[0]) z_par_fix++; else z_fix++;
        end
        default: begin
          if (!z_dbl || z_cor) begin failures++; $display("FAIL zsp 2-bit"); end
          z_double++;
        end
      endcase
    end

    $display("link: clean=%0d data_fix=%0d check_fix=%0d busy=%0d disabled=%0d spacer=%0d",
             n_clean, n_fix_data, n_fix_check, n_busy, n_disabled, n_spacer);
    $display("zero-sum+: detect=%0d fix=%0d parity=%0d double=%0d", z_det, z_fix, z_par_fix, z_double);
    checks++; if (n_clean == 0)     begin failures++; $display("FAIL no clean transfer"); end
    checks++; if (n_fix_data == 0)  begin failures++; $display("FAIL no data-bit correction"); end
    checks++; if (n_fix_check == 0) begin failures++; $display("FAIL no check-bit correction"); end
    checks++; if (n_busy == 0)      begin failures++; $display("FAIL source never busy"); end
    checks++; if (n_disabled == 0)  begin failures++; $display("FAIL enable never low"); end
    checks++; if (n_spacer == 0)    begin failures++; $display("FAIL no reset phase"); end
    checks++; if (z_det == 0 || z_fix == 0 || z_par_fix == 0 || z_double == 0) begin
      failures++; $display("FAIL zero-sum+ class missing");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
