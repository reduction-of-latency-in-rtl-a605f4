// tb_zs_receiver: the testbench plays the sender side of the dual-rail link.
// Each word (random 4-bit data, encoded here from the weights 3,5,6,7) is
// put on the wires one bit at a time in random order, sometimes with one bit
// inverted (rails swapped). The receiver must acknowledge only once the last
// bit has arrived, deliver the sent data and check field corrected, flag the
// error, and drop ack only after every wire is back at the spacer.
module tb_zs_receiver;
  int checks = 0, failures = 0;
  localparam int W4 [4] = '{3, 5, 6, 7};
  logic clk = 0, rst_n = 0;
  logic [8:0] t, f;
  logic ack, ov, err, cor, unc;
  logic [3:0] od;
  logic [4:0] oc;
  logic signed [5:0] osyn;
  int n_err = 0, n_clean = 0;

  zs_receiver dut (.clk(clk), .rst_n(rst_n), .rail_t_i(t), .rail_f_i(f), .ack_o(ack),
    .out_valid_o(ov), .out_data_o(od), .out_check_o(oc), .out_syndrome_o(osyn),
    .out_err_o(err), .out_corrected_o(cor), .out_uncorrectable_o(unc));

  always #5 clk = ~clk;

  function automatic logic [8:0] encode(input logic [3:0] data);
    int s = 0;
    for (int i = 0; i < 4; i++) if (!data[i]) s += W4[i];
    return {data, 5'(s)};
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    t = 0; f = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      logic [8:0] good, sent;
      int flip;
      good = encode(4'($urandom));
      flip = (n % 2) ? $urandom_range(0, 8) : -1;
      sent = (flip >= 0) ? good ^ (9'd1 << flip) : good;
      while ((t | f) != '1) begin
        int b;
        @(negedge clk);
        checks++; if (ack || ov) begin failures++; $display("FAIL early ack"); end
        b = $urandom_range(0, 8);
        if (!(t[b] | f[b])) begin
          if (sent[b]) t[b] = 1; else f[b] = 1;
        end
      end
      @(negedge clk);
      checks++;
      if (!ack || !ov) begin failures++; $display("FAIL ack/valid not one cycle after last bit"); end
      checks++;
      if ({od, oc} != good || err != (flip >= 0) || cor != (flip >= 0) || unc) begin
        failures++; $display("FAIL word sent=%b flip=%0d got=%b err=%b", good, flip, {od, oc}, err);
      end
      if (flip >= 0) n_err++; else n_clean++;
      while ((t | f) != '0) begin
        int b;
        @(negedge clk);
        checks++; if (!ack || ov) failures++;
        b = $urandom_range(0, 8);
        t[b] = 0; f[b] = 0;
      end
      @(negedge clk);
      checks++; if (ack) begin failures++; $display("FAIL ack held after spacer"); end
    end
    checks++; if (n_err == 0 || n_clean == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
