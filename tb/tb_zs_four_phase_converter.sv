// tb_zs_four_phase_converter: the testbench plays the receiver. For each of
// 200 random words it offers the word, waits for the rails, checks that every
// bit sits on the right rail (T = bit, F = ~bit), acknowledges after a random
// delay, checks the spacer (all rails 0) comes back, drops ack after a random
// delay and checks the done pulse. With immediate acknowledges the converter
// must take exactly one cycle per phase.
module tb_zs_four_phase_converter;
  int checks = 0, failures = 0;
  localparam int W = 9;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] cw, t, f;
  logic req, done, ack;

  zs_four_phase_converter #(.WIDTH(W)) dut (.clk(clk), .rst_n(rst_n), .codeword_i(cw),
    .req_i(req), .done_o(done), .rail_t_o(t), .rail_f_o(f), .ack_i(ack));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = 0; ack = 0; cw = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      int lat;
      int dly;
      dly = (n < 20) ? 0 : $urandom_range(0, 4);
      @(negedge clk);
      checks++; if (t != 0 || f != 0) failures++;
      cw = W'($urandom);
      req = 1;
      lat = 0;
      do begin @(negedge clk); lat++; end while ((t | f) == 0 && lat < 50);
      checks++;
      if (t != cw || f != ~cw) begin failures++; $display("FAIL rails t=%b f=%b cw=%b", t, f, cw); end
      checks++; if (lat != 1) begin failures++; $display("FAIL eval latency %0d", lat); end
      repeat (dly) begin
        @(negedge clk);
        checks++; if (t != cw || f != ~cw) failures++;   // held until ack
      end
      ack = 1;
      @(negedge clk);
      checks++; if (t != 0 || f != 0) begin failures++; $display("FAIL no spacer"); end
      repeat (dly) begin
        @(negedge clk);
        checks++; if (t != 0 || f != 0 || done) failures++;
      end
      ack = 0;
      #1;
      checks++; if (!done) begin failures++; $display("FAIL no done"); end
      @(negedge clk);
      req = 0;
      checks++; if (done) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
