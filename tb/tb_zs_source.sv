// tb_zs_source: the source must take a word only when enabled and idle, hold
// it unchanged until done, and then be ready again. Words are offered at
// random with enable toggled at random; a simple model of the expected
// held word and request flag is compared every cycle.
module tb_zs_source;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic en, vld, rdy, req, done;
  logic [3:0] din, dout;
  logic [3:0] exp_word;
  logic exp_req;
  int taken = 0, refused = 0;

  zs_source #(.DATA_W(4)) dut (.clk(clk), .rst_n(rst_n), .enable_i(en), .in_valid_i(vld),
    .in_data_i(din), .in_ready_o(rdy), .data_o(dout), .req_o(req), .done_i(done));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; vld = 0; din = 0; done = 0; exp_req = 0; exp_word = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      checks++;
      if (req != exp_req || (exp_req && dout != exp_word) || rdy != (en && !exp_req)) begin
        failures++; $display("FAIL cycle %0d req=%b exp=%b word=%h exp=%h", i, req, exp_req, dout, exp_word);
      end
      en   = ($urandom_range(0, 3) != 0);
      vld  = $urandom_range(0, 1);
      din  = 4'($urandom);
      done = exp_req && ($urandom_range(0, 3) == 0);
      // Model of the next state.
      if (exp_req) begin
        if (done) exp_req = 0;
        if (vld) refused++;
      end else if (vld && en) begin
        exp_req = 1; exp_word = din; taken++;
      end else if (vld) refused++;
    end
    checks++; if (taken < 10 || refused < 10) failures++;
    $display("taken=%0d refused=%0d", taken, refused);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
