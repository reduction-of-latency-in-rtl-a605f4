// tb_zs_completion_detector: the CD must raise ack only when every bit of the
// 9-bit word has arrived on one of its rails, and drop it only when every bit
// is back at the spacer. Bits are made to arrive and leave one at a time in a
// random order with random gaps; ack is checked every cycle against a
// reference C-element over (T | F).
module tb_zs_completion_detector;
  int checks = 0, failures = 0;
  localparam int W = 9;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] t, f, arrived;
  logic ack, ref_ack;
  int words = 0;

  zs_completion_detector #(.WIDTH(W)) dut (.clk(clk), .rst_n(rst_n), .rail_t_i(t),
    .rail_f_i(f), .arrived_o(arrived), .ack_o(ack));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference and per-cycle check.
  always @(posedge clk) if (rst_n) begin
    checks++;
    if (ack !== ref_ack || arrived !== (t | f)) begin
      failures++; $display("FAIL ack=%b ref=%b", ack, ref_ack);
    end
    if (&(t | f)) ref_ack <= 1; else if ((t | f) == 0) ref_ack <= 0;
  end

  initial begin
    t = 0; f = 0; ref_ack = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 100; n++) begin
      logic [W-1:0] word;
      word = W'($urandom);
      // Bits arrive one at a time.
      while ((t | f) != '1) begin
        int b;
        @(negedge clk);
        b = $urandom_range(0, W - 1);
        if (!(t[b] | f[b])) begin
          if (word[b]) t[b] = 1; else f[b] = 1;
        end
      end
      wait (ack);
      // Bits return to the spacer one at a time.
      while ((t | f) != '0) begin
        int b;
        @(negedge clk);
        b = $urandom_range(0, W - 1);
        t[b] = 0; f[b] = 0;
      end
      wait (!ack);
      words++;
    end
    @(negedge clk);
    checks++; if (words != 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
