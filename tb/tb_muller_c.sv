// tb_muller_c: random check of the clocked C-element against a reference.
// Inputs are driven at random, with a bias towards all-ones and all-zeros so
// that the output both rises and falls; the reference holds its value unless
// all inputs agree. Rises and falls are counted and must both occur.
module tb_muller_c;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [2:0] in;
  logic c, ref_c;
  int rises = 0, falls = 0;

  muller_c #(.WIDTH(3)) dut (.clk(clk), .rst_n(rst_n), .in_i(in), .c_o(c));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in = '0; ref_c = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      checks++;
      if (c !== ref_c) begin failures++; $display("FAIL at %0d: c=%b ref=%b", i, c, ref_c); end
      case ($urandom_range(0, 3))
        0: in = '1;
        1: in = '0;
        default: in = 3'($urandom);
      endcase
      if (&in && !ref_c) rises++;
      if (in == 0 && ref_c) falls++;
      if (&in) ref_c = 1; else if (in == 0) ref_c = 0;
    end
    checks++; if (rises == 0 || falls == 0) failures++;
    $display("rises=%0d falls=%0d", rises, falls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
