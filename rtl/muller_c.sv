// muller_c: N-input Muller C-element, clocked model.
//
// The output rises when every input is 1, falls when every input is 0, and
// otherwise keeps its value. This is the completion element of the receiver:
// it goes high once every bit of a code word has arrived and low once every
// wire has returned to the spacer.
//
// A real C-element is a state-holding gate with no clock. Here the held state
// is a flip-flop: c_o follows the inputs one clk edge later, and rst_n (active
// low, asynchronous) clears it to 0, the idle level of the handshake. The
// clocked form, its one-cycle delay and the reset are this design's choices.
module muller_c #(
  parameter int unsigned WIDTH = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] in_i,
  output logic             c_o
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          c_o <= 1'b0;
    else if (&in_i)      c_o <= 1'b1;
    else if (in_i == '0) c_o <= 1'b0;
  end

endmodule
