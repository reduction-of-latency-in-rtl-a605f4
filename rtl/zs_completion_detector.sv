// zs_completion_detector: completion detector (CD) of a dual-rail channel.
//
// Each of the WIDTH bit positions arrives on a true rail and a false rail.
// A bit has arrived when either rail is high (T | F); the bit-arrival signals
// feed a Muller C-element, whose output is the acknowledge: it rises when all
// bits have arrived (a complete code word is on the wires) and falls when all
// wires are back at the spacer (both rails low). There is no timer: the CD
// waits only for a complete word, not for a correct one, and leaves error
// handling to the decoder.
//
// Interface: rail_t_i, rail_f_i (WIDTH each) in; ack_o out, which is also the
// receiver's "valid code word" signal; arrived_o gives the per-bit arrival
// signals. Timing: ack_o changes one clk edge after the last bit arrives or
// the last bit resets (see muller_c). The OR-plus-C-element structure follows
// the design; the clocked C-element is this design's choice.
module zs_completion_detector #(
  parameter int unsigned WIDTH = 9
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] rail_t_i,
  input  logic [WIDTH-1:0] rail_f_i,
  output logic [WIDTH-1:0] arrived_o,
  output logic             ack_o
);

  assign arrived_o = rail_t_i | rail_f_i;

  muller_c #(.WIDTH(WIDTH)) u_c (
    .clk   (clk),
    .rst_n (rst_n),
    .in_i  (arrived_o),
    .c_o   (ack_o)
  );

endmodule
