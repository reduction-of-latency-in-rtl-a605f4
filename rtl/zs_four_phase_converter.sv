// zs_four_phase_converter: puts encoded words on a dual-rail return-to-zero
// (four-phase) channel.
//
// Each code-word bit b is sent on two wires: the true rail T = b and the
// false rail F = ~b during the evaluate (data) phase, and T = F = 0 during the
// reset phase (the spacer). One transfer is the four-phase handshake:
//   SPACER : wires at 0; when a word is offered (req_i) and ack_i is low,
//            go to EVAL.
//   EVAL   : drive the word's T and F rails; hold them until ack_i rises.
//   RTZ    : wires back to 0; when ack_i falls the transfer is complete:
//            done_o pulses for one cycle and the FSM returns to SPACER.
// The word on codeword_i must stay stable from req_i to done_o.
//
// Interface: codeword_i, req_i, done_o on the sender side; rail_t_o, rail_f_o
// and ack_i on the channel side. Registered outputs, clk rising edge,
// asynchronous active-low reset to SPACER. The dual-rail encoding and the
// evaluate/reset phases follow the design; the req/done interface to the
// source and the clocked FSM are this design's choices.
module zs_four_phase_converter #(
  parameter int unsigned WIDTH = 9
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] codeword_i,
  input  logic             req_i,
  output logic             done_o,
  output logic [WIDTH-1:0] rail_t_o,
  output logic [WIDTH-1:0] rail_f_o,
  input  logic             ack_i
);

  typedef enum logic [1:0] {SPACER, EVAL, RTZ} phase_e;

  phase_e state_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= SPACER;
      rail_t_o <= '0;
      rail_f_o <= '0;
    end else begin
      unique case (state_q)
        SPACER: if (req_i && !ack_i) begin
          state_q  <= EVAL;
          rail_t_o <= codeword_i;
          rail_f_o <= ~codeword_i;
        end
        EVAL: if (ack_i) begin
          state_q  <= RTZ;
          rail_t_o <= '0;
          rail_f_o <= '0;
        end
        RTZ: if (!ack_i) state_q <= SPACER;
        default: state_q <= SPACER;
      endcase
    end
  end

  assign done_o = (state_q == RTZ) && !ack_i;

  // Channel rules: never both rails of a bit high; the spacer outside EVAL.
  a_no_both_rails: assert property (@(posedge clk) disable iff (!rst_n)
    (rail_t_o & rail_f_o) == '0);
  a_spacer_outside_eval: assert property (@(posedge clk) disable iff (!rst_n)
    (state_q != EVAL) |-> (rail_t_o == '0 && rail_f_o == '0));
  a_eval_complete: assert property (@(posedge clk) disable iff (!rst_n)
    (state_q == EVAL) |-> ((rail_t_o | rail_f_o) == '1));

endmodule
