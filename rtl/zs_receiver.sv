// zs_receiver: receiving end of the channel, a completion detector (CD) and a
// zero-sum decoder side by side.
//
// The CD sees both rails of every bit and produces the acknowledge; the
// decoder sees only the true rails, which carry the systematic code word
// {data, check} itself, and corrects a single flipped bit. On the clk edge at
// which the CD's C-element rises (every bit has arrived, ack still low), the
// corrected word and the decoder's flags are registered and out_valid_o pulses
// for one cycle; ack_o rises on that same edge and tells the sender the word
// was taken. The receiver never waits for a word to be correct, only for it to
// be complete: a corrupted but complete word is acknowledged at once and
// repaired by the decoder.
//
// Interface: rail_t_i, rail_f_i (DATA_W+CHECK_W each) in; ack_o out;
// out_valid_o, out_data_o, out_check_o, out_err_o, out_corrected_o,
// out_uncorrectable_o, out_syndrome_o out (held until the next word).
// Registered outputs, clk rising edge, asynchronous active-low reset.
// The CD/decoder split and the true-rail-only decoder follow the design; the
// output register and its flags are this design's choices.
module zs_receiver
  import zs_pkg::*;
#(
  parameter int unsigned DATA_W  = DATA_W_DEFAULT,
  parameter int unsigned CHECK_W = check_width(DATA_W),
  localparam int unsigned CW_W   = DATA_W + CHECK_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [CW_W-1:0]          rail_t_i,
  input  logic [CW_W-1:0]          rail_f_i,
  output logic                     ack_o,
  output logic                     out_valid_o,
  output logic [DATA_W-1:0]        out_data_o,
  output logic [CHECK_W-1:0]       out_check_o,
  output logic signed [CHECK_W:0]  out_syndrome_o,
  output logic                     out_err_o,
  output logic                     out_corrected_o,
  output logic                     out_uncorrectable_o
);

  logic [CW_W-1:0]         arrived;
  logic [DATA_W-1:0]       dec_data;
  logic [CHECK_W-1:0]      dec_check;
  logic signed [CHECK_W:0] dec_syndrome;
  logic                    dec_err, dec_corrected, dec_uncorrectable;
  logic                    word_arrives;

  zs_completion_detector #(.WIDTH(CW_W)) u_cd (
    .clk       (clk),
    .rst_n     (rst_n),
    .rail_t_i  (rail_t_i),
    .rail_f_i  (rail_f_i),
    .arrived_o (arrived),
    .ack_o     (ack_o)
  );

  zs_decoder #(.DATA_W(DATA_W), .CHECK_W(CHECK_W)) u_dec (
    .codeword_i      (rail_t_i),
    .data_o          (dec_data),
    .check_o         (dec_check),
    .syndrome_o      (dec_syndrome),
    .err_o           (dec_err),
    .corrected_o     (dec_corrected),
    .uncorrectable_o (dec_uncorrectable)
  );

  // Same condition on which the C-element output rises.
  assign word_arrives = (&arrived) && !ack_o;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid_o         <= 1'b0;
      out_data_o          <= '0;
      out_check_o         <= '0;
      out_syndrome_o      <= '0;
      out_err_o           <= 1'b0;
      out_corrected_o     <= 1'b0;
      out_uncorrectable_o <= 1'b0;
    end else begin
      out_valid_o <= word_arrives;
      if (word_arrives) begin
        out_data_o          <= dec_data;
        out_check_o         <= dec_check;
        out_syndrome_o      <= dec_syndrome;
        out_err_o           <= dec_err;
        out_corrected_o     <= dec_corrected;
        out_uncorrectable_o <= dec_uncorrectable;
      end
    end
  end

endmodule
