// zs_system: zero-sum coded asynchronous point-to-point link without a timer,
// with a zero-sum+ codec beside it.
//
// Sender side: a source register (zs_source) holds each data word for the
// length of one transfer; the encoder (zs_encoder) appends the zero-sum check
// field; the four-phase converter (zs_four_phase_converter) sends the code
// word as dual-rail return-to-zero signals and runs the handshake. Receiver
// side (zs_receiver): the completion detector acknowledges as soon as every
// bit has arrived, with no timer waiting for the word to be correct, and the
// decoder repairs a single flipped bit from the true rails alone. The
// acknowledge goes straight back to the converter.
//
// Between the two ends sits the channel. chan_err_i models wire faults: for
// every bit set, the true and false rails of that code-word bit are swapped on
// the way to the receiver, so that during the evaluate phase the bit arrives
// inverted while the spacer (both rails low) still arrives intact. With
// chan_err_i = 0 the channel is ideal. This fault input is a test hook of this
// design, not part of the link.
//
// Beside the link, and not connected to it, is the zero-sum+ codec:
// zsp_encoder (data word to {data, check, even parity}) and zsp_decoder
// (detect or correct mode), both combinational, with ports of their own.
//
// Timing of one transfer (clk rising edges, ideal channel, counted from the
// edge that takes the word into the source): rails driven after edge +1; ack_o
// and the out_valid_o pulse after +2; spacer after +3; ack_o low after +4;
// source ready after +5; a waiting word is taken on edge +6. The link thus
// moves one word every 6 cycles.
// All state is reset asynchronously by rst_n (active low).
module zs_system
  import zs_pkg::*;
#(
  parameter int unsigned DATA_W  = DATA_W_DEFAULT,
  parameter int unsigned CHECK_W = check_width(DATA_W),
  localparam int unsigned CW_W   = DATA_W + CHECK_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // Local (sender) side
  input  logic                    enable_i,
  input  logic                    in_valid_i,
  input  logic [DATA_W-1:0]       in_data_i,
  output logic                    in_ready_o,
  // Channel fault injection (swap T/F rails of the selected bits)
  input  logic [CW_W-1:0]         chan_err_i,
  // Acknowledge / valid code word
  output logic                    ack_o,
  // Receiver output
  output logic                    out_valid_o,
  output logic [DATA_W-1:0]       out_data_o,
  output logic [CHECK_W-1:0]      out_check_o,
  output logic signed [CHECK_W:0] out_syndrome_o,
  output logic                    out_err_o,
  output logic                    out_corrected_o,
  output logic                    out_uncorrectable_o,
  // Zero-sum+ codec
  input  logic [DATA_W-1:0]       zsp_data_i,
  output logic [CW_W:0]           zsp_codeword_o,
  input  logic [CW_W:0]           zsp_codeword_i,
  input  logic                    zsp_correct_mode_i,
  output logic [DATA_W-1:0]       zsp_data_o,
  output logic [CHECK_W-1:0]      zsp_check_o,
  output logic                    zsp_parity_o,
  output logic signed [CHECK_W:0] zsp_syndrome_o,
  output logic                    zsp_err_o,
  output logic                    zsp_corrected_o,
  output logic                    zsp_uncorrectable_o,
  output logic                    zsp_double_o
);

  logic [DATA_W-1:0] src_data;
  logic              src_req, xfer_done;
  logic [CW_W-1:0]   codeword;
  logic [CW_W-1:0]   tx_t, tx_f;
  logic [CW_W-1:0]   rx_t, rx_f;

  zs_source #(.DATA_W(DATA_W)) u_source (
    .clk        (clk),
    .rst_n      (rst_n),
    .enable_i   (enable_i),
    .in_valid_i (in_valid_i),
    .in_data_i  (in_data_i),
    .in_ready_o (in_ready_o),
    .data_o     (src_data),
    .req_o      (src_req),
    .done_i     (xfer_done)
  );

  zs_encoder #(.DATA_W(DATA_W), .CHECK_W(CHECK_W)) u_encoder (
    .data_i     (src_data),
    .check_o    (),
    .codeword_o (codeword)
  );

  zs_four_phase_converter #(.WIDTH(CW_W)) u_converter (
    .clk        (clk),
    .rst_n      (rst_n),
    .codeword_i (codeword),
    .req_i      (src_req),
    .done_o     (xfer_done),
    .rail_t_o   (tx_t),
    .rail_f_o   (tx_f),
    .ack_i      (ack_o)
  );

  // Channel: a fault swaps the two rails of a bit.
  always_comb begin
    for (int unsigned i = 0; i < CW_W; i++) begin
      rx_t[i] = chan_err_i[i] ? tx_f[i] : tx_t[i];
      rx_f[i] = chan_err_i[i] ? tx_t[i] : tx_f[i];
    end
  end

  zs_receiver #(.DATA_W(DATA_W), .CHECK_W(CHECK_W)) u_receiver (
    .clk                 (clk),
    .rst_n               (rst_n),
    .rail_t_i            (rx_t),
    .rail_f_i            (rx_f),
    .ack_o               (ack_o),
    .out_valid_o         (out_valid_o),
    .out_data_o          (out_data_o),
    .out_check_o         (out_check_o),
    .out_syndrome_o      (out_syndrome_o),
    .out_err_o           (out_err_o),
    .out_corrected_o     (out_corrected_o),
    .out_uncorrectable_o (out_uncorrectable_o)
  );

  zsp_encoder #(.DATA_W(DATA_W), .CHECK_W(CHECK_W)) u_zsp_encoder (
    .data_i     (zsp_data_i),
    .codeword_o (zsp_codeword_o)
  );

  zsp_decoder #(.DATA_W(DATA_W), .CHECK_W(CHECK_W)) u_zsp_decoder (
    .codeword_i      (zsp_codeword_i),
    .correct_mode_i  (zsp_correct_mode_i),
    .data_o          (zsp_data_o),
    .check_o         (zsp_check_o),
    .parity_o        (zsp_parity_o),
    .syndrome_o      (zsp_syndrome_o),
    .err_o           (zsp_err_o),
    .corrected_o     (zsp_corrected_o),
    .uncorrectable_o (zsp_uncorrectable_o),
    .double_o        (zsp_double_o)
  );

endmodule
