// zsp_encoder: zero-sum+ encoder (combinational).
//
// A zero-sum+ code word is a zero-sum code word {data, check} followed by one
// extra bit that makes the parity of the whole word even. The data and check
// fields are those of the plain zero-sum code (a zs_encoder instance).
//
// Interface: data_i in; codeword_o = {data, check, parity} out. No clock.
// The extra even-parity bit follows the zero-sum+ code; placing it as the
// least significant bit is this design's choice.
module zsp_encoder
  import zs_pkg::*;
#(
  parameter int unsigned DATA_W  = DATA_W_DEFAULT,
  parameter int unsigned CHECK_W = check_width(DATA_W)
) (
  input  logic [DATA_W-1:0]           data_i,
  output logic [DATA_W+CHECK_W:0]     codeword_o
);

  logic [DATA_W+CHECK_W-1:0] zs_word;

  zs_encoder #(.DATA_W(DATA_W), .CHECK_W(CHECK_W)) u_zs (
    .data_i     (data_i),
    .check_o    (),
    .codeword_o (zs_word)
  );

  // Even parity over the whole word: parity bit = XOR of data and check.
  assign codeword_o = {zs_word, ^zs_word};

endmodule
