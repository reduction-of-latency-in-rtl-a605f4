// zsp_decoder: zero-sum+ checker and corrector (combinational).
//
// The received word is {data, check, parity}. Two numbers classify it: the
// parity of the whole word (even when intact) and the zero-sum syndrome of
// {data, check} (a zs_decoder instance). The decoder has two modes.
//   Detect mode (correct_mode_i = 0): any odd parity or non-zero syndrome is
//   an error and nothing is changed. This catches every 1-, 2- and 3-bit
//   error and every odd number of flipped bits.
//   Correct mode (correct_mode_i = 1):
//     even parity, syndrome 0     -> no error, word passed on;
//     odd parity, syndrome != 0   -> one bit of data/check flipped: the
//                                    zero-sum 1-bit correction is applied;
//     odd parity, syndrome 0      -> the parity bit flipped: it is toggled;
//     even parity, syndrome != 0  -> two bits flipped: detected, not corrected.
//   In correct mode an odd-parity word whose syndrome matches no bit weight
//   (three or more flips) is also reported as uncorrectable.
//
// Interface: codeword_i, correct_mode_i in; corrected data_o, check_o,
// parity_o; syndrome_o (zero-sum syndrome of the received word); err_o (any error seen), corrected_o (a bit was inverted),
// uncorrectable_o (error seen and word not repaired), double_o (correct mode:
// even parity with non-zero syndrome). No clock. The classification follows
// the zero-sum+ code; the flag outputs are this design's.
module zsp_decoder
  import zs_pkg::*;
#(
  parameter int unsigned DATA_W  = DATA_W_DEFAULT,
  parameter int unsigned CHECK_W = check_width(DATA_W)
) (
  input  logic [DATA_W+CHECK_W:0] codeword_i,
  input  logic                    correct_mode_i,
  output logic [DATA_W-1:0]       data_o,
  output logic [CHECK_W-1:0]      check_o,
  output logic                    parity_o,
  output logic signed [CHECK_W:0] syndrome_o,
  output logic                    err_o,
  output logic                    corrected_o,
  output logic                    uncorrectable_o,
  output logic                    double_o
);

  logic [DATA_W-1:0]       rx_data, zs_data;
  logic [CHECK_W-1:0]      rx_check, zs_check;
  logic                    rx_parity;
  logic signed [CHECK_W:0] syndrome;
  logic                    syn_nz, zs_fixable, zs_unfixable;
  logic                    parity_odd;

  assign {rx_data, rx_check, rx_parity} = codeword_i;

  zs_decoder #(.DATA_W(DATA_W), .CHECK_W(CHECK_W)) u_zs (
    .codeword_i      ({rx_data, rx_check}),
    .data_o          (zs_data),
    .check_o         (zs_check),
    .syndrome_o      (syndrome),
    .err_o           (syn_nz),
    .corrected_o     (zs_fixable),
    .uncorrectable_o (zs_unfixable)
  );

  assign parity_odd = ^codeword_i;
  assign syndrome_o = syndrome;

  always_comb begin
    data_o          = rx_data;
    check_o         = rx_check;
    parity_o        = rx_parity;
    err_o           = parity_odd || syn_nz;
    corrected_o     = 1'b0;
    uncorrectable_o = 1'b0;
    double_o        = 1'b0;
    if (!correct_mode_i) begin
      uncorrectable_o = err_o;
    end else if (parity_odd && syn_nz) begin
      if (zs_fixable) begin
        data_o      = zs_data;
        check_o     = zs_check;
        corrected_o = 1'b1;
      end else begin
        uncorrectable_o = zs_unfixable;
      end
    end else if (parity_odd) begin
      parity_o    = !rx_parity;
      corrected_o = 1'b1;
    end else if (syn_nz) begin
      double_o        = 1'b1;
      uncorrectable_o = 1'b1;
    end
  end

endmodule
