// Bus decoder: rebuilds the 7-bit word from ED and its three position codes.
//
// The three decoder registers collect the codes of one word over three
// clocks with code_valid high. The line identifier turns the codes into a
// mask of lines to flip, and the inversion module spreads ED over all seven
// lines (the splitter) and stores that word XOR the mask as the output.
//
// Timing: the third code of a word is written at edge E; the decoded word is
// stored at E+1 and out_valid is high in the clock after E+1. A new word can
// follow every three clocks.
//
// The register/line-identifier/inversion structure follows the
// design; the code_valid framing and the output register are this
// implementation's choices.
module dec_top #(
  parameter int unsigned DATA_W = enc_dec_pkg::DATA_W,
  localparam int unsigned CODE_W    = enc_dec_pkg::code_w(DATA_W),
  localparam int unsigned NUM_SLOTS = enc_dec_pkg::num_slots(DATA_W)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ed,
  input  logic [CODE_W-1:0] code,
  input  logic              code_valid,
  output logic [DATA_W-1:0] out_data,
  output logic              out_valid
);

  logic [NUM_SLOTS-1:0][CODE_W-1:0] codes;
  logic                             ed_q;
  logic                             frame_done;
  logic [DATA_W-1:0]                mask;

  dec_registers #(.DATA_W(DATA_W)) u_registers (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (code_valid),
    .in_code   (code),
    .in_ed     (ed),
    .codes     (codes),
    .ed_q      (ed_q),
    .frame_done(frame_done)
  );

  dec_line_identifier #(.DATA_W(DATA_W)) u_line_identifier (
    .codes(codes),
    .mask (mask)
  );

  dec_inversion #(.DATA_W(DATA_W)) u_inversion (
    .clk      (clk),
    .rst_n    (rst_n),
    .load     (frame_done),
    .ed       (ed_q),
    .mask     (mask),
    .out_data (out_data),
    .out_valid(out_valid)
  );

endmodule
