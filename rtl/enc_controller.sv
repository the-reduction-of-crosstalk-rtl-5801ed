// Controller: decides the majority value of the word and drives ED.
//
// ED is 1 when the word holds more ones than zeros and 0 otherwise. With an
// odd word width there is never a tie. ED is sent to the decoder on its own
// line and tells the comparator which value counts as "not flipped".
// Combinational.
module enc_controller #(
  parameter int unsigned DATA_W = enc_dec_pkg::DATA_W,
  localparam int unsigned CNT_W = enc_dec_pkg::code_w(DATA_W)
) (
  input  logic [CNT_W-1:0] ones_cnt,
  input  logic [CNT_W-1:0] zeros_cnt,
  output logic             ed
);

  assign ed = (ones_cnt > zeros_cnt);

endmodule
