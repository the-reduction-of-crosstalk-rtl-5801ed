// Line identifier: turns the three stored position codes into a mask of the
// data lines that must be inverted.
//
// A code p in 1..7 sets mask bit p-1; the code 0 sets nothing. The masks of
// the three codes are ORed, so their order does not matter. Combinational.
// The code-to-line mapping follows the table of flipped-line positions.
module dec_line_identifier #(
  parameter int unsigned DATA_W = enc_dec_pkg::DATA_W,
  localparam int unsigned CODE_W    = enc_dec_pkg::code_w(DATA_W),
  localparam int unsigned NUM_SLOTS = enc_dec_pkg::num_slots(DATA_W)
) (
  input  logic [NUM_SLOTS-1:0][CODE_W-1:0] codes,
  output logic [DATA_W-1:0]                mask
);

  always_comb begin
    mask = '0;
    for (int unsigned s = 0; s < NUM_SLOTS; s++) begin
      for (int unsigned i = 0; i < DATA_W; i++) begin
        if (codes[s] == CODE_W'(i + 1)) mask[i] = 1'b1;
      end
    end
  end

endmodule
