// Encoder-decoder pair: a 7-bit word crosses a 3-bit code bus and a 1-bit
// ED line and comes out unchanged.
//
// The encoder reduces each word to its majority value (ED) and the positions
// of the at most three lines that differ from it, sent as three 3-bit codes
// on three successive clocks. The decoder collects the codes and inverts the
// named lines of an all-ED word. The bus between the two (ed, code,
// code_valid) is brought out so that its activity can be observed.
//
// Timing: a word taken at edge E0 (in_valid and in_ready high) appears on
// out_data with out_valid high in the clock after E5. One word is accepted
// every three clocks when in_valid stays high.
module enc_dec_top #(
  parameter int unsigned DATA_W = enc_dec_pkg::DATA_W,
  localparam int unsigned CODE_W = enc_dec_pkg::code_w(DATA_W)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [DATA_W-1:0] in_data,
  output logic              bus_ed,
  output logic [CODE_W-1:0] bus_code,
  output logic              bus_valid,
  output logic [DATA_W-1:0] out_data,
  output logic              out_valid
);

  enc_top #(.DATA_W(DATA_W)) u_enc (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .in_ready  (in_ready),
    .in_data   (in_data),
    .ed        (bus_ed),
    .code      (bus_code),
    .code_valid(bus_valid)
  );

  dec_top #(.DATA_W(DATA_W)) u_dec (
    .clk       (clk),
    .rst_n     (rst_n),
    .ed        (bus_ed),
    .code      (bus_code),
    .code_valid(bus_valid),
    .out_data  (out_data),
    .out_valid (out_valid)
  );

endmodule
