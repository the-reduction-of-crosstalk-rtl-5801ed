// Decoder registers: three 3-bit registers that collect the three position
// codes of one word from the encoded bus, one per clock.
//
// Each clock with in_valid high writes in_code into the next slot (0, 1, 2,
// then back to 0). ED is captured with the last code of the word, so that it
// stays with the codes after the encoder has moved on to the next word.
// frame_done goes high for one clock after the last code is written; in that
// clock `codes` and `ed_q` hold one complete word. Reset clears the slot
// counter, the registers and ED.
//
// The three 3-bit registers fed from the encoder output follow the decoder
// structure; framing by counting valid codes, with every word sent as
// exactly three codes, is this implementation's choice.
module dec_registers #(
  parameter int unsigned DATA_W = enc_dec_pkg::DATA_W,
  localparam int unsigned CODE_W    = enc_dec_pkg::code_w(DATA_W),
  localparam int unsigned NUM_SLOTS = enc_dec_pkg::num_slots(DATA_W),
  localparam int unsigned SEL_W     = enc_dec_pkg::sel_w(DATA_W)
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             in_valid,
  input  logic [CODE_W-1:0]                in_code,
  input  logic                             in_ed,
  output logic [NUM_SLOTS-1:0][CODE_W-1:0] codes,
  output logic                             ed_q,
  output logic                             frame_done
);

  localparam logic [SEL_W-1:0] LAST_SLOT = SEL_W'(NUM_SLOTS - 1);

  logic [SEL_W-1:0] slot;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      codes      <= '0;
      slot       <= '0;
      ed_q       <= 1'b0;
      frame_done <= 1'b0;
    end else begin
      frame_done <= 1'b0;
      if (in_valid) begin
        codes[slot] <= in_code;
        if (slot == LAST_SLOT) begin
          slot       <= '0;
          ed_q       <= in_ed;
          frame_done <= 1'b1;
        end else begin
          slot <= slot + 1'b1;
        end
      end
    end
  end

endmodule
