// Bus encoder: sends a 7-bit word over a 3-bit code bus plus a 1-bit ED line.
//
// A word is taken when in_valid and in_ready are both high. The counter
// counts its ones and zeros, the controller sets ED to the majority value,
// and the comparator marks every line that differs from ED. Since ED is the
// majority, at most three lines differ; their position codes (line index + 1,
// 0 for none) are stored one per clock in the three 3-bit registers, slot 0
// first, on the three clocks after the word is taken. Each stored code is put
// on the bus the clock after it is written, with code_valid high, and ED is
// held for the three codes of the word. A word whose lines are all equal is
// sent as ED and three 0 codes.
//
// Timing: word taken at edge E0, codes on the bus in the cycles after E1, E2
// and E3. in_ready is high while idle and in the last slot of a word, so
// back-to-back words are taken every three clocks.
//
// The blocks (counter, controller, comparator, three registers) and the
// majority/position-code scheme follow the design; the valid/ready handshake,
// the code_valid line and the slot order are this implementation's choices.
module enc_top #(
  parameter int unsigned DATA_W = enc_dec_pkg::DATA_W,
  localparam int unsigned CNT_W     = enc_dec_pkg::code_w(DATA_W),
  localparam int unsigned CODE_W    = enc_dec_pkg::code_w(DATA_W),
  localparam int unsigned NUM_SLOTS = enc_dec_pkg::num_slots(DATA_W),
  localparam int unsigned SEL_W     = enc_dec_pkg::sel_w(DATA_W)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [DATA_W-1:0] in_data,
  output logic              ed,
  output logic [CODE_W-1:0] code,
  output logic              code_valid
);

  localparam logic [SEL_W-1:0] LAST_SLOT = SEL_W'(NUM_SLOTS - 1);

  logic [DATA_W-1:0] data_q;
  logic              busy;
  logic [SEL_W-1:0]  slot;
  logic [SEL_W-1:0]  out_slot;
  logic              ed_q;
  logic              code_valid_q;

  logic [CNT_W-1:0]  ones_cnt, zeros_cnt;
  logic              ed_comb;
  logic [CODE_W-1:0] cmp_code;

  enc_counter #(.DATA_W(DATA_W)) u_counter (
    .data     (data_q),
    .ones_cnt (ones_cnt),
    .zeros_cnt(zeros_cnt)
  );

  enc_controller #(.DATA_W(DATA_W)) u_controller (
    .ones_cnt (ones_cnt),
    .zeros_cnt(zeros_cnt),
    .ed       (ed_comb)
  );

  enc_comparator #(.DATA_W(DATA_W)) u_comparator (
    .data(data_q),
    .ed  (ed_comb),
    .sel (slot),
    .code(cmp_code)
  );

  enc_registers #(.DATA_W(DATA_W)) u_registers (
    .clk      (clk),
    .rst_n    (rst_n),
    .load     (busy),
    .load_sel (slot),
    .load_code(cmp_code),
    .out_sel  (out_slot),
    .out_code (code)
  );

  assign in_ready = !busy || (slot == LAST_SLOT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      data_q       <= '0;
      busy         <= 1'b0;
      slot         <= '0;
      out_slot     <= '0;
      ed_q         <= 1'b0;
      code_valid_q <= 1'b0;
    end else begin
      code_valid_q <= busy;
      out_slot     <= slot;
      if (busy && slot == '0) ed_q <= ed_comb;
      if (in_valid && in_ready) data_q <= in_data;
      if (busy) begin
        if (slot == LAST_SLOT) begin
          slot <= '0;
          busy <= in_valid;
        end else begin
          slot <= slot + 1'b1;
        end
      end else if (in_valid) begin
        busy <= 1'b1;
      end
    end
  end

  assign ed         = ed_q;
  assign code_valid = code_valid_q;

  // The majority rule guarantees that no more lines differ from ED than
  // there are registers to hold their positions. busy is low in reset.
  a_flips_fit : assert property (@(posedge clk)
    busy |-> (((ones_cnt < zeros_cnt) ? ones_cnt : zeros_cnt) <= CNT_W'(NUM_SLOTS)));

endmodule
