// Comparator: finds the lines that differ from the majority value ED and
// gives the position code of one of them.
//
// Every data line is compared with ED; a line that differs is a flipped line.
// The flipped lines are numbered from line 0 upward, and the output is the
// position code (line index + 1) of the flipped line whose rank equals `sel`.
// If fewer than sel+1 lines are flipped the code is 0, meaning "no line".
// One code is produced per value of `sel`, so the encoder steps sel through
// 0..NUM_SLOTS-1 on successive clocks and stores one code per clock in its
// three registers. Combinational.
//
// The position numbering (code 0 = no flip, codes 1..7 = a line) follows the
// table of flipped-line positions; the ordering of the flipped lines by
// ascending index is this implementation's choice.
module enc_comparator #(
  parameter int unsigned DATA_W = enc_dec_pkg::DATA_W,
  localparam int unsigned CODE_W    = enc_dec_pkg::code_w(DATA_W),
  localparam int unsigned SEL_W     = enc_dec_pkg::sel_w(DATA_W)
) (
  input  logic [DATA_W-1:0] data,
  input  logic              ed,
  input  logic [SEL_W-1:0]  sel,
  output logic [CODE_W-1:0] code
);

  logic [DATA_W-1:0] flipped;
  logic [CODE_W-1:0] rank;

  assign flipped = data ^ {DATA_W{ed}};

  always_comb begin
    code = '0;
    rank = '0;
    for (int unsigned i = 0; i < DATA_W; i++) begin
      if (flipped[i]) begin
        if (rank == CODE_W'(sel)) code = CODE_W'(i + 1);
        rank = rank + 1'b1;
      end
    end
  end

endmodule
