// Counter: counts how many lines of the input word are 1 and how many are 0.
//
// Each input line is examined in turn and added to the count of ones or of
// zeros. Both counts go to the controller. Purely combinational; the counts
// follow the word with no clock delay. The two separate counts follow the
// two connections drawn from the counter to the controller; the adder-chain
// form is this implementation's choice.
module enc_counter #(
  parameter int unsigned DATA_W = enc_dec_pkg::DATA_W,
  localparam int unsigned CNT_W = enc_dec_pkg::code_w(DATA_W)
) (
  input  logic [DATA_W-1:0] data,
  output logic [CNT_W-1:0]  ones_cnt,
  output logic [CNT_W-1:0]  zeros_cnt
);

  always_comb begin
    ones_cnt  = '0;
    zeros_cnt = '0;
    for (int unsigned i = 0; i < DATA_W; i++) begin
      if (data[i]) ones_cnt  = ones_cnt + 1'b1;
      else         zeros_cnt = zeros_cnt + 1'b1;
    end
  end

endmodule
