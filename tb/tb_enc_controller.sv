// Testbench for enc_controller: applies every pair of counts that a 7-bit word
// can produce and checks that ED marks a majority of ones.
module tb_enc_controller;
  logic [2:0] ones_cnt, zeros_cnt;
  logic       ed;
  int checks = 0, failures = 0;

  enc_controller dut (.ones_cnt(ones_cnt), .zeros_cnt(zeros_cnt), .ed(ed));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ones = 0; ones <= 7; ones++) begin
      ones_cnt  = 3'(ones);
      zeros_cnt = 3'(7 - ones);
      #1;
      checks++;
      if (ed !== (ones >= 4)) begin
        failures++;
        $display("FAIL ones=%0d ed=%b", ones, ed);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
