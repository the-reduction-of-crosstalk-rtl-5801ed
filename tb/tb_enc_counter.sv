// Testbench for enc_counter: applies all 128 words and compares both counts
// with $countones.
module tb_enc_counter;
  logic [6:0] data;
  logic [2:0] ones_cnt, zeros_cnt;
  int checks = 0, failures = 0;

  enc_counter dut (.data(data), .ones_cnt(ones_cnt), .zeros_cnt(zeros_cnt));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 128; v++) begin
      data = 7'(v);
      #1;
      checks++;
      if (ones_cnt != 3'($countones(data)) || zeros_cnt != 3'(7 - $countones(data))) begin
        failures++;
        $display("FAIL data=%b ones=%0d zeros=%0d", data, ones_cnt, zeros_cnt);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
