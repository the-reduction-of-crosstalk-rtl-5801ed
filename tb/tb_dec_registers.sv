// Testbench for dec_registers: streams random codes with random gaps and
// checks, in the clock after every third code, that the three registers hold
// that word's codes in order, that ED is the one sent with the third code,
// and that frame_done is high exactly then.
module tb_dec_registers;
  logic            clk = 0, rst_n = 0;
  logic            in_valid, in_ed, ed_q, frame_done;
  logic [2:0]      in_code;
  logic [2:0][2:0] codes;
  logic [2:0]      sent [3];
  logic            sent_ed;
  int              nbeat = 0;
  bit              expect_done = 0;
  int checks = 0, failures = 0;

  dec_registers dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_code(in_code),
                     .in_ed(in_ed), .codes(codes), .ed_q(ed_q), .frame_done(frame_done));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; in_code = 0; in_ed = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      checks++;
      if (frame_done !== expect_done) begin
        failures++;
        $display("FAIL frame_done=%b exp=%b", frame_done, expect_done);
      end
      if (expect_done) begin
        checks++;
        if (codes[0] !== sent[0] || codes[1] !== sent[1] || codes[2] !== sent[2] ||
            ed_q !== sent_ed) begin
          failures++;
          $display("FAIL codes %0d %0d %0d ed %b, exp %0d %0d %0d ed %b", codes[0], codes[1],
                   codes[2], ed_q, sent[0], sent[1], sent[2], sent_ed);
        end
      end
      in_valid = 1'($urandom_range(0, 3) != 0);
      in_code  = 3'($urandom);
      in_ed    = 1'($urandom);
      expect_done = 0;
      if (in_valid) begin
        sent[nbeat] = in_code;
        if (nbeat == 2) begin
          sent_ed     = in_ed;
          expect_done = 1;
        end
        nbeat = (nbeat + 1) % 3;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
