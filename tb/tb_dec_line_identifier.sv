// Testbench for dec_line_identifier: all 512 combinations of three codes,
// checked against a mask built by shifting a one into place.
module tb_dec_line_identifier;
  logic [2:0][2:0] codes;
  logic [6:0]      mask;
  int checks = 0, failures = 0;

  dec_line_identifier dut (.codes(codes), .mask(mask));

  function automatic logic [6:0] expect_mask(logic [2:0][2:0] c);
    logic [7:0] m = '0;
    for (int s = 0; s < 3; s++) m = m | (8'd1 << c[s]);
    return m[7:1];
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      codes = 9'(v);
      #1;
      checks++;
      if (mask !== expect_mask(codes)) begin
        failures++;
        $display("FAIL codes=%0d,%0d,%0d mask=%b", codes[2], codes[1], codes[0], mask);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
