// Testbench for enc_comparator: for every word, with ED set to its majority
// and to the opposite value, checks the code given for each rank.
module tb_enc_comparator;
  logic [6:0] data;
  logic       ed;
  logic [1:0] sel;
  logic [2:0] code;
  int checks = 0, failures = 0;

  enc_comparator dut (.data(data), .ed(ed), .sel(sel), .code(code));

  // Code of the rank-th line of d that differs from e (0 if none): an
  // independent scan from the top line down, counting how many lie below.
  function automatic logic [2:0] expect_code(logic [6:0] d, bit e, int rank);
    for (int i = 6; i >= 0; i--)
      if (d[i] != e) begin
        int below = 0;
        for (int j = 0; j < i; j++) if (d[j] != e) below++;
        if (below == rank) return 3'(i + 1);
      end
    return 3'd0;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 128; v++)
      for (int e = 0; e < 2; e++)
        for (int s = 0; s < 3; s++) begin
          data = 7'(v);
          ed   = e[0];
          sel  = 2'(s);
          #1;
          checks++;
          if (code !== expect_code(data, ed, s)) begin
            failures++;
            $display("FAIL data=%b ed=%b sel=%0d code=%0d exp=%0d", data, ed, s, code,
                     expect_code(data, ed, s));
          end
        end
    // Table I example word 0101011: majority 1, zeros on lines 2, 4, 6.
    data = 7'b0101011; ed = 1'b1;
    sel = 0; #1; checks++; if (code !== 3'd3) failures++;
    sel = 1; #1; checks++; if (code !== 3'd5) failures++;
    sel = 2; #1; checks++; if (code !== 3'd7) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
