// Testbench for dec_top: feeds frames built by the reference encoder (ED
// held for three codes, with random idle clocks between codes) and checks
// each decoded word and that it appears in the clock after the edge that takes its last code.
module tb_dec_top;
  import tb_ref_pkg::*;

  logic       clk = 0, rst_n = 0;
  logic       ed, code_valid, out_valid;
  logic [2:0] code;
  logic [6:0] out_data;
  logic [6:0] exp_q  [$];
  int         last_q [$];
  int         cyc = 0;
  int checks = 0, failures = 0;

  dec_top dut (.clk(clk), .rst_n(rst_n), .ed(ed), .code(code), .code_valid(code_valid),
               .out_data(out_data), .out_valid(out_valid));

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && out_valid) begin
    checks++;
    if (exp_q.size() == 0) begin
      failures++;
      $display("FAIL unexpected word %b", out_data);
    end else begin
      logic [6:0] w;
      int         t;
      w = exp_q.pop_front();
      t = last_q.pop_front();
      if (out_data !== w || cyc != t + 1) begin
        failures++;
        $display("FAIL got %b exp %b, %0d clocks after last code", out_data, w, cyc - t);
      end
    end
  end

  // Called at a falling edge: sends the frame of word d, ending at a falling edge.
  task automatic send_frame(logic [6:0] d, bit gaps);
    frame_t f = ref_codes(d);
    for (int b = 0; b < 3; b++) begin
      ed         = ref_ed(d);
      code       = f[b];
      code_valid = 1;
      @(negedge clk);
      if (b == 2) begin
        exp_q.push_back(d);
        last_q.push_back(cyc);
      end
      if (gaps) begin
        code_valid = 0;
        code       = 3'($urandom);
        repeat ($urandom_range(0, 2)) @(negedge clk);
      end
    end
    code_valid = 0;
  endtask

  initial begin
    ed = 0; code = 0; code_valid = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // The worked example: ED=1 with codes 3, 5, 7 gives 0101011.
    ed = 1; code_valid = 1;
    code = 3'd3; @(negedge clk);
    code = 3'd5; @(negedge clk);
    code = 3'd7; @(negedge clk);
    exp_q.push_back(7'b0101011);
    last_q.push_back(cyc);
    code_valid = 0;
    repeat (3) @(negedge clk);
    for (int v = 0; v < 128; v++) send_frame(7'(v), 0);
    for (int n = 0; n < 500; n++) send_frame(7'($urandom), 1);
    repeat (6) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL %0d words not decoded", exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
