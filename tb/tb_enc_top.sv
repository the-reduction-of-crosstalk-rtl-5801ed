// Testbench for enc_top: sends every 7-bit word back to back, then random
// words with random gaps, and checks for each word the ED line, the three
// position codes against the reference model, the two-clock delay from
// acceptance to the first code, and one accepted word per three clocks when
// the input never pauses.
module tb_enc_top;
  import tb_ref_pkg::*;

  logic       clk = 0, rst_n = 0;
  logic       in_valid, in_ready;
  logic [6:0] in_data;
  logic       ed, code_valid;
  logic [2:0] code;
  int checks = 0, failures = 0;
  int cyc = 0;

  logic [6:0] sent_q [$];
  int         acc_q  [$];
  int         last_acc = -100;
  bit         streaming;
  int         beat = 0;
  int         frame_start;
  logic [6:0] cur;
  frame_t     exp_f;

  enc_top dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
               .in_data(in_data), .ed(ed), .code(code), .code_valid(code_valid));

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Record each accepted word and the clock edge that takes it.
  always @(negedge clk) begin
    #1;
    if (rst_n && in_valid && in_ready) begin
    sent_q.push_back(in_data);
    acc_q.push_back(cyc + 1);
    if (streaming && last_acc > 0) begin
      checks++;
      if (cyc + 1 - last_acc != 3) begin
        failures++;
        $display("FAIL accept spacing %0d", cyc + 1 - last_acc);
      end
    end
    last_acc = cyc + 1;
    end
  end

  // Check each code on the bus against the reference frame.
  always @(negedge clk) if (rst_n && code_valid) begin
    if (beat == 0) begin
      if (sent_q.size() == 0) begin
        failures++;
        $display("FAIL code with no word sent");
      end else begin
        cur         = sent_q.pop_front();
        frame_start = acc_q.pop_front();
        exp_f       = ref_codes(cur);
        checks++;
        if (cyc != frame_start + 1) begin
          failures++;
          $display("FAIL first code of %b after %0d clocks", cur, cyc - frame_start);
        end
      end
    end
    checks++;
    if (ed !== ref_ed(cur) || code !== exp_f[beat]) begin
      failures++;
      $display("FAIL word %b beat %0d: ed=%b code=%0d exp ed=%b code=%0d",
               cur, beat, ed, code, ref_ed(cur), exp_f[beat]);
    end
    beat = (beat == 2) ? 0 : beat + 1;
  end

  // Called at a falling edge: offers d until the encoder takes it and
  // returns at the falling edge after the taking edge.
  task automatic send(logic [6:0] d);
    in_valid = 1;
    in_data  = d;
    while (!in_ready) @(negedge clk);
    @(negedge clk);
  endtask

  initial begin
    in_valid = 0; in_data = 0; streaming = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // The worked example: 0101011 is sent as ED=1 and codes 3, 5, 7.
    send(7'b0101011);
    in_valid = 0;
    repeat (6) @(negedge clk);
    // Every word, back to back.
    streaming = 1;
    last_acc  = -1;
    for (int v = 0; v < 128; v++) send(7'(v));
    streaming = 0;
    in_valid  = 0;
    repeat (8) @(negedge clk);
    // Random words with random idle gaps.
    for (int n = 0; n < 300; n++) begin
      in_valid = 0;
      repeat ($urandom_range(0, 4)) @(negedge clk);
      send(7'($urandom));
    end
    in_valid = 0;
    repeat (10) @(negedge clk);
    checks++;
    if (sent_q.size() != 0 || beat != 0) begin
      failures++;
      $display("FAIL %0d words never sent", sent_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
