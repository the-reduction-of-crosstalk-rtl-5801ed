// End-to-end testbench for enc_dec_top at its default size (7-bit words,
// 3-bit codes). It sends the worked example 0101011, then all 128 words back
// to back, then random words with random idle gaps, and checks that every
// word comes out of the decoder unchanged, in order, five clocks after the
// edge that took it, and that streaming words are taken every three clocks.
// It also checks the bus: ED is the majority value, held for three codes.
// It counts how often each case of the code occurs (ED 0 and 1; zero, one,
// two and three flipped lines; a stalled input; an idle gap) and counts a
// failure for any case that never occurred.
module tb_enc_dec_top;
  import tb_ref_pkg::*;

  logic       clk = 0, rst_n = 0;
  logic       in_valid, in_ready;
  logic [6:0] in_data;
  logic       bus_ed, bus_valid, out_valid;
  logic [2:0] bus_code;
  logic [6:0] out_data;
  int checks = 0, failures = 0;
  int cyc = 0;

  logic [6:0] sent_q [$];
  int         acc_q  [$];
  logic [6:0] bus_q  [$];
  int         last_acc = 0;
  bit         streaming = 0;
  int         beat = 0;
  logic [6:0] bus_word;

  int n_ed [2];
  int n_flips [4];
  int n_stall = 0, n_gap = 0;

  enc_dec_top dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready), .in_data(in_data),
    .bus_ed(bus_ed), .bus_code(bus_code), .bus_valid(bus_valid),
    .out_data(out_data), .out_valid(out_valid));

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Input side: record accepted words, count stalls and idle clocks.
  always @(negedge clk) begin
    #1;
    if (rst_n) begin
      if (in_valid && !in_ready) n_stall++;
      if (!in_valid) n_gap++;
      if (in_valid && in_ready) begin
        sent_q.push_back(in_data);
        bus_q.push_back(in_data);
        acc_q.push_back(cyc + 1);
        n_ed[ref_ed(in_data)]++;
        n_flips[ref_nflips(in_data)]++;
        if (streaming && last_acc > 0) begin
          checks++;
          if (cyc + 1 - last_acc != 3) begin
            failures++;
            $display("FAIL words taken %0d clocks apart", cyc + 1 - last_acc);
          end
        end
        last_acc = cyc + 1;
      end
    end
  end

  // Bus: ED must be the majority of the word being sent, for all three codes.
  always @(negedge clk) if (rst_n && bus_valid) begin
    if (beat == 0) bus_word = bus_q.pop_front();
    checks++;
    if (bus_ed !== ref_ed(bus_word) || bus_code !== ref_codes(bus_word)[beat]) begin
      failures++;
      $display("FAIL bus for %b beat %0d: ed=%b code=%0d", bus_word, beat, bus_ed, bus_code);
    end
    beat = (beat + 1) % 3;
  end

  // Output: the same word, in order, five clocks after it was taken.
  always @(negedge clk) if (rst_n && out_valid) begin
    checks++;
    if (sent_q.size() == 0) begin
      failures++;
      $display("FAIL unexpected output %b", out_data);
    end else begin
      logic [6:0] w;
      int         a;
      w = sent_q.pop_front();
      a = acc_q.pop_front();
      if (out_data !== w || cyc != a + 5) begin
        failures++;
        $display("FAIL sent %b got %b, %0d clocks after it was taken", w, out_data, cyc - a);
      end
    end
  end

  // Called at a falling edge: offers d until it is taken, returns at the
  // falling edge after the taking edge.
  task automatic send(logic [6:0] d);
    in_valid = 1;
    in_data  = d;
    while (!in_ready) @(negedge clk);
    @(negedge clk);
  endtask

  initial begin
    in_valid = 0; in_data = 0;
    n_ed = '{0, 0};
    n_flips = '{0, 0, 0, 0};
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    send(7'b0101011);
    in_valid = 0;
    repeat (8) @(negedge clk);
    checks++;
    if (out_data !== 7'b0101011) begin
      failures++;
      $display("FAIL worked example decoded as %b", out_data);
    end
    streaming = 1;
    last_acc  = 0;
    for (int v = 0; v < 128; v++) send(7'(v));
    streaming = 0;
    for (int n = 0; n < 2000; n++) begin
      if ($urandom_range(0, 2) == 0) begin
        in_valid = 0;
        repeat ($urandom_range(1, 4)) @(negedge clk);
      end
      send(7'($urandom));
    end
    in_valid = 0;
    repeat (10) @(negedge clk);
    checks++;
    if (sent_q.size() != 0) begin
      failures++;
      $display("FAIL %0d words never came out", sent_q.size());
    end
    $display("words with ED=0: %0d, ED=1: %0d", n_ed[0], n_ed[1]);
    $display("words with 0/1/2/3 flipped lines: %0d %0d %0d %0d",
             n_flips[0], n_flips[1], n_flips[2], n_flips[3]);
    $display("stalled clocks: %0d, idle clocks: %0d", n_stall, n_gap);
    for (int i = 0; i < 2; i++) begin
      checks++;
      if (n_ed[i] == 0) begin failures++; $display("FAIL no word with ED=%0d", i); end
    end
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (n_flips[i] == 0) begin failures++; $display("FAIL no word with %0d flips", i); end
    end
    checks++;
    if (n_stall == 0 || n_gap == 0) begin failures++; $display("FAIL no stall or no gap"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
