// Switching-activity testbench for enc_dec_top: compares the 7-bit bus the
// words would otherwise travel on with the 4-wire link (ED, code[2:0]).
//
// For two word streams (uniform random words, and words close to all-0 or
// all-1 with one to three lines differing) it counts, per word sent:
//   toggles      lines that change value between successive clocks;
//   opposite     pairs of adjacent lines that switch in opposite directions,
//                the case that couples the most charge between neighbours.
// The 7-bit bus changes once per word; the link changes up to three times per
// word. The link lines are taken to lie side by side in the order ED,
// code[2], code[1], code[0]. Every word is also checked to come out of the
// decoder unchanged. The counts are printed for comparison; they are not
// pass/fail criteria.
module tb_crosstalk_activity;
  import tb_ref_pkg::*;

  logic       clk = 0, rst_n = 0;
  logic       in_valid, in_ready;
  logic [6:0] in_data;
  logic       bus_ed, bus_valid, out_valid;
  logic [2:0] bus_code;
  logic [6:0] out_data;
  int checks = 0, failures = 0;

  logic [6:0] sent_q [$];
  logic [6:0] prev_word;
  logic [3:0] prev_link;
  int raw_tog, raw_opp, lnk_tog, lnk_opp, nwords;

  enc_dec_top dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready), .in_data(in_data),
    .bus_ed(bus_ed), .bus_code(bus_code), .bus_valid(bus_valid),
    .out_data(out_data), .out_valid(out_valid));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int opposite_pairs(logic [6:0] a, logic [6:0] b, int w);
    int n = 0;
    for (int i = 0; i + 1 < w; i++)
      if (a[i] != b[i] && a[i+1] != b[i+1] && b[i] != b[i+1]) n++;
    return n;
  endfunction

  // Raw bus: one new word per word sent.
  always @(negedge clk) begin
    #1;
    if (rst_n && in_valid && in_ready) begin
      sent_q.push_back(in_data);
      raw_tog += $countones(in_data ^ prev_word);
      raw_opp += opposite_pairs(prev_word, in_data, 7);
      prev_word = in_data;
      nwords++;
    end
  end

  // Link: one new state per code clock.
  always @(negedge clk) if (rst_n && bus_valid) begin
    logic [3:0] s;
    s = {bus_ed, bus_code};
    lnk_tog += $countones(s ^ prev_link);
    lnk_opp += opposite_pairs(7'(prev_link), 7'(s), 4);
    prev_link = s;
  end

  always @(negedge clk) if (rst_n && out_valid) begin
    logic [6:0] w;
    checks++;
    w = sent_q.pop_front();
    if (out_data !== w) begin
      failures++;
      $display("FAIL sent %b got %b", w, out_data);
    end
  end

  task automatic send(logic [6:0] d);
    in_valid = 1;
    in_data  = d;
    while (!in_ready) @(negedge clk);
    @(negedge clk);
  endtask

  task automatic report(string name);
    $display("%s: %0d words", name, nwords);
    $display("  7-bit bus : %0.3f toggles/word, %0.3f opposite adjacent pairs/word",
             real'(raw_tog) / nwords, real'(raw_opp) / nwords);
    $display("  4-wire link: %0.3f toggles/word, %0.3f opposite adjacent pairs/word",
             real'(lnk_tog) / nwords, real'(lnk_opp) / nwords);
    checks++;
    if (nwords == 0) failures++;
  endtask

  task automatic reset_counts();
    raw_tog = 0; raw_opp = 0; lnk_tog = 0; lnk_opp = 0; nwords = 0;
  endtask

  initial begin
    in_valid = 0; in_data = 0; prev_word = 0; prev_link = 0;
    reset_counts();
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 3000; n++) send(7'($urandom));
    report("uniform random words");
    reset_counts();
    for (int n = 0; n < 3000; n++) begin
      logic [6:0] w;
      w = ($urandom_range(0, 1) != 0) ? 7'h7f : 7'h00;
      repeat ($urandom_range(1, 3)) w[$urandom_range(0, 6)] ^= 1'b1;
      send(w);
    end
    report("near-uniform words (1 to 3 lines off)");
    in_valid = 0;
    repeat (10) @(negedge clk);
    checks++;
    if (sent_q.size() != 0) begin
      failures++;
      $display("FAIL %0d words never came out", sent_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
