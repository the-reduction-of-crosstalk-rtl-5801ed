// Testbench for dec_inversion: random ED values and masks; the output must
// take {7{ED}} XOR mask one clock after load and hold it otherwise.
module tb_dec_inversion;
  logic       clk = 0, rst_n = 0;
  logic       load;
  logic       ed;
  logic [6:0] mask, out_data;
  logic       out_valid;
  logic [6:0] expect_data;
  int checks = 0, failures = 0;

  dec_inversion dut (.clk(clk), .rst_n(rst_n), .load(load), .ed(ed), .mask(mask),
                     .out_data(out_data), .out_valid(out_valid));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = 0; ed = 0; mask = 0; expect_data = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    checks++; if (out_data !== 7'd0 || out_valid !== 1'b0) failures++;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      load = 1'($urandom_range(0, 1));
      ed   = 1'($urandom);
      mask = 7'($urandom);
      @(posedge clk);
      if (load) expect_data = (ed ? 7'b1111111 : 7'b0000000) ^ mask;
      #1;
      checks++;
      if (out_data !== expect_data || out_valid !== load) begin
        failures++;
        $display("FAIL out=%b exp=%b valid=%b", out_data, expect_data, out_valid);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
