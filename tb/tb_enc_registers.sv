// Testbench for enc_registers: random writes and reads against a model of the
// three registers, plus a check that reset clears them.
module tb_enc_registers;
  logic       clk = 0, rst_n = 0;
  logic       load;
  logic [1:0] load_sel, out_sel;
  logic [2:0] load_code, out_code;
  logic [2:0] model [3];
  int checks = 0, failures = 0;

  enc_registers dut (.clk(clk), .rst_n(rst_n), .load(load), .load_sel(load_sel),
                     .load_code(load_code), .out_sel(out_sel), .out_code(out_code));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = 0; load_sel = 0; load_code = 0; out_sel = 0;
    model = '{3'd0, 3'd0, 3'd0};
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int s = 0; s < 3; s++) begin
      out_sel = 2'(s); #1;
      checks++; if (out_code !== 3'd0) failures++;
    end
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      load      = 1'($urandom_range(0, 1));
      load_sel  = 2'($urandom_range(0, 2));
      load_code = 3'($urandom);
      out_sel   = 2'($urandom_range(0, 2));
      #1;
      checks++;
      if (out_code !== model[out_sel]) begin
        failures++;
        $display("FAIL read sel=%0d got=%0d exp=%0d", out_sel, out_code, model[out_sel]);
      end
      @(posedge clk);
      if (load) model[load_sel] = load_code;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
