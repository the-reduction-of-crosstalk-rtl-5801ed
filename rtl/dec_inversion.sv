// Inversion module: builds the decoded 7-bit word from ED and the mask of
// flipped lines, and holds it at the output.
//
// The base word is ED repeated on all seven lines, the word that would be
// sent if no line differed from the majority (the splitter's fan-out of ED,
// which is pure wiring, is done here at the module input). The lines named in
// `mask` are inverted. On a clock with `load` high the output register takes
// {7{ED}} XOR mask, and out_valid is high for the following clock; the output
// word is held until the next load. Reset clears both. The register at the
// output is this implementation's choice, so that the decoded word stays
// stable while the decoder registers fill with the next word.
module dec_inversion #(
  parameter int unsigned DATA_W = enc_dec_pkg::DATA_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  logic              ed,
  input  logic [DATA_W-1:0] mask,
  output logic [DATA_W-1:0] out_data,
  output logic              out_valid
);

  logic [DATA_W-1:0] base;

  assign base = {DATA_W{ed}};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_data  <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= load;
      if (load) out_data <= base ^ mask;
    end
  end

endmodule
