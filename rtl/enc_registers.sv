// Encoder registers: three 3-bit registers that hold the position codes of a
// word and drive them, one per clock, onto the 3-bit encoded bus.
//
// When `load` is high, register `load_sel` takes `load_code` at the rising
// clock edge. The bus output is the register selected by `out_sel`
// (combinational read). Reset clears all registers to code 0 ("no line").
// Three registers of three bits follow the encoder structure; the write
// select and the output multiplexer are this implementation's choice of how
// the registers share the comparator output and the bus.
module enc_registers #(
  parameter int unsigned DATA_W = enc_dec_pkg::DATA_W,
  localparam int unsigned CODE_W    = enc_dec_pkg::code_w(DATA_W),
  localparam int unsigned NUM_SLOTS = enc_dec_pkg::num_slots(DATA_W),
  localparam int unsigned SEL_W     = enc_dec_pkg::sel_w(DATA_W)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  logic [SEL_W-1:0]  load_sel,
  input  logic [CODE_W-1:0] load_code,
  input  logic [SEL_W-1:0]  out_sel,
  output logic [CODE_W-1:0] out_code
);

  logic [NUM_SLOTS-1:0][CODE_W-1:0] regs;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      regs <= '0;
    end else if (load) begin
      regs[load_sel] <= load_code;
    end
  end

  assign out_code = regs[out_sel];

endmodule
