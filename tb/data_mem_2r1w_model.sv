// data_mem_2r1w_model: behavioural data memory with two read ports and one
// write port, for the DCT datapath testbenches.
//
// Behavioural model, not part of the design. WORDS 32-bit words addressed
// by the low address bits. Reads are combinational; the write happens at
// the rising clock edge when wen is high. Contents start at zero;
// testbenches preload and inspect them through the mem array.
module data_mem_2r1w_model #(
  parameter int unsigned WORDS = 512
) (
  input  logic        clk,
  input  logic [31:0] ra_addr,
  output logic [31:0] ra_data,
  input  logic [31:0] rb_addr,
  output logic [31:0] rb_data,
  input  logic [31:0] w_addr,
  input  logic [31:0] w_data,
  input  logic        wen
);
  localparam int unsigned AW = $clog2(WORDS);
  logic [31:0] mem [WORDS];

  initial for (int k = 0; k < WORDS; k++) mem[k] = '0;

  always_ff @(posedge clk)
    if (wen) mem[w_addr[AW-1:0]] <= w_data;

  assign ra_data = mem[ra_addr[AW-1:0]];
  assign rb_data = mem[rb_addr[AW-1:0]];
endmodule
