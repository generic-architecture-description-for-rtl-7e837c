// data_mem_model: behavioural data memory for the NISC IP testbenches.
//
// Behavioural model, not part of the design: the data memory sits outside
// the IP and is reached through its dm_* ports. WORDS 32-bit words,
// word-addressed by the low address bits. Read is combinational when
// readEn is high (0 otherwise); a write happens at the rising clock edge
// when writeEn is high. Contents start at zero; testbenches preload and
// inspect them through the mem array.
module data_mem_model #(
  parameter int unsigned WORDS = 1024
) (
  input  logic        clk,
  input  logic [31:0] addr,
  input  logic [31:0] wdata,
  input  logic        readEn,
  input  logic        writeEn,
  output logic [31:0] rdata
);
  localparam int unsigned AW = $clog2(WORDS);
  logic [31:0] mem [WORDS];

  initial for (int k = 0; k < WORDS; k++) mem[k] = '0;

  always_ff @(posedge clk)
    if (writeEn) mem[addr[AW-1:0]] <= wdata;

  assign rdata = readEn ? mem[addr[AW-1:0]] : 32'd0;
endmodule
